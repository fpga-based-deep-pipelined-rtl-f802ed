// tb_mha_accel: end-to-end test of the accelerator top at reduced size
// (4 tokens, hidden size 32, 4 heads of 8, 4-wide arrays, 2 image slots).
// It loads W_Q, W_K, W_V and two images through the load ports, runs both
// images, reads the concatenated results back through the readout port and
// compares every element with a double-precision model of
// softmax(Q K^T / sqrt(d)) V per head (1e-3 relative plus 1e-5 absolute).
// A second run replaces only image slot 0 and reuses the loaded weights.
// It checks the ready flags (low before the last head of an image, high
// after, cleared by the next start), the run length against the pipeline
// schedule, and counts the design's mechanisms: steps with several
// (image, head) tasks in flight, steps with all five stages working,
// images projected with weights loaded before an earlier image, heads
// projected from an image already on chip, and images whose heads were
// gathered into one output row before being flagged ready. A mechanism never seen is a failure.
module tb_mha_accel;
  import fp32_pkg::*;
  import tb_fp_pkg::*;
  localparam int SEQ = 4, HIDDEN = 32, HEADS = 4, ACOLS = 4, IMG_SLOTS = 2;
  localparam int HD = HIDDEN / HEADS, NT = HD / ACOLS, WPR = HIDDEN / ACOLS;
  localparam fp32_t SCALE = 32'h3EB5_04F3;   // 1/sqrt(8)
  // slowest stage (projection) per step plus control, see attention_pipeline
  localparam int STEP = NT * (1 + HIDDEN + (SEQ + ACOLS - 1) + SEQ);
  // softmax, the slowest stage once the projections have drained
  localparam int SMAX = SEQ * (3 * SEQ + 1) + 1;
  // context stage, alone in the last step
  localparam int CTX = NT * (1 + SEQ + (SEQ + ACOLS - 1) + SEQ);

  logic  clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [1:0] num_images = '0;
  logic  busy, done;
  logic  out_ready [IMG_SLOTS];
  logic  x_wr_en = 1'b0, x_wr_img = 1'b0;
  logic [4:0] x_wr_k = '0;
  fp32_t x_wr_data [SEQ];
  logic  w_wr_en = 1'b0;
  logic [1:0] w_wr_sel = '0;
  logic [7:0] w_wr_addr = '0;
  fp32_t w_wr_data [ACOLS];
  logic  out_rd_img = 1'b0;
  logic [1:0] out_rd_row = '0;
  logic [2:0] out_rd_word = '0;
  fp32_t out_rd_data [ACOLS];

  fp32_t X  [IMG_SLOTS][SEQ][HIDDEN];
  fp32_t WT [3][HIDDEN][HIDDEN];
  int    checks = 0, failures = 0;
  int    cnt_overlap = 0, cnt_full = 0, cnt_weight_reuse = 0, cnt_concat = 0;
  int    cnt_image_reuse = 0, imgs_since_load = 0;

  mha_accel #(.SEQ(SEQ), .HIDDEN(HIDDEN), .HEADS(HEADS), .ACOLS(ACOLS),
              .IMG_SLOTS(IMG_SLOTS), .SCALE(SCALE)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .num_images(num_images), .busy(busy),
    .done(done), .out_ready(out_ready),
    .x_wr_en(x_wr_en), .x_wr_img(x_wr_img), .x_wr_k(x_wr_k), .x_wr_data(x_wr_data),
    .w_wr_en(w_wr_en), .w_wr_sel(w_wr_sel), .w_wr_addr(w_wr_addr), .w_wr_data(w_wr_data),
    .out_rd_img(out_rd_img), .out_rd_row(out_rd_row), .out_rd_word(out_rd_word),
    .out_rd_data(out_rd_data));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    automatic int n = 0;
    for (int s = 0; s < 5; s++) if (dut.u_kernel.st_start[s]) n++;
    if (n > 1) cnt_overlap++;
    if (n == 5) cnt_full++;
    // projection of a new image with weights loaded for an earlier one
    if (w_wr_en) imgs_since_load = 0;
    else if (rst_n && dut.u_kernel.st_start[0] && dut.u_kernel.tk_head[0] == 0) begin
      imgs_since_load++;
      if (imgs_since_load > 1) cnt_weight_reuse++;
    end
    // projection of a further head of an image already on chip
    if (rst_n && dut.u_kernel.st_start[0] && dut.u_kernel.tk_head[0] != 0) cnt_image_reuse++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic load_image(input int img);
    for (int t = 0; t < SEQ; t++)
      for (int d = 0; d < HIDDEN; d++) X[img][t][d] = r2f(urand(-1.0, 1.0));
    for (int d = 0; d < HIDDEN; d++) begin
      x_wr_en = 1'b1;
      x_wr_img = 1'(img);
      x_wr_k = 5'(d);
      for (int t = 0; t < SEQ; t++) x_wr_data[t] = X[img][t][d];
      @(negedge clk);
    end
    x_wr_en = 1'b0;
  endtask

  task automatic load_weights();
    for (int m = 0; m < 3; m++)
      for (int a = 0; a < HIDDEN; a++)
        for (int b = 0; b < HIDDEN; b++) WT[m][a][b] = r2f(urand(-0.6, 0.6));
    for (int m = 0; m < 3; m++)
      for (int a = 0; a < HIDDEN; a++)
        for (int c = 0; c < WPR; c++) begin
          w_wr_en = 1'b1;
          w_wr_sel = 2'(m);
          w_wr_addr = 8'(a * WPR + c);
          for (int l = 0; l < ACOLS; l++) w_wr_data[l] = WT[m][a][c * ACOLS + l];
          @(negedge clk);
        end
    w_wr_en = 1'b0;
  endtask

  task automatic check_image(input int img);
    real q [SEQ][HD];
    real k [SEQ][HD];
    real v [SEQ][HD];
    real sc [SEQ][SEQ];
    real mx, sum, o;
    fp32_t got [SEQ][HIDDEN];
    for (int r = 0; r < SEQ; r++)
      for (int w = 0; w < WPR; w++) begin
        out_rd_img = 1'(img);
        out_rd_row = 2'(r);
        out_rd_word = 3'(w);
        #1;
        for (int l = 0; l < ACOLS; l++) got[r][w * ACOLS + l] = out_rd_data[l];
      end
    for (int h = 0; h < HEADS; h++) begin
      for (int t = 0; t < SEQ; t++)
        for (int c = 0; c < HD; c++) begin
          q[t][c] = 0.0; k[t][c] = 0.0; v[t][c] = 0.0;
          for (int d = 0; d < HIDDEN; d++) begin
            q[t][c] += f2r(X[img][t][d]) * f2r(WT[0][d][h * HD + c]);
            k[t][c] += f2r(X[img][t][d]) * f2r(WT[1][d][h * HD + c]);
            v[t][c] += f2r(X[img][t][d]) * f2r(WT[2][d][h * HD + c]);
          end
        end
      for (int i = 0; i < SEQ; i++) begin
        mx = -1.0e30;
        for (int j = 0; j < SEQ; j++) begin
          sc[i][j] = 0.0;
          for (int c = 0; c < HD; c++) sc[i][j] += q[i][c] * k[j][c];
          sc[i][j] *= f2r(SCALE);
          if (sc[i][j] > mx) mx = sc[i][j];
        end
        sum = 0.0;
        for (int j = 0; j < SEQ; j++) begin
          sc[i][j] = $exp(sc[i][j] - mx);
          sum += sc[i][j];
        end
        for (int j = 0; j < SEQ; j++) sc[i][j] /= sum;
      end
      for (int i = 0; i < SEQ; i++)
        for (int c = 0; c < HD; c++) begin
          o = 0.0;
          for (int j = 0; j < SEQ; j++) o += sc[i][j] * v[j][c];
          chk(close(got[i][h * HD + c], o, 1e-3, 1e-5),
              $sformatf("img %0d head %0d out[%0d][%0d] got %f exp %f", img, h, i, c,
                        f2r(got[i][h * HD + c]), o));
        end
    end
  endtask

  task automatic run(input int nimg);
    int cyc = 0;
    int ntask = nimg * HEADS;
    bit seen_partial = 1'b0;
    @(negedge clk);
    num_images = 2'(nimg);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    chk(!out_ready[0] && !out_ready[1], "ready flags cleared by start");
    while (!done) begin
      // a head of image 0 is in but the image is not ready yet
      if (dut.u_omem.heads_in[0] != 0 && !out_ready[0]) seen_partial = 1'b1;
      @(negedge clk);
      cyc++;
    end
    // ntask steps paced by the projection, three by the softmax and one by
    // the context stage, with three control cycles per step
    chk(cyc >= ntask * STEP + 3 * SMAX + CTX + 3 * (ntask + 4) - 3 &&
        cyc <= ntask * STEP + 3 * SMAX + CTX + 3 * (ntask + 4) + 3,
        $sformatf("run of %0d images took %0d cycles", nimg, cyc));
    for (int i = 0; i < nimg; i++) begin
      chk(out_ready[i], $sformatf("image %0d ready", i));
      if (out_ready[i] && seen_partial) cnt_concat++;
    end
    chk(nimg == 2 || !out_ready[1], "unused slot not ready");
  endtask

  initial begin
    for (int t = 0; t < SEQ; t++) x_wr_data[t] = '0;
    for (int l = 0; l < ACOLS; l++) w_wr_data[l] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    load_weights();
    load_image(0);
    load_image(1);
    run(2);
    check_image(0);
    check_image(1);
    // new image in slot 0 only; weights stay on chip
    load_image(0);
    run(1);
    check_image(0);
    chk(cnt_overlap > 0, "several tasks in flight at least once");
    chk(cnt_full > 0, "all five stages busy at least once");
    chk(cnt_concat > 0, "heads gathered per image");
    chk(cnt_weight_reuse > 0, "weights reused by a later image");
    chk(cnt_image_reuse > 0, "image reused by a later head");
    $display("overlapping steps %0d, full-pipeline steps %0d, weight reuse %0d, image reuse %0d, images concatenated %0d",
             cnt_overlap, cnt_full, cnt_weight_reuse, cnt_image_reuse, cnt_concat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
