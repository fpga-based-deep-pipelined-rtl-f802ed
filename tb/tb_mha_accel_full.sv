// tb_mha_accel_full: one complete run of the accelerator at its default size
// (16 tokens, hidden size 768, 12 heads of 64, 16-wide arrays).
// Loads random W_Q, W_K, W_V (uniform in +-0.1) and one random image
// (uniform in +-1) through the load ports, runs all 12 heads of the image,
// and reads the 16 x 768 concatenated result back. Every element is checked
// against a double-precision model of softmax(Q K^T / 8) V per head
// (tolerance 2e-3 relative plus 1e-4 absolute). Also checks the image's
// ready flag, the run length (12 projection-paced steps of
// 4 * (1 + 768 + 31 + 16) cycles, three softmax-paced and one context-paced
// draining step, three control cycles per step)
// and that all five stages were busy together at least once.
module tb_mha_accel_full;
  import fp32_pkg::*;
  import tb_fp_pkg::*;
  localparam int SEQ = vit_pkg::SEQ_LEN, HIDDEN = vit_pkg::HIDDEN, HEADS = vit_pkg::NUM_HEADS;
  localparam int ACOLS = vit_pkg::ARRAY_COLS, IMG_SLOTS = vit_pkg::IMG_SLOTS;
  localparam int HD = HIDDEN / HEADS, NT = HD / ACOLS, WPR = HIDDEN / ACOLS;
  localparam int STEP = NT * (1 + HIDDEN + (SEQ + ACOLS - 1) + SEQ);
  localparam int SMAX = SEQ * (3 * SEQ + 1) + 1;
  // context stage, alone in the last step
  localparam int CTX = NT * (1 + SEQ + (SEQ + ACOLS - 1) + SEQ);

  logic  clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [1:0] num_images = '0;
  logic  busy, done;
  logic  out_ready [IMG_SLOTS];
  logic  x_wr_en = 1'b0, x_wr_img = 1'b0;
  logic [9:0] x_wr_k = '0;
  fp32_t x_wr_data [SEQ];
  logic  w_wr_en = 1'b0;
  logic [1:0] w_wr_sel = '0;
  logic [15:0] w_wr_addr = '0;
  fp32_t w_wr_data [ACOLS];
  logic  out_rd_img = 1'b0;
  logic [3:0] out_rd_row = '0;
  logic [5:0] out_rd_word = '0;
  fp32_t out_rd_data [ACOLS];

  fp32_t X  [SEQ][HIDDEN];
  fp32_t WT [3][HIDDEN][HIDDEN];
  int    checks = 0, failures = 0, cnt_full = 0;

  mha_accel dut (
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
    if (n == 5) cnt_full++;
  end

  initial begin
    repeat (400000) @(posedge clk);
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

  initial begin
    int cyc = 0;
    real q [SEQ][HD];
    real k [SEQ][HD];
    real v [SEQ][HD];
    real sc [SEQ][SEQ];
    real mx, sum, o;
    fp32_t got [SEQ][HIDDEN];
    for (int t = 0; t < SEQ; t++) x_wr_data[t] = '0;
    for (int l = 0; l < ACOLS; l++) w_wr_data[l] = '0;
    for (int t = 0; t < SEQ; t++) for (int d = 0; d < HIDDEN; d++) X[t][d] = r2f(urand(-1.0, 1.0));
    for (int m = 0; m < 3; m++)
      for (int a = 0; a < HIDDEN; a++)
        for (int b = 0; b < HIDDEN; b++) WT[m][a][b] = r2f(urand(-0.1, 0.1));
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // load weights and the image
    for (int m = 0; m < 3; m++)
      for (int a = 0; a < HIDDEN; a++)
        for (int c = 0; c < WPR; c++) begin
          w_wr_en = 1'b1;
          w_wr_sel = 2'(m);
          w_wr_addr = 16'(a * WPR + c);
          for (int l = 0; l < ACOLS; l++) w_wr_data[l] = WT[m][a][c * ACOLS + l];
          @(negedge clk);
        end
    w_wr_en = 1'b0;
    for (int d = 0; d < HIDDEN; d++) begin
      x_wr_en = 1'b1;
      x_wr_k = 10'(d);
      for (int t = 0; t < SEQ; t++) x_wr_data[t] = X[t][d];
      @(negedge clk);
    end
    x_wr_en = 1'b0;
    // run one image through all heads
    num_images = 2'd1;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    $display("run took %0d cycles", cyc);
    chk(cyc >= HEADS * STEP + 3 * SMAX + CTX + 3 * (HEADS + 4) - 3 &&
        cyc <= HEADS * STEP + 3 * SMAX + CTX + 3 * (HEADS + 4) + 3,
        $sformatf("run took %0d cycles", cyc));
    chk(out_ready[0], "image ready");
    chk(cnt_full > 0, "all five stages busy at least once");
    for (int r = 0; r < SEQ; r++)
      for (int w = 0; w < WPR; w++) begin
        out_rd_row = 4'(r);
        out_rd_word = 6'(w);
        #1;
        for (int l = 0; l < ACOLS; l++) got[r][w * ACOLS + l] = out_rd_data[l];
      end
    for (int h = 0; h < HEADS; h++) begin
      for (int t = 0; t < SEQ; t++)
        for (int c = 0; c < HD; c++) begin
          q[t][c] = 0.0; k[t][c] = 0.0; v[t][c] = 0.0;
          for (int d = 0; d < HIDDEN; d++) begin
            q[t][c] += f2r(X[t][d]) * f2r(WT[0][d][h * HD + c]);
            k[t][c] += f2r(X[t][d]) * f2r(WT[1][d][h * HD + c]);
            v[t][c] += f2r(X[t][d]) * f2r(WT[2][d][h * HD + c]);
          end
        end
      for (int i = 0; i < SEQ; i++) begin
        mx = -1.0e30;
        for (int j = 0; j < SEQ; j++) begin
          sc[i][j] = 0.0;
          for (int c = 0; c < HD; c++) sc[i][j] += q[i][c] * k[j][c];
          sc[i][j] *= 0.125;
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
          chk(close(got[i][h * HD + c], o, 2e-3, 1e-4),
              $sformatf("head %0d out[%0d][%0d] got %f exp %f", h, i, c, f2r(got[i][h * HD + c]), o));
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
