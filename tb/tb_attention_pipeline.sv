// tb_attention_pipeline: end-to-end test of the five-stage attention kernel
// at reduced size (4 tokens, hidden size 32, 4 heads of 8, 4-wide arrays).
// The testbench plays the internal memories: it answers the image and weight
// reads combinationally and records the output writes and head_done
// reports. For two images it checks every output element against a
// double-precision model of softmax(Q K^T / sqrt(d)) V per head (tolerance
// 1e-3 relative plus 1e-5 absolute), that each element is written once and
// each head reported once. It also counts how often the pipeline held
// several tasks at once and every stage busy together, and fails if
// either never happened.
module tb_attention_pipeline;
  import fp32_pkg::*;
  import tb_fp_pkg::*;
  localparam int SEQ = 4, HIDDEN = 32, HEADS = 4, ACOLS = 4, IMG_SLOTS = 2;
  localparam int HD = HIDDEN / HEADS, NT = HD / ACOLS, WPR = HIDDEN / ACOLS;
  localparam fp32_t SCALE = 32'h3EB5_04F3;   // 1/sqrt(8)

  logic  clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [1:0] num_images = '0;
  logic  busy, done;
  logic  x_rd_img;
  logic [4:0] x_rd_k, w_rd_k;
  logic [1:0] w_rd_head;
  logic       w_rd_tile;
  fp32_t x_rd_data [SEQ];
  fp32_t wq_rd_data [ACOLS];
  fp32_t wk_rd_data [ACOLS];
  fp32_t wv_rd_data [ACOLS];
  logic  out_wr_en, out_wr_img, out_head_done, out_head_img;
  logic [1:0] out_wr_row;
  logic [2:0] out_wr_word;
  fp32_t out_wr_data [ACOLS];

  fp32_t X  [IMG_SLOTS][SEQ][HIDDEN];
  fp32_t WQ [HIDDEN][HIDDEN];
  fp32_t WK [HIDDEN][HIDDEN];
  fp32_t WV [HIDDEN][HIDDEN];
  fp32_t O  [IMG_SLOTS][SEQ][HIDDEN];
  int    nwr [IMG_SLOTS][SEQ][HIDDEN];
  int    nhead [IMG_SLOTS];
  int    checks = 0, failures = 0;
  int    cnt_overlap = 0, cnt_full = 0;

  attention_pipeline #(.SEQ(SEQ), .HIDDEN(HIDDEN), .HEADS(HEADS), .ACOLS(ACOLS),
                       .IMG_SLOTS(IMG_SLOTS), .SCALE(SCALE)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .num_images(num_images), .busy(busy), .done(done),
    .x_rd_img(x_rd_img), .x_rd_k(x_rd_k), .x_rd_data(x_rd_data),
    .w_rd_k(w_rd_k), .w_rd_head(w_rd_head), .w_rd_tile(w_rd_tile),
    .wq_rd_data(wq_rd_data), .wk_rd_data(wk_rd_data), .wv_rd_data(wv_rd_data),
    .out_wr_en(out_wr_en), .out_wr_img(out_wr_img), .out_wr_row(out_wr_row),
    .out_wr_word(out_wr_word), .out_wr_data(out_wr_data),
    .out_head_done(out_head_done), .out_head_img(out_head_img));

  always #5 clk = ~clk;

  always_comb begin
    for (int t = 0; t < SEQ; t++) x_rd_data[t] = X[x_rd_img][t][x_rd_k];
    for (int l = 0; l < ACOLS; l++) begin
      wq_rd_data[l] = WQ[w_rd_k][int'(w_rd_head) * HD + int'(w_rd_tile) * ACOLS + l];
      wk_rd_data[l] = WK[w_rd_k][int'(w_rd_head) * HD + int'(w_rd_tile) * ACOLS + l];
      wv_rd_data[l] = WV[w_rd_k][int'(w_rd_head) * HD + int'(w_rd_tile) * ACOLS + l];
    end
  end

  always @(posedge clk) begin
    if (rst_n && out_wr_en) begin
      for (int l = 0; l < ACOLS; l++) begin
        O[out_wr_img][out_wr_row][int'(out_wr_word) * ACOLS + l] <= out_wr_data[l];
        nwr[out_wr_img][out_wr_row][int'(out_wr_word) * ACOLS + l] <=
          nwr[out_wr_img][out_wr_row][int'(out_wr_word) * ACOLS + l] + 1;
      end
    end
    if (rst_n && out_head_done) nhead[out_head_img] <= nhead[out_head_img] + 1;
  end

  // mechanism counters: several tasks in flight, all five stages working
  always @(posedge clk) begin
    automatic int n = 0;
    for (int s = 0; s < 5; s++) if (dut.st_start[s]) n++;
    if (n > 1) cnt_overlap++;
    if (n == 5) cnt_full++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_image(input int img);
    real q [SEQ][HD];
    real k [SEQ][HD];
    real v [SEQ][HD];
    real sc [SEQ][SEQ];
    real mx, sum, o;
    for (int h = 0; h < HEADS; h++) begin
      for (int t = 0; t < SEQ; t++)
        for (int c = 0; c < HD; c++) begin
          q[t][c] = 0.0; k[t][c] = 0.0; v[t][c] = 0.0;
          for (int d = 0; d < HIDDEN; d++) begin
            q[t][c] += f2r(X[img][t][d]) * f2r(WQ[d][h * HD + c]);
            k[t][c] += f2r(X[img][t][d]) * f2r(WK[d][h * HD + c]);
            v[t][c] += f2r(X[img][t][d]) * f2r(WV[d][h * HD + c]);
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
          checks++;
          if (!close(O[img][i][h * HD + c], o, 1e-3, 1e-5) || nwr[img][i][h * HD + c] != 1) begin
            failures++;
            if (failures < 10)
              $display("FAIL img %0d head %0d out[%0d][%0d] got %f exp %f writes %0d",
                       img, h, i, c, f2r(O[img][i][h * HD + c]), o, nwr[img][i][h * HD + c]);
          end
        end
    end
    checks++;
    if (nhead[img] != HEADS) begin
      failures++;
      $display("FAIL image %0d reported %0d heads", img, nhead[img]);
    end
  endtask

  initial begin
    for (int i = 0; i < IMG_SLOTS; i++) begin
      nhead[i] = 0;
      for (int t = 0; t < SEQ; t++)
        for (int d = 0; d < HIDDEN; d++) begin
          X[i][t][d] = r2f(urand(-1.0, 1.0));
          nwr[i][t][d] = 0;
        end
    end
    for (int a = 0; a < HIDDEN; a++)
      for (int b = 0; b < HIDDEN; b++) begin
        WQ[a][b] = r2f(urand(-0.6, 0.6));
        WK[a][b] = r2f(urand(-0.6, 0.6));
        WV[a][b] = r2f(urand(-0.6, 0.6));
      end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    num_images = 2'd2;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    @(negedge clk);
    for (int i = 0; i < 2; i++) check_image(i);
    checks++;
    if (cnt_overlap == 0) begin
      failures++;
      $display("FAIL no step with several tasks in flight");
    end
    checks++;
    if (cnt_full == 0) begin
      failures++;
      $display("FAIL no step with all five stages busy");
    end
    $display("steps with overlapping tasks: %0d, with all stages busy: %0d", cnt_overlap, cnt_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
