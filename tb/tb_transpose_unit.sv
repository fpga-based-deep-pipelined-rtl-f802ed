// tb_transpose_unit: self-checking test of the K -> K^T stage.
// The testbench holds a random R x C matrix K and answers the unit's column
// reads (word, lane) combinationally, like the row-banked K buffer. It
// records the unit's row writes and checks that row c of the result equals
// column c of K for every c, that each row is written once, and that 'done'
// comes C + 1 cycles after the start edge. Run twice.
module tb_transpose_unit;
  import fp32_pkg::*;
  localparam int R = 4, C = 8, W = 4;

  logic  clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic  busy, done, we;
  logic  src_word;
  logic [1:0] src_lane;
  logic [2:0] dst_row;
  fp32_t src_col [R];
  fp32_t dst_data [R];
  fp32_t K [R][C];
  fp32_t KT [C][R];
  int    nwr [C];
  int    checks = 0, failures = 0;

  transpose_unit #(.R(R), .C(C), .W(W)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .busy(busy), .done(done),
    .src_word(src_word), .src_lane(src_lane), .src_col(src_col),
    .dst_wr_en(we), .dst_row(dst_row), .dst_data(dst_data));

  always #5 clk = ~clk;

  always_comb begin
    for (int r = 0; r < R; r++) src_col[r] = K[r][int'(src_word) * W + int'(src_lane)];
  end

  always @(posedge clk) begin
    if (we) begin
      for (int r = 0; r < R; r++) KT[dst_row][r] <= dst_data[r];
      nwr[dst_row] <= nwr[dst_row] + 1;
    end
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 2; rep++) begin
      for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) K[r][c] = $urandom;
      for (int c = 0; c < C; c++) nwr[c] = 0;
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cyc = 1;
      while (!done) begin
        @(negedge clk);
        cyc++;
      end
      checks++;
      if (cyc != C + 1) begin
        failures++;
        $display("FAIL took %0d cycles", cyc);
      end
      repeat (2) @(negedge clk);
      checks++;
      if (busy) failures++;
      for (int c = 0; c < C; c++)
        for (int r = 0; r < R; r++) begin
          checks++;
          if (KT[c][r] != K[r][c] || nwr[c] != 1) begin
            failures++;
            $display("FAIL KT[%0d][%0d]", c, r);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
