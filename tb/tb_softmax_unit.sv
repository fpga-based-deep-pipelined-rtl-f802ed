// tb_softmax_unit: self-checking test of the row-wise scaled softmax.
// The testbench plays the score buffer (combinational row reads) and records
// the row writes. Scores are random in [-40, 40], plus one row of equal
// values and one with a dominant element. Every output is compared with a
// double-precision softmax of SCALE * score (tolerance 1e-4 relative plus
// 1e-7 absolute), each row must sum to 1 within 1e-4, each row must be
// written once, and 'done' must come L * (3L + 1) + 1 cycles after start
// (counting the start cycle).
module tb_softmax_unit;
  import fp32_pkg::*;
  import tb_fp_pkg::*;
  localparam int L = 8;
  localparam fp32_t SCALE = 32'h3E00_0000;   // 0.125

  logic  clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic  busy, done, we;
  logic [2:0] rd_row, wr_row;
  fp32_t rd_data [L];
  fp32_t wr_data [L];
  fp32_t X [L][L];
  fp32_t S [L][L];
  int    nwr [L];
  int    checks = 0, failures = 0;

  softmax_unit #(.L(L), .SCALE(SCALE)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .busy(busy), .done(done),
    .rd_row(rd_row), .rd_data(rd_data), .wr_en(we), .wr_row(wr_row), .wr_data(wr_data));

  always #5 clk = ~clk;

  always_comb begin
    for (int j = 0; j < L; j++) rd_data[j] = X[rd_row][j];
  end

  always @(posedge clk) begin
    if (we) begin
      for (int j = 0; j < L; j++) S[wr_row][j] <= wr_data[j];
      nwr[wr_row] <= nwr[wr_row] + 1;
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int  cyc;
    real mx, sum, e, rowsum;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 3; rep++) begin
      for (int i = 0; i < L; i++) begin
        nwr[i] = 0;
        for (int j = 0; j < L; j++) X[i][j] = r2f(urand(-40.0, 40.0));
      end
      for (int j = 0; j < L; j++) X[1][j] = r2f(3.0);
      X[2][3] = r2f(900.0);
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
      if (cyc != L * (3 * L + 1) + 1) begin
        failures++;
        $display("FAIL took %0d cycles", cyc);
      end
      @(negedge clk);
      for (int i = 0; i < L; i++) begin
        mx = -1.0e30;
        for (int j = 0; j < L; j++) if (0.125 * f2r(X[i][j]) > mx) mx = 0.125 * f2r(X[i][j]);
        sum = 0.0;
        for (int j = 0; j < L; j++) sum += $exp(0.125 * f2r(X[i][j]) - mx);
        rowsum = 0.0;
        for (int j = 0; j < L; j++) begin
          e = $exp(0.125 * f2r(X[i][j]) - mx) / sum;
          rowsum += f2r(S[i][j]);
          checks++;
          if (!close(S[i][j], e, 1e-4, 1e-7)) begin
            failures++;
            $display("FAIL S[%0d][%0d] got %g exp %g", i, j, f2r(S[i][j]), e);
          end
        end
        checks++;
        if (rowsum < 0.9999 || rowsum > 1.0001 || nwr[i] != 1) begin
          failures++;
          $display("FAIL row %0d sum %f writes %0d", i, rowsum, nwr[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
