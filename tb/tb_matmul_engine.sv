// tb_matmul_engine: self-checking test of the tiled matrix-multiply engine.
// The testbench plays the two operand buffers (combinational answers to the
// engine's a_k / b_k / b_tile addresses) and a result buffer that records
// every row write. After a start pulse it checks every element of
// C = A x B against a double-precision reference, that each result element
// was written exactly once, and that 'done' arrives exactly
// NTILE * (1 + KLEN + (N + M - 1) + N) cycles after the edge that samples
// start (counted here including the start cycle). Two products run back to
// back.
module tb_matmul_engine;
  import fp32_pkg::*;
  import tb_fp_pkg::*;
  localparam int N = 4, M = 3, KLEN = 9, NTILE = 3;
  localparam int CYCLES = NTILE * (1 + KLEN + (N + M - 1) + N);

  logic  clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic  busy, done, wr_en;
  logic [3:0] a_k, b_k;
  logic [1:0] b_tile, wr_tile;
  logic [1:0] wr_row;
  fp32_t a_col [N];
  fp32_t b_row [M];
  fp32_t wr_data [M];
  fp32_t A [N][KLEN];
  fp32_t B [KLEN][M*NTILE];
  fp32_t C [N][M*NTILE];
  int    nwr [N][M*NTILE];
  int    checks = 0, failures = 0;

  matmul_engine #(.N(N), .M(M), .KLEN(KLEN), .NTILE(NTILE)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .busy(busy), .done(done),
    .a_k(a_k), .a_col(a_col), .b_k(b_k), .b_tile(b_tile), .b_row(b_row),
    .wr_en(wr_en), .wr_row(wr_row), .wr_tile(wr_tile), .wr_data(wr_data));

  always #5 clk = ~clk;

  always_comb begin
    for (int i = 0; i < N; i++) a_col[i] = (int'(a_k) < KLEN) ? A[i][a_k] : '0;
    for (int j = 0; j < M; j++)
      b_row[j] = (int'(b_k) < KLEN && int'(b_tile) < NTILE) ? B[b_k][int'(b_tile) * M + j] : '0;
  end

  always @(posedge clk) begin
    if (wr_en) begin
      for (int j = 0; j < M; j++) begin
        C[wr_row][int'(wr_tile) * M + j] <= wr_data[j];
        nwr[wr_row][int'(wr_tile) * M + j] <= nwr[wr_row][int'(wr_tile) * M + j] + 1;
      end
    end
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int rep);
    int cyc;
    real s;
    for (int i = 0; i < N; i++) for (int k = 0; k < KLEN; k++) A[i][k] = r2f(urand(-1.0, 1.0));
    for (int k = 0; k < KLEN; k++) for (int j = 0; j < M * NTILE; j++) B[k][j] = r2f(urand(-1.0, 1.0));
    for (int i = 0; i < N; i++) for (int j = 0; j < M * NTILE; j++) nwr[i][j] = 0;
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
    if (cyc != CYCLES + 1) begin
      failures++;
      $display("FAIL rep %0d took %0d cycles, expected %0d", rep, cyc, CYCLES + 1);
    end
    @(negedge clk);
    checks++;
    if (busy) failures++;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < M * NTILE; j++) begin
        s = 0.0;
        for (int k = 0; k < KLEN; k++) s += f2r(A[i][k]) * f2r(B[k][j]);
        checks++;
        if (!close(C[i][j], s, 1e-5, 1e-6) || nwr[i][j] != 1) begin
          failures++;
          $display("FAIL rep %0d C[%0d][%0d] got %f exp %f writes %0d", rep, i, j, f2r(C[i][j]), s, nwr[i][j]);
        end
      end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(0);
    run(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
