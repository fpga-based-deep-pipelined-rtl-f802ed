// tb_systolic_array: self-checking test of the N x M systolic array.
// Streams random A (N x K) columns and B (K x M) rows, waits the array's
// drain latency of N + M - 1 cycles and compares every element of C with a
// double-precision reference (relative tolerance 1e-5). Checks that C is not
// yet complete one cycle before the latency has passed, then runs a second
// product after 'clear' to check that the accumulators restart from zero.
module tb_systolic_array;
  import fp32_pkg::*;
  import tb_fp_pkg::*;
  localparam int N = 4, M = 3, K = 7;

  logic  clk = 1'b0, rst_n = 1'b0, clear = 1'b0, in_valid = 1'b0;
  fp32_t a_col [N];
  fp32_t b_row [M];
  fp32_t c_out [N][M];
  fp32_t A [N][K];
  fp32_t B [K][M];
  int    checks = 0, failures = 0;

  systolic_array #(.N(N), .M(M)) dut (.clk(clk), .rst_n(rst_n), .clear(clear),
    .in_valid(in_valid), .a_col(a_col), .b_row(b_row), .c_out(c_out));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real ref_c(int i, int j);
    real s = 0.0;
    for (int k = 0; k < K; k++) s += f2r(A[i][k]) * f2r(B[k][j]);
    return s;
  endfunction

  task automatic run_product(input int rep);
    for (int i = 0; i < N; i++) for (int k = 0; k < K; k++) A[i][k] = r2f(urand(-2.0, 2.0));
    for (int k = 0; k < K; k++) for (int j = 0; j < M; j++) B[k][j] = r2f(urand(-2.0, 2.0));
    @(negedge clk);
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    for (int k = 0; k < K; k++) begin
      in_valid = 1'b1;
      for (int i = 0; i < N; i++) a_col[i] = A[i][k];
      for (int j = 0; j < M; j++) b_row[j] = B[k][j];
      @(negedge clk);
    end
    in_valid = 1'b0;
    for (int i = 0; i < N; i++) a_col[i] = r2f(99.0);
    for (int j = 0; j < M; j++) b_row[j] = r2f(99.0);
    repeat (N + M - 3) @(negedge clk);
    // the far corner PE has not yet taken its last product
    checks++;
    if (close(c_out[N-1][M-1], ref_c(N-1, M-1), 1e-5, 1e-6)) begin
      failures++;
      $display("FAIL corner complete too early (rep %0d)", rep);
    end
    @(negedge clk);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < M; j++) begin
        checks++;
        if (!close(c_out[i][j], ref_c(i, j), 1e-5, 1e-6)) begin
          failures++;
          $display("FAIL rep %0d C[%0d][%0d] got %f exp %f", rep, i, j, f2r(c_out[i][j]), ref_c(i, j));
        end
      end
    // results hold while idle
    repeat (3) @(negedge clk);
    checks++;
    if (!close(c_out[0][0], ref_c(0, 0), 1e-5, 1e-6)) failures++;
  endtask

  initial begin
    for (int i = 0; i < N; i++) a_col[i] = '0;
    for (int j = 0; j < M; j++) b_row[j] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 5; rep++) run_product(rep);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
