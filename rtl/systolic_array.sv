// systolic_array: N x M grid of sa_pe computing C = A x B.
//
// In each input cycle the caller presents one column of A (a_col[i] = A[i][k])
// with in_valid, and the matching row of B (b_row[j] = B[k][j]). Row i of the
// grid is fed through i skew registers and column j through j, so PE(i,j)
// meets A[i][k] and B[k][j] in the same cycle and accumulates the dot product
// of row i of A with column j of B. PE(i,j) accumulates its last pair at
// the i + j-th clock edge after the edge that samples the last input, so all
// of C is valid in c_out N + M - 2 cycles after that edge. 'clear' zeroes every
// accumulator and must not coincide with products still in flight.
// The grid of PEs with row data entering from the left and column data from
// the top is the design's; the skew registers are this design's choice.
module systolic_array
  import fp32_pkg::*;
#(
  parameter int unsigned N = vit_pkg::SEQ_LEN,
  parameter int unsigned M = vit_pkg::ARRAY_COLS
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  logic  in_valid,
  input  fp32_t a_col [N],
  input  fp32_t b_row [M],
  output fp32_t c_out [N][M]
);

  fp32_t a_skew [N][N];   // a_skew[i][d]: row i delayed by d+1 cycles
  logic  v_skew [N][N];
  fp32_t b_skew [M][M];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++)
        for (int d = 0; d < N; d++) begin
          a_skew[i][d] <= FP_ZERO;
          v_skew[i][d] <= 1'b0;
        end
      for (int j = 0; j < M; j++)
        for (int d = 0; d < M; d++) b_skew[j][d] <= FP_ZERO;
    end else begin
      for (int i = 0; i < N; i++) begin
        a_skew[i][0] <= a_col[i];
        v_skew[i][0] <= in_valid;
        for (int d = 1; d < N; d++) begin
          a_skew[i][d] <= a_skew[i][d-1];
          v_skew[i][d] <= v_skew[i][d-1];
        end
      end
      for (int j = 0; j < M; j++) begin
        b_skew[j][0] <= b_row[j];
        for (int d = 1; d < M; d++) b_skew[j][d] <= b_skew[j][d-1];
      end
    end
  end

  // horizontal and vertical links between PEs
  fp32_t a_h [N][M+1];
  logic  v_h [N][M+1];
  fp32_t b_v [N+1][M];

  for (genvar i = 0; i < N; i++) begin : g_row_in
    if (i == 0) begin : g_direct
      assign a_h[i][0] = a_col[i];
      assign v_h[i][0] = in_valid;
    end else begin : g_skewed
      assign a_h[i][0] = a_skew[i][i-1];
      assign v_h[i][0] = v_skew[i][i-1];
    end
  end
  for (genvar j = 0; j < M; j++) begin : g_col_in
    if (j == 0) begin : g_direct
      assign b_v[0][j] = b_row[j];
    end else begin : g_skewed
      assign b_v[0][j] = b_skew[j][j-1];
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_r
    for (genvar j = 0; j < M; j++) begin : g_c
      sa_pe u_pe (
        .clk        (clk),
        .rst_n      (rst_n),
        .clear      (clear),
        .a_valid_in (v_h[i][j]),
        .a_in       (a_h[i][j]),
        .b_in       (b_v[i][j]),
        .a_valid_out(v_h[i][j+1]),
        .a_out      (a_h[i][j+1]),
        .b_out      (b_v[i+1][j]),
        .acc        (c_out[i][j])
      );
    end
  end
endmodule
