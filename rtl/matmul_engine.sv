// matmul_engine: one matrix-multiply block of the attention pipeline.
//
// Computes C = A x B for A of N x KLEN and B of KLEN x (M*NTILE), one
// N x M column tile of C at a time, on an N x M systolic_array. A pulse on
// 'start' runs all NTILE tiles; 'done' pulses for one cycle after the last
// row of the last tile has been written, and 'busy' is high in between.
// Per tile: one cycle clears the accumulators, KLEN cycles stream operands
// (the engine drives a_k / b_k / b_tile and expects a_col = A[*][a_k] and
// b_row = B[b_k][b_tile*M +: M] in the same cycle, i.e. buffers with
// combinational read), N + M - 1 cycles let the array drain, and N cycles
// write the tile out one row per cycle (wr_row, wr_tile, wr_data).
// A tile thus takes 1 + KLEN + (N + M - 1) + N cycles; done is high in the
// cycle after the last tile has ended.
// The design uses a systolic array for every matrix product; tiling the
// product over column blocks and the write-out order are this design's own.
module matmul_engine
  import fp32_pkg::*;
#(
  parameter int unsigned N     = vit_pkg::SEQ_LEN,
  parameter int unsigned M     = vit_pkg::ARRAY_COLS,
  parameter int unsigned KLEN  = vit_pkg::HIDDEN,
  parameter int unsigned NTILE = vit_pkg::HEAD_DIM / vit_pkg::ARRAY_COLS,
  localparam int unsigned KW   = (KLEN > 1)  ? $clog2(KLEN)  : 1,
  localparam int unsigned TW   = (NTILE > 1) ? $clog2(NTILE) : 1,
  localparam int unsigned RW   = (N > 1)     ? $clog2(N)     : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  // left operand, one column per cycle
  output logic [KW-1:0] a_k,
  input  fp32_t         a_col [N],
  // right operand, one row segment per cycle
  output logic [KW-1:0] b_k,
  output logic [TW-1:0] b_tile,
  input  fp32_t         b_row [M],
  // result, one row of a tile per cycle
  output logic          wr_en,
  output logic [RW-1:0] wr_row,
  output logic [TW-1:0] wr_tile,
  output fp32_t         wr_data [M]
);
  localparam int unsigned DRAIN = N + M - 1;
  localparam int unsigned CW    = $clog2(((KLEN > DRAIN) ? KLEN : DRAIN) + 1);

  typedef enum logic [2:0] {S_IDLE, S_CLEAR, S_FEED, S_DRAIN, S_WRITE} state_t;
  state_t state;

  logic [CW-1:0] cnt;
  logic [TW-1:0] tile;
  fp32_t         c [N][M];

  systolic_array #(.N(N), .M(M)) u_array (
    .clk     (clk),
    .rst_n   (rst_n),
    .clear   (state == S_CLEAR),
    .in_valid(state == S_FEED),
    .a_col   (a_col),
    .b_row   (b_row),
    .c_out   (c)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
      tile  <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_CLEAR;
          tile  <= '0;
        end
        S_CLEAR: begin
          state <= S_FEED;
          cnt   <= '0;
        end
        S_FEED: begin
          if (cnt == CW'(KLEN - 1)) begin
            state <= S_DRAIN;
            cnt   <= '0;
          end else cnt <= cnt + 1'b1;
        end
        S_DRAIN: begin
          if (cnt == CW'(DRAIN - 1)) begin
            state <= S_WRITE;
            cnt   <= '0;
          end else cnt <= cnt + 1'b1;
        end
        S_WRITE: begin
          if (cnt == CW'(N - 1)) begin
            cnt <= '0;
            if (tile == TW'(NTILE - 1)) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              tile  <= tile + 1'b1;
              state <= S_CLEAR;
            end
          end else cnt <= cnt + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy    = (state != S_IDLE);
  assign a_k     = KW'(cnt);
  assign b_k     = KW'(cnt);
  assign b_tile  = tile;
  assign wr_en   = (state == S_WRITE);
  assign wr_row  = RW'(cnt);
  assign wr_tile = tile;
  always_comb begin
    for (int j = 0; j < M; j++) wr_data[j] = c[RW'(cnt)][j];
  end

  a_no_restart: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("matmul_engine: start while busy");
endmodule
