// transpose_unit: the key-transposition stage (K -> K^T).
//
// The key projection leaves K (R tokens x C features) in a row-banked
// buffer: row r holds token r. The Q x K^T array reads its right operand one
// row of K^T per cycle, i.e. one feature of every token, from a buffer whose
// row c holds row c of K^T. After a 'start' pulse this unit walks c = 0..C-1,
// reads column c of K through the source buffer's column port (word c / W,
// lane c % W) and writes it, one cycle later, as row c of the destination
// buffer. It takes C + 1 cycles; 'done' pulses once with the last write.
// The transposition stage between the K buffer and the K^T buffer is the
// design's; the column-gather implementation is this design's own.
module transpose_unit
  import fp32_pkg::*;
#(
  parameter int unsigned R  = vit_pkg::SEQ_LEN,
  parameter int unsigned C  = vit_pkg::HEAD_DIM,
  parameter int unsigned W  = vit_pkg::ARRAY_COLS,
  localparam int unsigned NW = C / W,
  localparam int unsigned AW = (NW > 1) ? $clog2(NW) : 1,
  localparam int unsigned LW = (W > 1)  ? $clog2(W)  : 1,
  localparam int unsigned CW = (C > 1)  ? $clog2(C)  : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  // column read port of the K buffer
  output logic [AW-1:0] src_word,
  output logic [LW-1:0] src_lane,
  input  fp32_t         src_col [R],
  // row write port of the K^T buffer
  output logic          dst_wr_en,
  output logic [CW-1:0] dst_row,
  output fp32_t         dst_data [R]
);
  logic [CW-1:0] c;
  logic          reading;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reading   <= 1'b0;
      c         <= '0;
      dst_wr_en <= 1'b0;
      dst_row   <= '0;
      done      <= 1'b0;
      for (int r = 0; r < R; r++) dst_data[r] <= FP_ZERO;
    end else begin
      done      <= 1'b0;
      dst_wr_en <= reading;
      if (reading) begin
        dst_row <= c;
        for (int r = 0; r < R; r++) dst_data[r] <= src_col[r];
        if (c == CW'(C - 1)) begin
          reading <= 1'b0;
          done    <= 1'b1;
        end
        c <= c + 1'b1;
      end else if (start) begin
        reading <= 1'b1;
        c       <= '0;
      end
    end
  end

  assign busy     = reading || dst_wr_en;
  assign src_word = AW'(c / CW'(W));
  assign src_lane = LW'(c % CW'(W));
endmodule
