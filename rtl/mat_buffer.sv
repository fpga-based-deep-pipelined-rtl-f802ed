// mat_buffer: inter-stage buffer ("Buf") of the attention pipeline.
//
// Holds one ROWS x (NW*W) single-precision matrix per slot. Row r is a bank
// of NW words of W elements. One port writes a whole word of one row; two
// combinational read ports return either a word of one row (rr_*) or one
// element of every row at the same word and lane, i.e. a column of the
// matrix (rc_*). Each row bank is a separate memory of whole words, so a
// column read is one access to every bank. A chain of DEPTH buffers between stages is folded into
// DEPTH+1 rotating slots: the producing stage writes slot 'wslot', the
// consuming stage reads the slot written DEPTH pipeline steps earlier, and
// a pulse on 'advance' (one per pipeline step) moves every slot one step on.
// Timing: writes take effect at the clock edge, reads are combinational,
// 'advance' takes effect at the clock edge.
// Buffers between stages, and V and Q passing through several of them, are
// the design's; the banked organisation and the slot rotation are this
// design's own.
module mat_buffer
  import fp32_pkg::*;
#(
  parameter int unsigned ROWS  = vit_pkg::SEQ_LEN,
  parameter int unsigned W     = vit_pkg::ARRAY_COLS,
  parameter int unsigned NW    = vit_pkg::HEAD_DIM / vit_pkg::ARRAY_COLS,
  parameter int unsigned DEPTH = 1,
  localparam int unsigned RW   = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned AW   = (NW > 1)   ? $clog2(NW)   : 1,
  localparam int unsigned LW   = (W > 1)    ? $clog2(W)    : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          advance,
  // write one word of one row into the producer's slot
  input  logic          wr_en,
  input  logic [RW-1:0] wr_row,
  input  logic [AW-1:0] wr_word,
  input  fp32_t         wr_data [W],
  // read one word of one row from the consumer's slot
  input  logic [RW-1:0] rr_row,
  input  logic [AW-1:0] rr_word,
  output fp32_t         rr_data [W],
  // read one column (same word and lane of every row) from the consumer's slot
  input  logic [AW-1:0] rc_word,
  input  logic [LW-1:0] rc_lane,
  output fp32_t         rc_data [ROWS]
);
  localparam int unsigned NSLOT = DEPTH + 1;
  localparam int unsigned SW    = $clog2(NSLOT);

  localparam int unsigned BD = NSLOT * NW;   // words per row bank
  localparam int unsigned BW = $clog2(BD);

  // one memory per row bank; word (slot, word) of bank r is mem[r][slot*NW + word]
  fp32_t [W-1:0] mem [ROWS][BD];
  fp32_t [W-1:0] wr_vec, rr_vec;
  fp32_t [W-1:0] rc_vec [ROWS];
  logic [SW-1:0] wslot, rslot;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wslot <= '0;
    else if (advance) wslot <= (wslot == SW'(NSLOT - 1)) ? '0 : wslot + 1'b1;
  end
  // the slot written DEPTH steps ago is the one after the write slot
  assign rslot = (wslot == SW'(NSLOT - 1)) ? '0 : wslot + 1'b1;

  always_comb begin
    for (int l = 0; l < W; l++) wr_vec[l] = wr_data[l];
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_bank
    always_ff @(posedge clk) begin
      if (wr_en && wr_row == RW'(r)) mem[r][BW'(wslot) * BW'(NW) + BW'(wr_word)] <= wr_vec;
    end
    assign rc_vec[r] = mem[r][BW'(rslot) * BW'(NW) + BW'(rc_word)];
  end

  assign rr_vec = mem[rr_row][BW'(rslot) * BW'(NW) + BW'(rr_word)];
  always_comb begin
    for (int l = 0; l < W; l++) rr_data[l] = rr_vec[l];
    for (int r = 0; r < ROWS; r++) rc_data[r] = rc_vec[r][rc_lane];
  end
endmodule
