// weight_memory: on-chip copy of one projection weight matrix (W_Q, W_K or W_V).
//
// Holds the full HIDDEN x HIDDEN single-precision matrix, the columns of all
// heads side by side (head h owns columns h*HEAD_DIM .. h*HEAD_DIM+HEAD_DIM-1),
// so it is loaded once from external memory and shared by every image of a
// batch. Storage is in words of W consecutive elements of one row: word
// k*(HIDDEN/W) + c holds W[k][c*W +: W]. The load port writes one word per
// cycle at a flat word address. The read port is combinational and returns
// W[k][head*HEAD_DIM + tile*W +: W], the row segment one projection array
// needs in one cycle.
// Keeping the weights on chip is the design's; the word layout is this
// design's own.
module weight_memory
  import fp32_pkg::*;
#(
  parameter int unsigned HIDDEN   = vit_pkg::HIDDEN,
  parameter int unsigned HEADS    = vit_pkg::NUM_HEADS,
  parameter int unsigned W        = vit_pkg::ARRAY_COLS,
  localparam int unsigned HD      = HIDDEN / HEADS,
  localparam int unsigned WPR     = HIDDEN / W,            // words per row
  localparam int unsigned NTILE   = HD / W,
  localparam int unsigned DEPTH   = HIDDEN * WPR,
  localparam int unsigned AW      = $clog2(DEPTH),
  localparam int unsigned KW      = $clog2(HIDDEN),
  localparam int unsigned HW      = (HEADS > 1) ? $clog2(HEADS) : 1,
  localparam int unsigned TW      = (NTILE > 1) ? $clog2(NTILE) : 1
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  fp32_t         wr_data [W],
  input  logic [KW-1:0] rd_k,
  input  logic [HW-1:0] rd_head,
  input  logic [TW-1:0] rd_tile,
  output fp32_t         rd_data [W]
);
  fp32_t [W-1:0] mem [DEPTH];
  fp32_t [W-1:0] wr_word, rd_word;
  logic [AW-1:0] rd_addr;

  always_comb begin
    for (int l = 0; l < W; l++) wr_word[l] = wr_data[l];
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_word;
  end

  assign rd_addr = AW'(rd_k) * AW'(WPR) + AW'(rd_head) * AW'(NTILE) + AW'(rd_tile);
  assign rd_word = mem[rd_addr];
  always_comb begin
    for (int l = 0; l < W; l++) rd_data[l] = rd_word[l];
  end
endmodule
