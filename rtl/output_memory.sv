// output_memory: on-chip store of the attention outputs of all heads.
//
// Each head produces a SEQ x HEAD_DIM result; this memory places head h of
// image i in columns h*HEAD_DIM .. of a SEQ x HIDDEN matrix per image slot,
// which is the concatenation of the heads. The write port takes one word of
// W elements (row, word index in the row). 'head_done' marks one more head of
// image 'head_img' as complete; once all HEADS are in, ready[img] rises and
// stays until 'clear' (the start of the next run), telling the host that the
// image may be copied back to external memory. Reads are combinational.
// Concatenating all heads on chip before copying out is the design's; the
// ready flags and the word layout are this design's own.
module output_memory
  import fp32_pkg::*;
#(
  parameter int unsigned SEQ       = vit_pkg::SEQ_LEN,
  parameter int unsigned HIDDEN    = vit_pkg::HIDDEN,
  parameter int unsigned HEADS     = vit_pkg::NUM_HEADS,
  parameter int unsigned W         = vit_pkg::ARRAY_COLS,
  parameter int unsigned IMG_SLOTS = vit_pkg::IMG_SLOTS,
  localparam int unsigned WPR      = HIDDEN / W,
  localparam int unsigned IW       = (IMG_SLOTS > 1) ? $clog2(IMG_SLOTS) : 1,
  localparam int unsigned RW       = (SEQ > 1) ? $clog2(SEQ) : 1,
  localparam int unsigned WW       = (WPR > 1) ? $clog2(WPR) : 1,
  localparam int unsigned HCW      = $clog2(HEADS + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clear,
  input  logic           wr_en,
  input  logic [IW-1:0]  wr_img,
  input  logic [RW-1:0]  wr_row,
  input  logic [WW-1:0]  wr_word,
  input  fp32_t          wr_data [W],
  input  logic           head_done,
  input  logic [IW-1:0]  head_img,
  output logic           ready [IMG_SLOTS],
  input  logic [IW-1:0]  rd_img,
  input  logic [RW-1:0]  rd_row,
  input  logic [WW-1:0]  rd_word,
  output fp32_t          rd_data [W]
);
  localparam int unsigned DEPTH = IMG_SLOTS * SEQ * WPR;
  localparam int unsigned AW    = $clog2(DEPTH);

  fp32_t [W-1:0]  mem [DEPTH];
  fp32_t [W-1:0]  wr_vec, rd_vec;
  logic  [AW-1:0] wr_addr, rd_addr;
  logic [HCW-1:0] heads_in [IMG_SLOTS];

  assign wr_addr = (AW'(wr_img) * AW'(SEQ) + AW'(wr_row)) * AW'(WPR) + AW'(wr_word);
  assign rd_addr = (AW'(rd_img) * AW'(SEQ) + AW'(rd_row)) * AW'(WPR) + AW'(rd_word);

  always_comb begin
    for (int l = 0; l < W; l++) wr_vec[l] = wr_data[l];
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_vec;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < IMG_SLOTS; i++) heads_in[i] <= '0;
    end else if (clear) begin
      for (int i = 0; i < IMG_SLOTS; i++) heads_in[i] <= '0;
    end else if (head_done && heads_in[head_img] != HCW'(HEADS)) begin
      heads_in[head_img] <= heads_in[head_img] + 1'b1;
    end
  end

  assign rd_vec = mem[rd_addr];
  always_comb begin
    for (int i = 0; i < IMG_SLOTS; i++) ready[i] = (heads_in[i] == HCW'(HEADS));
    for (int l = 0; l < W; l++) rd_data[l] = rd_vec[l];
  end
endmodule
