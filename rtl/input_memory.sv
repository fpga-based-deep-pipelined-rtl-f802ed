// input_memory: on-chip store of the input images (token embeddings X).
//
// Holds IMG_SLOTS images of SEQ tokens x HIDDEN features in single
// precision, loaded from external memory and then reused by all heads.
// Word (img, k) holds feature k of every token, X[0..SEQ-1][k], which is
// the column the projection arrays consume per cycle. The load port writes
// one word per cycle; the read port is combinational.
// Keeping a portion of the images on chip for all heads is the design's; the
// number of resident images and the column-word layout are this design's own.
module input_memory
  import fp32_pkg::*;
#(
  parameter int unsigned SEQ       = vit_pkg::SEQ_LEN,
  parameter int unsigned HIDDEN    = vit_pkg::HIDDEN,
  parameter int unsigned IMG_SLOTS = vit_pkg::IMG_SLOTS,
  localparam int unsigned IW       = (IMG_SLOTS > 1) ? $clog2(IMG_SLOTS) : 1,
  localparam int unsigned KW       = $clog2(HIDDEN)
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [IW-1:0] wr_img,
  input  logic [KW-1:0] wr_k,
  input  fp32_t         wr_data [SEQ],
  input  logic [IW-1:0] rd_img,
  input  logic [KW-1:0] rd_k,
  output fp32_t         rd_data [SEQ]
);
  localparam int unsigned DEPTH = IMG_SLOTS * HIDDEN;
  localparam int unsigned AW    = $clog2(DEPTH);

  fp32_t [SEQ-1:0] mem [DEPTH];
  fp32_t [SEQ-1:0] wr_word, rd_word;
  logic  [AW-1:0]  wr_addr, rd_addr;

  assign wr_addr = AW'(wr_img) * AW'(HIDDEN) + AW'(wr_k);
  assign rd_addr = AW'(rd_img) * AW'(HIDDEN) + AW'(rd_k);

  always_comb begin
    for (int t = 0; t < SEQ; t++) wr_word[t] = wr_data[t];
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_word;
  end

  assign rd_word = mem[rd_addr];
  always_comb begin
    for (int t = 0; t < SEQ; t++) rd_data[t] = rd_word[t];
  end
endmodule
