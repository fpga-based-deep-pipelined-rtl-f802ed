// mha_accel: multi-head attention accelerator, top level.
//
// The host (through external memory) loads the three projection weight
// matrices of all heads and up to IMG_SLOTS input images into internal
// memory, then pulses 'start' with the number of images. The deep pipeline
// computes softmax(Q K^T / sqrt(d_K)) V for every head of every image,
// several (image, head) tasks at a time, and writes each head's result next
// to the others in the output memory. out_ready[i] rises when all heads of
// image slot i are in; 'done' pulses when the whole run is finished. The
// output memory is then read word by word for copying back.
// Load ports (one word per cycle, written at the clock edge):
//   x_wr_*  image slot, feature index k, the values of feature k of all tokens
//   w_wr_*  w_wr_sel selects W_Q (0), W_K (1) or W_V (2); word address
//           k*(HIDDEN/ACOLS) + c holds W[k][c*ACOLS +: ACOLS]
// Read port (combinational): out_rd_* image slot, token row, word c holding
//   columns c*ACOLS +: ACOLS of the concatenated SEQ x HIDDEN result.
// Memories must not be loaded while 'busy'. Memories on chip, reuse of
// images by all heads and of weights by all images follow the design; the
// port layout is this design's own.
module mha_accel
  import fp32_pkg::*;
#(
  parameter int unsigned SEQ       = vit_pkg::SEQ_LEN,
  parameter int unsigned HIDDEN    = vit_pkg::HIDDEN,
  parameter int unsigned HEADS     = vit_pkg::NUM_HEADS,
  parameter int unsigned ACOLS     = vit_pkg::ARRAY_COLS,
  parameter int unsigned IMG_SLOTS = vit_pkg::IMG_SLOTS,
  parameter fp32_t       SCALE     = vit_pkg::INV_SQRT_DK,
  localparam int unsigned HD       = HIDDEN / HEADS,
  localparam int unsigned NT       = HD / ACOLS,
  localparam int unsigned WPR      = HIDDEN / ACOLS,
  localparam int unsigned IW       = (IMG_SLOTS > 1) ? $clog2(IMG_SLOTS) : 1,
  localparam int unsigned NIW      = $clog2(IMG_SLOTS + 1),
  localparam int unsigned HW       = (HEADS > 1) ? $clog2(HEADS) : 1,
  localparam int unsigned KW       = $clog2(HIDDEN),
  localparam int unsigned TW       = (NT > 1) ? $clog2(NT) : 1,
  localparam int unsigned RW       = (SEQ > 1) ? $clog2(SEQ) : 1,
  localparam int unsigned OWW      = (WPR > 1) ? $clog2(WPR) : 1,
  localparam int unsigned WAW      = $clog2(HIDDEN * WPR)
) (
  input  logic           clk,
  input  logic           rst_n,
  // run control
  input  logic           start,
  input  logic [NIW-1:0] num_images,
  output logic           busy,
  output logic           done,
  output logic           out_ready [IMG_SLOTS],
  // image load
  input  logic           x_wr_en,
  input  logic [IW-1:0]  x_wr_img,
  input  logic [KW-1:0]  x_wr_k,
  input  fp32_t          x_wr_data [SEQ],
  // weight load
  input  logic           w_wr_en,
  input  logic [1:0]     w_wr_sel,
  input  logic [WAW-1:0] w_wr_addr,
  input  fp32_t          w_wr_data [ACOLS],
  // result readout
  input  logic [IW-1:0]  out_rd_img,
  input  logic [RW-1:0]  out_rd_row,
  input  logic [OWW-1:0] out_rd_word,
  output fp32_t          out_rd_data [ACOLS]
);
  logic [IW-1:0]  x_rd_img;
  logic [KW-1:0]  x_rd_k;
  fp32_t          x_rd_data [SEQ];
  logic [KW-1:0]  w_rd_k;
  logic [HW-1:0]  w_rd_head;
  logic [TW-1:0]  w_rd_tile;
  fp32_t          wq_rd [ACOLS];
  fp32_t          wk_rd [ACOLS];
  fp32_t          wv_rd [ACOLS];
  logic           o_we, o_hd;
  logic [IW-1:0]  o_img, o_himg;
  logic [RW-1:0]  o_row;
  logic [OWW-1:0] o_word;
  fp32_t          o_data [ACOLS];

  input_memory #(.SEQ(SEQ), .HIDDEN(HIDDEN), .IMG_SLOTS(IMG_SLOTS)) u_xmem (
    .clk(clk), .wr_en(x_wr_en), .wr_img(x_wr_img), .wr_k(x_wr_k), .wr_data(x_wr_data),
    .rd_img(x_rd_img), .rd_k(x_rd_k), .rd_data(x_rd_data));

  weight_memory #(.HIDDEN(HIDDEN), .HEADS(HEADS), .W(ACOLS)) u_wq (
    .clk(clk), .wr_en(w_wr_en && w_wr_sel == 2'd0), .wr_addr(w_wr_addr), .wr_data(w_wr_data),
    .rd_k(w_rd_k), .rd_head(w_rd_head), .rd_tile(w_rd_tile), .rd_data(wq_rd));
  weight_memory #(.HIDDEN(HIDDEN), .HEADS(HEADS), .W(ACOLS)) u_wk (
    .clk(clk), .wr_en(w_wr_en && w_wr_sel == 2'd1), .wr_addr(w_wr_addr), .wr_data(w_wr_data),
    .rd_k(w_rd_k), .rd_head(w_rd_head), .rd_tile(w_rd_tile), .rd_data(wk_rd));
  weight_memory #(.HIDDEN(HIDDEN), .HEADS(HEADS), .W(ACOLS)) u_wv (
    .clk(clk), .wr_en(w_wr_en && w_wr_sel == 2'd2), .wr_addr(w_wr_addr), .wr_data(w_wr_data),
    .rd_k(w_rd_k), .rd_head(w_rd_head), .rd_tile(w_rd_tile), .rd_data(wv_rd));

  attention_pipeline #(.SEQ(SEQ), .HIDDEN(HIDDEN), .HEADS(HEADS), .ACOLS(ACOLS),
                       .IMG_SLOTS(IMG_SLOTS), .SCALE(SCALE)) u_kernel (
    .clk(clk), .rst_n(rst_n), .start(start), .num_images(num_images),
    .busy(busy), .done(done),
    .x_rd_img(x_rd_img), .x_rd_k(x_rd_k), .x_rd_data(x_rd_data),
    .w_rd_k(w_rd_k), .w_rd_head(w_rd_head), .w_rd_tile(w_rd_tile),
    .wq_rd_data(wq_rd), .wk_rd_data(wk_rd), .wv_rd_data(wv_rd),
    .out_wr_en(o_we), .out_wr_img(o_img), .out_wr_row(o_row), .out_wr_word(o_word),
    .out_wr_data(o_data), .out_head_done(o_hd), .out_head_img(o_himg));

  output_memory #(.SEQ(SEQ), .HIDDEN(HIDDEN), .HEADS(HEADS), .W(ACOLS),
                  .IMG_SLOTS(IMG_SLOTS)) u_omem (
    .clk(clk), .rst_n(rst_n), .clear(start && !busy),
    .wr_en(o_we), .wr_img(o_img), .wr_row(o_row), .wr_word(o_word), .wr_data(o_data),
    .head_done(o_hd), .head_img(o_himg), .ready(out_ready),
    .rd_img(out_rd_img), .rd_row(out_rd_row), .rd_word(out_rd_word), .rd_data(out_rd_data));
endmodule
