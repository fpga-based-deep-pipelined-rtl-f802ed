// attention_pipeline: the deep-pipelined kernel for one attention head.
//
// Five stages, separated by buffers, work on five different (image, head)
// tasks at once:
//   0  projection   Q = X W_Q, K = X W_K, V = X W_V  (three SEQ x ACOLS
//                   systolic arrays in lock step, HEAD_DIM/ACOLS column tiles)
//   1  transpose    K -> K^T
//   2  scores       Q x K^T                          (SEQ x SEQ array)
//   3  softmax      S = softmax(Q K^T / sqrt(d_K)), row by row
//   4  context      S x V                            (SEQ x ACOLS array)
// Q is buffered for two steps and V for four, so each reaches the stage that
// needs it together with its own task. The result of stage 4 is written to
// the output memory as head 'task_head' of image 'task_img', and
// out_head_done reports each finished head. The input image and the three
// weight matrices are read through combinational ports of the internal
// memories; the three projection arrays share one address, so one read of
// X serves all three.
// Timing: a pipeline step lasts as long as the slowest stage, the
// projection, at 1 + HIDDEN + (SEQ + ACOLS - 1) + SEQ cycles per tile times
// HEAD_DIM/ACOLS tiles, plus 3 cycles of control; a run of n images takes
// n*HEADS + 4 steps. The stage split, the buffer chain and the systolic
// matrix products are the design's; array sizes and tiling are this design's
// own.
module attention_pipeline
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
  localparam int unsigned OWW      = (WPR > 1) ? $clog2(WPR) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [NIW-1:0] num_images,
  output logic           busy,
  output logic           done,
  // input image memory
  output logic [IW-1:0]  x_rd_img,
  output logic [KW-1:0]  x_rd_k,
  input  fp32_t          x_rd_data [SEQ],
  // weight memories (one shared address)
  output logic [KW-1:0]  w_rd_k,
  output logic [HW-1:0]  w_rd_head,
  output logic [TW-1:0]  w_rd_tile,
  input  fp32_t          wq_rd_data [ACOLS],
  input  fp32_t          wk_rd_data [ACOLS],
  input  fp32_t          wv_rd_data [ACOLS],
  // output memory
  output logic           out_wr_en,
  output logic [IW-1:0]  out_wr_img,
  output logic [RW-1:0]  out_wr_row,
  output logic [OWW-1:0] out_wr_word,
  output fp32_t          out_wr_data [ACOLS],
  output logic           out_head_done,
  output logic [IW-1:0]  out_head_img
);
  localparam int unsigned NSTAGE = 5;
  localparam int unsigned HDW    = $clog2(HD);
  localparam int unsigned LW     = $clog2(ACOLS);

  // ---------------- pipeline control ----------------
  logic          advance;
  logic          st_start [NSTAGE];
  logic          st_done  [NSTAGE];
  logic          tk_valid [NSTAGE];
  logic [IW-1:0] tk_img   [NSTAGE];
  logic [HW-1:0] tk_head  [NSTAGE];

  pipeline_ctrl #(.NSTAGE(NSTAGE), .HEADS(HEADS), .IMG_SLOTS(IMG_SLOTS)) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start),
    .num_images (num_images),
    .busy       (busy),
    .done       (done),
    .advance    (advance),
    .stage_start(st_start),
    .stage_done (st_done),
    .task_valid (tk_valid),
    .task_img   (tk_img),
    .task_head  (tk_head)
  );

  // ---------------- stage 0: Q, K, V projections ----------------
  logic          pq_busy, pk_busy, pv_busy, pq_done, pk_done, pv_done;
  logic [KW-1:0] pq_ak, pk_ak, pv_ak, pq_bk, pk_bk, pv_bk;
  logic [TW-1:0] pq_bt, pk_bt, pv_bt;
  logic          pq_we, pk_we, pv_we;
  logic [RW-1:0] pq_row, pk_row, pv_row;
  logic [TW-1:0] pq_wt, pk_wt, pv_wt;
  fp32_t         pq_d [ACOLS];
  fp32_t         pk_d [ACOLS];
  fp32_t         pv_d [ACOLS];

  matmul_engine #(.N(SEQ), .M(ACOLS), .KLEN(HIDDEN), .NTILE(NT)) u_proj_q (
    .clk(clk), .rst_n(rst_n), .start(st_start[0]), .busy(pq_busy), .done(pq_done),
    .a_k(pq_ak), .a_col(x_rd_data), .b_k(pq_bk), .b_tile(pq_bt), .b_row(wq_rd_data),
    .wr_en(pq_we), .wr_row(pq_row), .wr_tile(pq_wt), .wr_data(pq_d));
  matmul_engine #(.N(SEQ), .M(ACOLS), .KLEN(HIDDEN), .NTILE(NT)) u_proj_k (
    .clk(clk), .rst_n(rst_n), .start(st_start[0]), .busy(pk_busy), .done(pk_done),
    .a_k(pk_ak), .a_col(x_rd_data), .b_k(pk_bk), .b_tile(pk_bt), .b_row(wk_rd_data),
    .wr_en(pk_we), .wr_row(pk_row), .wr_tile(pk_wt), .wr_data(pk_d));
  matmul_engine #(.N(SEQ), .M(ACOLS), .KLEN(HIDDEN), .NTILE(NT)) u_proj_v (
    .clk(clk), .rst_n(rst_n), .start(st_start[0]), .busy(pv_busy), .done(pv_done),
    .a_k(pv_ak), .a_col(x_rd_data), .b_k(pv_bk), .b_tile(pv_bt), .b_row(wv_rd_data),
    .wr_en(pv_we), .wr_row(pv_row), .wr_tile(pv_wt), .wr_data(pv_d));

  assign x_rd_img  = tk_img[0];
  assign x_rd_k    = pq_ak;
  assign w_rd_k    = pq_bk;
  assign w_rd_head = tk_head[0];
  assign w_rd_tile = pq_bt;
  assign st_done[0] = pq_done;

  a_proj_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    (pq_busy == pk_busy) && (pq_busy == pv_busy) && (pq_ak == pk_ak) && (pq_ak == pv_ak) &&
    (pq_bt == pk_bt) && (pq_bt == pv_bt))
    else $error("attention_pipeline: projection arrays out of step");

  // ---------------- buffers ----------------

  // Q: written by stage 0, read (columns) by stage 2
  logic [TW-1:0] q_rc_word;
  logic [LW-1:0] q_rc_lane;
  fp32_t         q_rc [SEQ];
  fp32_t         q_rr [ACOLS];
  mat_buffer #(.ROWS(SEQ), .W(ACOLS), .NW(NT), .DEPTH(2)) u_buf_q (
    .clk(clk), .rst_n(rst_n), .advance(advance),
    .wr_en(pq_we), .wr_row(pq_row), .wr_word(pq_wt), .wr_data(pq_d),
    .rr_row('0), .rr_word('0), .rr_data(q_rr),
    .rc_word(q_rc_word), .rc_lane(q_rc_lane), .rc_data(q_rc));

  // K: written by stage 0, read (columns) by stage 1
  logic [TW-1:0] k_rc_word;
  logic [LW-1:0] k_rc_lane;
  fp32_t         k_rc [SEQ];
  fp32_t         k_rr [ACOLS];
  mat_buffer #(.ROWS(SEQ), .W(ACOLS), .NW(NT), .DEPTH(1)) u_buf_k (
    .clk(clk), .rst_n(rst_n), .advance(advance),
    .wr_en(pk_we), .wr_row(pk_row), .wr_word(pk_wt), .wr_data(pk_d),
    .rr_row('0), .rr_word('0), .rr_data(k_rr),
    .rc_word(k_rc_word), .rc_lane(k_rc_lane), .rc_data(k_rc));

  // V: written by stage 0, read (row segments) by stage 4
  logic [RW-1:0] v_rr_row;
  logic [TW-1:0] v_rr_word;
  fp32_t         v_rr [ACOLS];
  fp32_t         v_rc [SEQ];
  mat_buffer #(.ROWS(SEQ), .W(ACOLS), .NW(NT), .DEPTH(4)) u_buf_v (
    .clk(clk), .rst_n(rst_n), .advance(advance),
    .wr_en(pv_we), .wr_row(pv_row), .wr_word(pv_wt), .wr_data(pv_d),
    .rr_row(v_rr_row), .rr_word(v_rr_word), .rr_data(v_rr),
    .rc_word('0), .rc_lane('0), .rc_data(v_rc));

  // ---------------- stage 1: transpose ----------------
  logic           tr_busy, tr_we;
  logic [HDW-1:0] tr_row;
  fp32_t          tr_d [SEQ];
  transpose_unit #(.R(SEQ), .C(HD), .W(ACOLS)) u_trans (
    .clk(clk), .rst_n(rst_n), .start(st_start[1]), .busy(tr_busy), .done(st_done[1]),
    .src_word(k_rc_word), .src_lane(k_rc_lane), .src_col(k_rc),
    .dst_wr_en(tr_we), .dst_row(tr_row), .dst_data(tr_d));

  // K^T: row c holds feature c of every token
  logic [HDW-1:0] kt_rr_row;
  fp32_t          kt_rr [SEQ];
  fp32_t          kt_rc [HD];
  mat_buffer #(.ROWS(HD), .W(SEQ), .NW(1), .DEPTH(1)) u_buf_kt (
    .clk(clk), .rst_n(rst_n), .advance(advance),
    .wr_en(tr_we), .wr_row(tr_row), .wr_word('0), .wr_data(tr_d),
    .rr_row(kt_rr_row), .rr_word('0), .rr_data(kt_rr),
    .rc_word('0), .rc_lane('0), .rc_data(kt_rc));

  // ---------------- stage 2: Q x K^T ----------------
  logic           sc_busy, sc_we;
  logic [HDW-1:0] sc_ak, sc_bk;
  logic           sc_bt, sc_wt;
  logic [RW-1:0]  sc_row;
  fp32_t          sc_d [SEQ];
  matmul_engine #(.N(SEQ), .M(SEQ), .KLEN(HD), .NTILE(1)) u_scores (
    .clk(clk), .rst_n(rst_n), .start(st_start[2]), .busy(sc_busy), .done(st_done[2]),
    .a_k(sc_ak), .a_col(q_rc), .b_k(sc_bk), .b_tile(sc_bt), .b_row(kt_rr),
    .wr_en(sc_we), .wr_row(sc_row), .wr_tile(sc_wt), .wr_data(sc_d));
  assign q_rc_word = TW'(sc_ak / HDW'(ACOLS));
  assign q_rc_lane = LW'(sc_ak % HDW'(ACOLS));
  assign kt_rr_row = sc_bk;

  // Q x K^T scores
  logic [RW-1:0] qk_rr_row;
  fp32_t         qk_rr [SEQ];
  fp32_t         qk_rc [SEQ];
  mat_buffer #(.ROWS(SEQ), .W(SEQ), .NW(1), .DEPTH(1)) u_buf_qk (
    .clk(clk), .rst_n(rst_n), .advance(advance),
    .wr_en(sc_we), .wr_row(sc_row), .wr_word('0), .wr_data(sc_d),
    .rr_row(qk_rr_row), .rr_word('0), .rr_data(qk_rr),
    .rc_word('0), .rc_lane('0), .rc_data(qk_rc));

  // ---------------- stage 3: softmax ----------------
  logic          sm_busy, sm_we;
  logic [RW-1:0] sm_row;
  fp32_t         sm_d [SEQ];
  softmax_unit #(.L(SEQ), .SCALE(SCALE)) u_softmax (
    .clk(clk), .rst_n(rst_n), .start(st_start[3]), .busy(sm_busy), .done(st_done[3]),
    .rd_row(qk_rr_row), .rd_data(qk_rr),
    .wr_en(sm_we), .wr_row(sm_row), .wr_data(sm_d));

  // softmax result S
  logic [RW-1:0] s_rc_lane;
  fp32_t         s_rc [SEQ];
  fp32_t         s_rr [SEQ];
  mat_buffer #(.ROWS(SEQ), .W(SEQ), .NW(1), .DEPTH(1)) u_buf_s (
    .clk(clk), .rst_n(rst_n), .advance(advance),
    .wr_en(sm_we), .wr_row(sm_row), .wr_word('0), .wr_data(sm_d),
    .rr_row('0), .rr_word('0), .rr_data(s_rr),
    .rc_word('0), .rc_lane(s_rc_lane), .rc_data(s_rc));

  // ---------------- stage 4: S x V ----------------
  logic          cx_busy, cx_done, cx_we;
  logic [RW-1:0] cx_ak, cx_bk, cx_row;
  logic [TW-1:0] cx_bt, cx_wt;
  matmul_engine #(.N(SEQ), .M(ACOLS), .KLEN(SEQ), .NTILE(NT)) u_context (
    .clk(clk), .rst_n(rst_n), .start(st_start[4]), .busy(cx_busy), .done(cx_done),
    .a_k(cx_ak), .a_col(s_rc), .b_k(cx_bk), .b_tile(cx_bt), .b_row(v_rr),
    .wr_en(cx_we), .wr_row(cx_row), .wr_tile(cx_wt), .wr_data(out_wr_data));
  assign s_rc_lane = cx_ak;
  assign v_rr_row  = cx_bk;
  assign v_rr_word = cx_bt;
  assign st_done[4] = cx_done;

  assign out_wr_en     = cx_we;
  assign out_wr_img    = tk_img[4];
  assign out_wr_row    = cx_row;
  assign out_wr_word   = OWW'(tk_head[4]) * OWW'(NT) + OWW'(cx_wt);
  assign out_head_done = cx_done;
  assign out_head_img  = tk_img[4];
endmodule
