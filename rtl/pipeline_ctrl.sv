// pipeline_ctrl: schedules (image, head) tasks through the stage pipeline.
//
// The attention computation of one head of one image is a task; tasks enter
// in the order (image 0, head 0), (0, 1), ..., (0, HEADS-1), (1, 0), ... and
// move one stage on per pipeline step, so up to NSTAGE tasks of different
// heads and images are in flight at once. A step starts every stage that
// holds a task (stage_start pulse, with the stage's task on task_img /
// task_head), waits until each of them has pulsed stage_done, and then
// pulses 'advance' for one cycle: all inter-stage buffers rotate and the
// tasks shift one stage on. 'start' (with num_images, 1..IMG_SLOTS) begins a
// run of num_images*HEADS tasks; 'done' pulses after the last task has left
// the last stage. A step costs the slowest active stage plus 3 cycles.
// Running different images and heads in different stages at the same time is
// the design's; the lock-step advance of all stages is this design's choice.
module pipeline_ctrl #(
  parameter int unsigned NSTAGE    = 5,
  parameter int unsigned HEADS     = vit_pkg::NUM_HEADS,
  parameter int unsigned IMG_SLOTS = vit_pkg::IMG_SLOTS,
  localparam int unsigned IW       = (IMG_SLOTS > 1) ? $clog2(IMG_SLOTS) : 1,
  localparam int unsigned NIW      = $clog2(IMG_SLOTS + 1),
  localparam int unsigned HW       = (HEADS > 1) ? $clog2(HEADS) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [NIW-1:0] num_images,
  output logic           busy,
  output logic           done,
  output logic           advance,
  output logic           stage_start [NSTAGE],
  input  logic           stage_done  [NSTAGE],
  output logic           task_valid  [NSTAGE],
  output logic [IW-1:0]  task_img    [NSTAGE],
  output logic [HW-1:0]  task_head   [NSTAGE]
);
  typedef enum logic [2:0] {S_IDLE, S_ADVANCE, S_LAUNCH, S_WAIT, S_DONE} state_t;
  state_t state;

  logic [NIW-1:0] nimg, next_img;
  logic [HW-1:0]  next_head;
  logic           finished [NSTAGE];
  logic           more_tasks, any_left, all_done;

  assign more_tasks = (next_img < nimg);
  always_comb begin
    any_left = more_tasks;
    for (int s = 0; s < NSTAGE - 1; s++) any_left |= task_valid[s];
    all_done = 1'b1;
    for (int s = 0; s < NSTAGE; s++)
      if (task_valid[s] && !(finished[s] || stage_done[s])) all_done = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      nimg      <= '0;
      next_img  <= '0;
      next_head <= '0;
      done      <= 1'b0;
      for (int s = 0; s < NSTAGE; s++) begin
        task_valid[s] <= 1'b0;
        task_img[s]   <= '0;
        task_head[s]  <= '0;
        finished[s]   <= 1'b0;
      end
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          nimg      <= num_images;
          next_img  <= '0;
          next_head <= '0;
          for (int s = 0; s < NSTAGE; s++) task_valid[s] <= 1'b0;
          state     <= S_ADVANCE;
        end
        S_ADVANCE: begin
          for (int s = NSTAGE - 1; s > 0; s--) begin
            task_valid[s] <= task_valid[s-1];
            task_img[s]   <= task_img[s-1];
            task_head[s]  <= task_head[s-1];
          end
          task_valid[0] <= more_tasks;
          task_img[0]   <= IW'(next_img);
          task_head[0]  <= next_head;
          if (more_tasks) begin
            if (next_head == HW'(HEADS - 1)) begin
              next_head <= '0;
              next_img  <= next_img + 1'b1;
            end else next_head <= next_head + 1'b1;
          end
          state <= any_left ? S_LAUNCH : S_DONE;
        end
        S_LAUNCH: begin
          for (int s = 0; s < NSTAGE; s++) finished[s] <= 1'b0;
          state <= S_WAIT;
        end
        S_WAIT: begin
          for (int s = 0; s < NSTAGE; s++) finished[s] <= finished[s] | stage_done[s];
          if (all_done) state <= S_ADVANCE;
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy    = (state != S_IDLE);
  assign advance = (state == S_ADVANCE);
  always_comb begin
    for (int s = 0; s < NSTAGE; s++) stage_start[s] = (state == S_LAUNCH) && task_valid[s];
  end

  a_num_images: assert property (@(posedge clk) disable iff (!rst_n)
    (start && state == S_IDLE) |-> (num_images >= 1 && num_images <= NIW'(IMG_SLOTS)))
    else $error("pipeline_ctrl: num_images out of range");
endmodule
