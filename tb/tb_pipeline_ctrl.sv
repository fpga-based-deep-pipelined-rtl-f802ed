// tb_pipeline_ctrl: self-checking test of the (image, head) task scheduler.
// Each of the five stages is modelled by a process that pulses stage_done a
// random 2..12 cycles after its stage_start. The testbench checks in every
// pipeline step that stage s holds task number (step - 1 - s) in
// (image, head) order, that exactly the stages holding a task are started,
// that no advance happens before every started stage has finished, that a
// run of n tasks takes n + 5 advance pulses and ends with one 'done', and
// that five tasks are in flight at once when there are enough of them.
module tb_pipeline_ctrl;
  localparam int NSTAGE = 5, HEADS = 3, IMG_SLOTS = 2;

  logic       clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [1:0] num_images = '0;
  logic       busy, done, advance;
  logic       stage_start [NSTAGE];
  logic       stage_done  [NSTAGE];
  logic       task_valid  [NSTAGE];
  logic       task_img    [NSTAGE];
  logic [1:0] task_head   [NSTAGE];
  int         pending [NSTAGE];
  int         checks = 0, failures = 0;
  int         step, max_inflight, ndone;

  pipeline_ctrl #(.NSTAGE(NSTAGE), .HEADS(HEADS), .IMG_SLOTS(IMG_SLOTS)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .num_images(num_images), .busy(busy),
    .done(done), .advance(advance), .stage_start(stage_start), .stage_done(stage_done),
    .task_valid(task_valid), .task_img(task_img), .task_head(task_head));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // stage models: -1 idle, 0 finished, >0 cycles left
  always @(posedge clk) begin
    for (int s = 0; s < NSTAGE; s++) begin
      stage_done[s] <= 1'b0;
      if (stage_start[s]) pending[s] <= 2 + int'($urandom % 11);
      else if (pending[s] > 1) pending[s] <= pending[s] - 1;
      else if (pending[s] == 1) begin
        pending[s] <= 0;
        stage_done[s] <= 1'b1;
      end
    end
  end

  // per-cycle protocol checks
  always @(negedge clk) begin
    if (rst_n) begin
      automatic int inflight = 0;
      if (advance) begin
        for (int s = 0; s < NSTAGE; s++)
          chk(pending[s] <= 0, $sformatf("advance while stage %0d busy", s));
        step++;
      end
      for (int s = 0; s < NSTAGE; s++) begin
        if (stage_start[s]) begin
          automatic int t = step - 1 - s;
          chk(task_valid[s], "start of an empty stage");
          chk(int'(task_img[s]) == t / HEADS && int'(task_head[s]) == t % HEADS,
              $sformatf("stage %0d task (%0d,%0d) at step %0d", s, task_img[s], task_head[s], step));
        end
        if (task_valid[s]) inflight++;
      end
      if (inflight > max_inflight) max_inflight = inflight;
      if (done) ndone++;
    end
  end

  task automatic run(input int nimg);
    int ntask = nimg * HEADS;
    step = 0;
    max_inflight = 0;
    ndone = 0;
    @(negedge clk);
    num_images = 2'(nimg);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (busy) @(negedge clk);
    repeat (2) @(negedge clk);
    chk(step == ntask + NSTAGE, $sformatf("%0d advances for %0d tasks", step, ntask));
    chk(ndone == 1, "one done pulse");
    chk(max_inflight == ((ntask < NSTAGE) ? ntask : NSTAGE),
        $sformatf("max tasks in flight %0d", max_inflight));
  endtask

  initial begin
    for (int s = 0; s < NSTAGE; s++) pending[s] = -1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(2);
    run(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
