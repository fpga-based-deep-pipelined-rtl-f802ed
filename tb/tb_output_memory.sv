// tb_output_memory: self-checking test of the concatenating output store.
// Writes every head's result words of two image slots in a shuffled order,
// reporting each head complete with head_done, and checks that ready[img]
// rises only after the HEADS-th head of that image, that every word reads
// back at (img, row, word), and that clear drops the ready flags.
module tb_output_memory;
  import fp32_pkg::*;
  localparam int SEQ = 4, HIDDEN = 16, HEADS = 2, W = 4, IMG_SLOTS = 2, WPR = HIDDEN / W;

  logic  clk = 1'b0, rst_n = 1'b0, clear = 1'b0, wr_en = 1'b0, head_done = 1'b0;
  logic       wr_img = '0, head_img = '0, rd_img = '0;
  logic [1:0] wr_row = '0, rd_row = '0, wr_word = '0, rd_word = '0;
  fp32_t wr_data [W];
  fp32_t rd_data [W];
  logic  ready [IMG_SLOTS];
  fp32_t O [IMG_SLOTS][SEQ][WPR][W];
  int    checks = 0, failures = 0;

  output_memory #(.SEQ(SEQ), .HIDDEN(HIDDEN), .HEADS(HEADS), .W(W), .IMG_SLOTS(IMG_SLOTS)) dut (
    .clk(clk), .rst_n(rst_n), .clear(clear), .wr_en(wr_en), .wr_img(wr_img), .wr_row(wr_row),
    .wr_word(wr_word), .wr_data(wr_data), .head_done(head_done), .head_img(head_img),
    .ready(ready), .rd_img(rd_img), .rd_row(rd_row), .rd_word(rd_word), .rd_data(rd_data));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic write_head(input int img, input int h);
    for (int r = 0; r < SEQ; r++)
      for (int t = 0; t < WPR / HEADS; t++) begin
        int w = h * (WPR / HEADS) + t;
        for (int l = 0; l < W; l++) O[img][r][w][l] = $urandom;
        wr_en = 1'b1;
        wr_img = 1'(img);
        wr_row = 2'(r);
        wr_word = 2'(w);
        for (int l = 0; l < W; l++) wr_data[l] = O[img][r][w][l];
        @(negedge clk);
      end
    wr_en = 1'b0;
    head_done = 1'b1;
    head_img = 1'(img);
    @(negedge clk);
    head_done = 1'b0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    chk(!ready[0] && !ready[1], "ready after reset");
    write_head(0, 0);
    write_head(1, 1);
    chk(!ready[0] && !ready[1], "ready after one head each");
    write_head(1, 0);
    chk(!ready[0] && ready[1], "image 1 ready");
    write_head(0, 1);
    chk(ready[0] && ready[1], "both ready");
    for (int i = 0; i < IMG_SLOTS; i++)
      for (int r = 0; r < SEQ; r++)
        for (int w = 0; w < WPR; w++) begin
          rd_img = 1'(i);
          rd_row = 2'(r);
          rd_word = 2'(w);
          #1;
          for (int l = 0; l < W; l++) chk(rd_data[l] == O[i][r][w][l], "readback");
        end
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    chk(!ready[0] && !ready[1], "ready after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
