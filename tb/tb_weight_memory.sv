// tb_weight_memory: self-checking test of the on-chip weight store.
// Loads a full random HIDDEN x HIDDEN matrix word by word at flat word
// addresses k*(HIDDEN/W) + c, then reads it back through the (k, head, tile)
// port for every k, head and tile and checks each element against
// W[k][head*HEAD_DIM + tile*W + lane].
module tb_weight_memory;
  import fp32_pkg::*;
  localparam int HIDDEN = 16, HEADS = 2, W = 4, HD = HIDDEN / HEADS, WPR = HIDDEN / W;

  logic  clk = 1'b0, wr_en = 1'b0;
  logic [5:0] wr_addr = '0;
  logic [3:0] rd_k = '0;
  logic       rd_head = '0, rd_tile = '0;
  fp32_t wr_data [W];
  fp32_t rd_data [W];
  fp32_t Wm [HIDDEN][HIDDEN];
  int    checks = 0, failures = 0;

  weight_memory #(.HIDDEN(HIDDEN), .HEADS(HEADS), .W(W)) dut (
    .clk(clk), .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data),
    .rd_k(rd_k), .rd_head(rd_head), .rd_tile(rd_tile), .rd_data(rd_data));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < HIDDEN; r++) for (int c = 0; c < HIDDEN; c++) Wm[r][c] = $urandom;
    @(negedge clk);
    for (int r = 0; r < HIDDEN; r++)
      for (int c = 0; c < WPR; c++) begin
        wr_en = 1'b1;
        wr_addr = 6'(r * WPR + c);
        for (int l = 0; l < W; l++) wr_data[l] = Wm[r][c * W + l];
        @(negedge clk);
      end
    wr_en = 1'b0;
    for (int k = 0; k < HIDDEN; k++)
      for (int h = 0; h < HEADS; h++)
        for (int t = 0; t < HD / W; t++) begin
          rd_k = 4'(k);
          rd_head = 1'(h);
          rd_tile = 1'(t);
          #1;
          for (int l = 0; l < W; l++) begin
            checks++;
            if (rd_data[l] != Wm[k][h * HD + t * W + l]) begin
              failures++;
              $display("FAIL k=%0d h=%0d t=%0d l=%0d", k, h, t, l);
            end
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
