// tb_input_memory: self-checking test of the on-chip image store.
// Loads random images into every slot (one word per cycle: feature k of all
// tokens), reads every (slot, k) back and checks each token's value.
module tb_input_memory;
  import fp32_pkg::*;
  localparam int SEQ = 4, HIDDEN = 16, IMG_SLOTS = 2;

  logic  clk = 1'b0, wr_en = 1'b0;
  logic       wr_img = '0, rd_img = '0;
  logic [3:0] wr_k = '0, rd_k = '0;
  fp32_t wr_data [SEQ];
  fp32_t rd_data [SEQ];
  fp32_t X [IMG_SLOTS][SEQ][HIDDEN];
  int    checks = 0, failures = 0;

  input_memory #(.SEQ(SEQ), .HIDDEN(HIDDEN), .IMG_SLOTS(IMG_SLOTS)) dut (
    .clk(clk), .wr_en(wr_en), .wr_img(wr_img), .wr_k(wr_k), .wr_data(wr_data),
    .rd_img(rd_img), .rd_k(rd_k), .rd_data(rd_data));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int i = 0; i < IMG_SLOTS; i++)
      for (int k = 0; k < HIDDEN; k++) begin
        for (int t = 0; t < SEQ; t++) X[i][t][k] = $urandom;
        wr_en = 1'b1;
        wr_img = 1'(i);
        wr_k = 4'(k);
        for (int t = 0; t < SEQ; t++) wr_data[t] = X[i][t][k];
        @(negedge clk);
      end
    wr_en = 1'b0;
    for (int i = 0; i < IMG_SLOTS; i++)
      for (int k = 0; k < HIDDEN; k++) begin
        rd_img = 1'(i);
        rd_k = 4'(k);
        #1;
        for (int t = 0; t < SEQ; t++) begin
          checks++;
          if (rd_data[t] != X[i][t][k]) begin
            failures++;
            $display("FAIL img %0d k %0d token %0d", i, k, t);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
