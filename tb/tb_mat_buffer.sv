// tb_mat_buffer: self-checking test of the rotating inter-stage buffer.
// With DEPTH = 2 it writes a different random matrix in each pipeline step
// and checks that the consumer side shows the matrix written exactly DEPTH
// steps earlier, through both the row-word port and the column port, for
// every row, word and lane. Writes in the current step must not disturb
// what the consumer reads.
module tb_mat_buffer;
  import fp32_pkg::*;
  import tb_fp_pkg::*;
  localparam int ROWS = 4, W = 4, NW = 3, DEPTH = 2, STEPS = 8;

  logic  clk = 1'b0, rst_n = 1'b0, advance = 1'b0, wr_en = 1'b0;
  logic [1:0] wr_row = '0, rr_row = '0, wr_word = '0, rr_word = '0, rc_word = '0, rc_lane = '0;
  fp32_t wr_data [W];
  fp32_t rr_data [W];
  fp32_t rc_data [ROWS];
  fp32_t hist [STEPS][ROWS][NW][W];
  int    checks = 0, failures = 0;

  mat_buffer #(.ROWS(ROWS), .W(W), .NW(NW), .DEPTH(DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .advance(advance),
    .wr_en(wr_en), .wr_row(wr_row), .wr_word(wr_word), .wr_data(wr_data),
    .rr_row(rr_row), .rr_word(rr_word), .rr_data(rr_data),
    .rc_word(rc_word), .rc_lane(rc_lane), .rc_data(rc_data));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 0; l < W; l++) wr_data[l] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < STEPS; s++) begin
      for (int r = 0; r < ROWS; r++)
        for (int w = 0; w < NW; w++) begin
          for (int l = 0; l < W; l++) hist[s][r][w][l] = $urandom;
          wr_en = 1'b1;
          wr_row = 2'(r);
          wr_word = 2'(w);
          for (int l = 0; l < W; l++) wr_data[l] = hist[s][r][w][l];
          @(negedge clk);
          wr_en = 1'b0;
          // consumer side must show step s - DEPTH
          if (s >= DEPTH) begin
            rr_row = 2'($urandom % ROWS);
            rr_word = 2'($urandom % NW);
            rc_word = 2'($urandom % NW);
            rc_lane = 2'($urandom % W);
            #1;
            for (int l = 0; l < W; l++) begin
              checks++;
              if (rr_data[l] != hist[s-DEPTH][rr_row][rr_word][l]) begin
                failures++;
                $display("FAIL row read step %0d", s);
              end
            end
            for (int q = 0; q < ROWS; q++) begin
              checks++;
              if (rc_data[q] != hist[s-DEPTH][q][rc_word][rc_lane]) begin
                failures++;
                $display("FAIL column read step %0d", s);
              end
            end
          end
        end
      advance = 1'b1;
      @(negedge clk);
      advance = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
