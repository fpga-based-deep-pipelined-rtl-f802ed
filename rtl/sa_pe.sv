// sa_pe: one processing element of the output-stationary systolic array.
//
// Row data (an element of the left operand) enters from the left and column
// data (an element of the right operand) from the top. When the row-data
// valid flag is set the PE adds their single-precision product to its
// accumulator; in every cycle it passes both operands and the flag on to its
// right and lower neighbours through registers, one cycle later. 'clear'
// zeroes the accumulator (it has priority over a valid operand pair). The
// accumulator is read on 'acc'. Latency: one cycle per hop and per MAC.
// The array organisation follows the systolic-array figure of the design;
// output-stationary dataflow and a one-cycle multiply-add are this design's
// choices.
module sa_pe
  import fp32_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  logic  a_valid_in,
  input  fp32_t a_in,
  input  fp32_t b_in,
  output logic  a_valid_out,
  output fp32_t a_out,
  output fp32_t b_out,
  output fp32_t acc
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_valid_out <= 1'b0;
      a_out       <= FP_ZERO;
      b_out       <= FP_ZERO;
      acc         <= FP_ZERO;
    end else begin
      a_valid_out <= a_valid_in;
      a_out       <= a_in;
      b_out       <= b_in;
      if (clear)           acc <= FP_ZERO;
      else if (a_valid_in) acc <= fp_add(acc, fp_mul(a_in, b_in));
    end
  end
endmodule
