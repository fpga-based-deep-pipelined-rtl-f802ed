// softmax_unit: row-wise softmax of the scaled attention scores.
//
// For each of the L rows of the L x L score matrix Q x K^T it computes
// S[i][j] = exp(y_j - max_j y) / sum_j exp(y_j - max_j y) with
// y_j = SCALE * (Q x K^T)[i][j], SCALE = 1/sqrt(d_K). One single-precision
// multiplier, exponential, adder and divider are shared by all elements:
// per row, L cycles find the maximum, L cycles form the exponentials and
// their sum, L cycles divide, and one cycle writes the finished row, so a
// start-to-done run takes L * (3L + 1) + 1 cycles. The row being worked on
// is read combinationally through 'rd_row'/'rd_data' (a word of the score
// buffer); results leave on 'wr_*' one row per write. 'done' pulses once.
// The scaling and the softmax stage follow the design; subtracting the row
// maximum and the element-serial schedule are this design's own choices.
module softmax_unit
  import fp32_pkg::*;
#(
  parameter int unsigned L     = vit_pkg::SEQ_LEN,
  parameter fp32_t       SCALE = vit_pkg::INV_SQRT_DK,
  localparam int unsigned IW   = (L > 1) ? $clog2(L) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic [IW-1:0] rd_row,
  input  fp32_t         rd_data [L],
  output logic          wr_en,
  output logic [IW-1:0] wr_row,
  output fp32_t         wr_data [L]
);
  typedef enum logic [2:0] {S_IDLE, S_MAX, S_EXP, S_DIV, S_WRITE} state_t;
  state_t state;

  logic [IW-1:0] row, j;
  fp32_t         mx, sum;
  fp32_t         e   [L];
  fp32_t         res [L];
  fp32_t         y;

  assign rd_row = row;
  assign y      = fp_mul(rd_data[j], SCALE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      row   <= '0;
      j     <= '0;
      mx    <= FP_NINF;
      sum   <= FP_ZERO;
      done  <= 1'b0;
      for (int k = 0; k < L; k++) begin
        e[k]   <= FP_ZERO;
        res[k] <= FP_ZERO;
      end
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_MAX;
          row   <= '0;
          j     <= '0;
          mx    <= FP_NINF;
        end
        S_MAX: begin
          mx <= fp_max(mx, y);
          j  <= (j == IW'(L - 1)) ? '0 : j + 1'b1;
          if (j == IW'(L - 1)) begin
            state <= S_EXP;
            sum   <= FP_ZERO;
          end
        end
        S_EXP: begin
          e[j] <= fp_exp(fp_add(y, {~mx[31], mx[30:0]}));
          sum  <= fp_add(sum, fp_exp(fp_add(y, {~mx[31], mx[30:0]})));
          j    <= (j == IW'(L - 1)) ? '0 : j + 1'b1;
          if (j == IW'(L - 1)) state <= S_DIV;
        end
        S_DIV: begin
          res[j] <= fp_div(e[j], sum);
          j      <= (j == IW'(L - 1)) ? '0 : j + 1'b1;
          if (j == IW'(L - 1)) state <= S_WRITE;
        end
        S_WRITE: begin
          mx <= FP_NINF;
          if (row == IW'(L - 1)) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            row   <= row + 1'b1;
            state <= S_MAX;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy    = (state != S_IDLE);
  assign wr_en   = (state == S_WRITE);
  assign wr_row  = row;
  assign wr_data = res;
endmodule
