// tb_sa_pe: self-checking test of one systolic-array processing element.
// Feeds random single-precision operand pairs (random valid pattern, mixed
// signs and magnitudes), and checks every cycle that the operands and the
// valid flag come out one cycle later, and that the accumulator matches a
// reference sum rounded to single precision after every product and every
// addition (bit exact). Also checks that clear zeroes the accumulator.
module tb_sa_pe;
  import fp32_pkg::*;
  import tb_fp_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0, clear = 1'b0, vin = 1'b0, vout;
  fp32_t a_in = '0, b_in = '0, a_out, b_out, acc;
  int    checks = 0, failures = 0;
  real   ref_acc;

  sa_pe dut (.clk(clk), .rst_n(rst_n), .clear(clear), .a_valid_in(vin), .a_in(a_in),
             .b_in(b_in), .a_valid_out(vout), .a_out(a_out), .b_out(b_out), .acc(acc));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    fp32_t pa, pb;
    logic  pv;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    check(acc == FP_ZERO, "clear");
    ref_acc = 0.0;
    // a fixed case first: 1.5*2 + 0.25*(-4) = 2.0
    for (int n = 0; n < 2002; n++) begin
      pa = (n == 0) ? 32'h3FC0_0000 : (n == 1) ? 32'h3E80_0000 :
           r2f(urand(-1.0, 1.0) * ((n % 7 == 0) ? 1000.0 : 1.0));
      pb = (n == 0) ? 32'h4000_0000 : (n == 1) ? 32'hC080_0000 :
           r2f(urand(-2.0, 2.0));
      pv = (n < 2) ? 1'b1 : 1'($urandom % 4 != 0);
      a_in = pa; b_in = pb; vin = pv;
      @(negedge clk);
      check(a_out == pa && b_out == pb && vout == pv, "forwarding");
      if (pv) ref_acc = f2r(r2f(ref_acc + f2r(r2f(f2r(pa) * f2r(pb)))));
      if (n == 1) check(acc == 32'h4000_0000, "fixed case 1.5*2+0.25*-4");
      check(acc == r2f(ref_acc), $sformatf("acc n=%0d got %h exp %h", n, acc, r2f(ref_acc)));
    end
    vin = 1'b0;
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    check(acc == FP_ZERO, "clear after run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
