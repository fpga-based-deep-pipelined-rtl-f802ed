// fp32_pkg: IEEE-754 single-precision arithmetic used by every datapath unit.
//
// The accelerator computes in single precision throughout. These
// combinational functions are the arithmetic of the processing elements and of
// the softmax unit:
//   fp_mul  a*b            round to nearest even
//   fp_add  a+b            round to nearest even
//   fp_div  a/b            round to nearest even
//   fp_exp  e^x            fixed-point range reduction, degree-6 polynomial
//   fp_max  larger of two values
// Simplifications chosen for this design: subnormal inputs are read as zero
// and subnormal results are flushed to zero; an infinite or NaN operand gives
// an infinity (NaN is not propagated); fp_exp is accurate to a few units in
// the 5th significant digit and is meant for softmax arguments (x <= 0).
// Each function is one combinational block; the units that call them
// register the results.
package fp32_pkg;

  typedef logic [31:0] fp32_t;

  localparam fp32_t FP_ZERO = 32'h0000_0000;
  localparam fp32_t FP_ONE  = 32'h3F80_0000;
  localparam fp32_t FP_PINF = 32'h7F80_0000;
  localparam fp32_t FP_NINF = 32'hFF80_0000;

  function automatic logic fp_is_zero(input fp32_t a);
    return a[30:23] == 8'd0;
  endfunction

  // Pack sign, biased exponent (wide, may be out of range) and a 24-bit
  // significand with hidden bit, rounding with guard/sticky bits.
  function automatic fp32_t fp_pack(input logic s, input logic signed [11:0] e,
                                    input logic [23:0] sig, input logic g,
                                    input logic st);
    logic [24:0] r;
    logic signed [11:0] ee;
    r  = {1'b0, sig} + 25'((g && (st || sig[0])) ? 1 : 0);
    ee = e;
    if (r[24]) begin
      r  = r >> 1;
      ee = ee + 12'sd1;
    end
    if (ee >= 12'sd255) return {s, 8'hFF, 23'd0};
    if (ee <= 12'sd0) return {s, 31'd0};
    return {s, ee[7:0], r[22:0]};
  endfunction

  function automatic fp32_t fp_mul(input fp32_t a, input fp32_t b);
    logic s;
    logic [47:0] p;
    logic signed [11:0] e;
    s = a[31] ^ b[31];
    if (a[30:23] == 8'hFF || b[30:23] == 8'hFF) return {s, 8'hFF, 23'd0};
    if (fp_is_zero(a) || fp_is_zero(b)) return {s, 31'd0};
    p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e = 12'(a[30:23]) + 12'(b[30:23]) - 12'sd127;
    if (p[47]) begin
      e = e + 12'sd1;
    end else begin
      p = p << 1;
    end
    return fp_pack(s, e, p[47:24], p[23], |p[22:0]);
  endfunction

  function automatic logic [4:0] fp_lzc27(input logic [26:0] v);
    logic [4:0] n;
    n = 5'd27;
    for (int i = 0; i < 27; i++) begin
      if (v[i]) n = 5'(26 - i);
    end
    return n;
  endfunction

  function automatic fp32_t fp_add(input fp32_t a, input fp32_t b);
    fp32_t x, y;
    logic [49:0] yx;
    logic [26:0] mx, my;
    logic [27:0] sum;
    logic [7:0] d;
    logic [4:0] lz;
    logic signed [11:0] e;
    if (a[30:23] == 8'hFF) return a;
    if (b[30:23] == 8'hFF) return b;
    if (fp_is_zero(a) && fp_is_zero(b)) return {a[31] & b[31], 31'd0};
    if (fp_is_zero(a)) return b;
    if (fp_is_zero(b)) return a;
    // x holds the operand of larger magnitude
    if (a[30:0] >= b[30:0]) begin x = a; y = b; end
    else begin x = b; y = a; end
    d  = x[30:23] - y[30:23];
    yx = {1'b1, y[22:0], 26'd0} >> ((d > 8'd31) ? 8'd31 : d);
    mx = {1'b1, x[22:0], 3'b000};
    my = {yx[49:24], |yx[23:0]};
    e  = 12'(x[30:23]);
    if (x[31] == y[31]) begin
      sum = {1'b0, mx} + {1'b0, my};
      if (sum[27]) begin
        sum = {1'b0, sum[27:2], sum[1] | sum[0]};
        e   = e + 12'sd1;
      end
    end else begin
      sum = {1'b0, mx} - {1'b0, my};
      if (sum == 28'd0) return FP_ZERO;
      lz  = fp_lzc27(sum[26:0]);
      sum = sum << lz;
      e   = e - 12'(lz);
    end
    return fp_pack(x[31], e, sum[26:3], sum[2], sum[1] | sum[0]);
  endfunction

  function automatic fp32_t fp_div(input fp32_t a, input fp32_t b);
    logic s;
    logic [49:0] num;
    logic [49:0] q;
    logic [23:0] rem;
    logic signed [11:0] e;
    s = a[31] ^ b[31];
    if (a[30:23] == 8'hFF || fp_is_zero(b)) return {s, 8'hFF, 23'd0};
    if (fp_is_zero(a) || b[30:23] == 8'hFF) return {s, 31'd0};
    num = {1'b1, a[22:0], 26'd0};
    q   = num / 50'({1'b1, b[22:0]});
    rem = 24'(num % 50'({1'b1, b[22:0]}));
    e   = 12'(a[30:23]) - 12'(b[30:23]) + 12'sd127;
    if (q[26]) return fp_pack(s, e, q[26:3], q[2], (|q[1:0]) || (rem != 24'd0));
    return fp_pack(s, e - 12'sd1, q[25:2], q[1], q[0] || (rem != 24'd0));
  endfunction

  function automatic fp32_t fp_max(input fp32_t a, input fp32_t b);
    logic a_gt;
    if (a[31] != b[31]) a_gt = !a[31];
    else if (!a[31])    a_gt = a[30:0] > b[30:0];
    else                a_gt = a[30:0] < b[30:0];
    return a_gt ? a : b;
  endfunction

  // Coefficients ln(2)^k / k! in Q2.30 for 2^f = sum_k c_k f^k, 0 <= f < 1
  localparam logic [31:0] EXP_C [7] = '{32'd1073741824, 32'd744261118,
    32'd257941248, 32'd59597083, 32'd10327387, 32'd1431680, 32'd165394};
  // log2(e) in Q2.30
  localparam logic [31:0] LOG2E_Q30 = 32'd1549082005;

  // e^x = 2^(x*log2 e) = 2^n * 2^f. x is first converted to signed Q8.24.
  function automatic fp32_t fp_exp(input fp32_t x);
    logic signed [11:0] ex;
    logic signed [63:0] xf;   // Q.24
    logic signed [63:0] t;    // Q.24, x*log2(e)
    logic signed [63:0] n;
    logic [63:0] f;           // Q.30 fraction
    logic [63:0] p;           // Q.30 polynomial
    logic signed [11:0] eo;
    if (fp_is_zero(x)) return FP_ONE;
    ex = 12'(x[30:23]) - 12'sd127;
    if (ex > 12'sd6) return x[31] ? FP_ZERO : FP_PINF;   // |x| >= 128
    if (ex < -12'sd25) return FP_ONE;
    // significand is 1.f * 2^23; value * 2^24 = sig << (ex + 1)
    if (ex >= -12'sd1) xf = 64'(signed'({1'b0, 1'b1, x[22:0]})) <<< (ex + 12'sd1);
    else               xf = 64'(signed'({1'b0, 1'b1, x[22:0]})) >>> (-(ex + 12'sd1));
    if (x[31]) xf = -xf;
    t = (xf * 64'(signed'({1'b0, LOG2E_Q30}))) >>> 30;
    n = t >>> 24;
    f = 64'(t - (n <<< 24)) << 6;
    p = 64'(EXP_C[6]);
    for (int k = 5; k >= 0; k--) begin
      p = ((p * f) >> 30) + 64'(EXP_C[k]);
    end
    // p in [1, 2) as Q.30; a value rounding up to 2.0 is handled by the pack
    eo = 12'(n) + 12'sd127;
    if (p[31]) return fp_pack(1'b0, eo + 12'sd1, p[31:8], p[7], |p[6:0]);
    return fp_pack(1'b0, eo, p[30:7], p[6], |p[5:0]);
  endfunction

endpackage
