// tb_fp_pkg: reference conversions between single precision and real for the
// testbenches. r2f rounds a real to the nearest single-precision value (ties
// to even, subnormals flushed to zero like the design); f2r is exact.
// close() compares a design result with a real reference within a relative
// plus absolute tolerance.
package tb_fp_pkg;
  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    int          e;
    logic [23:0] m;
    logic [24:0] mr;
    logic        g, st;
    d = $realtobits(r);
    if (d[62:52] == 11'd0) return {d[63], 31'd0};
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {1'b1, d[51:29]};
    g  = d[28];
    st = |d[27:0];
    mr = {1'b0, m} + 25'((g && (st || m[0])) ? 1 : 0);
    if (mr[24]) begin
      mr = mr >> 1;
      e  = e + 1;
    end
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    if (e <= 0) return {d[63], 31'd0};
    return {d[63], 8'(e), mr[22:0]};
  endfunction

  function automatic real f2r(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic bit close(input logic [31:0] got, input real ref_val,
                               input real rel, input real abs_tol);
    real g, diff, mag;
    g    = f2r(got);
    diff = (g > ref_val) ? g - ref_val : ref_val - g;
    mag  = (ref_val < 0.0) ? -ref_val : ref_val;
    return diff <= abs_tol + rel * mag;
  endfunction

  // uniform real in [lo, hi)
  function automatic real urand(input real lo, input real hi);
    return lo + (hi - lo) * (real'($urandom) / 4294967296.0);
  endfunction
endpackage
