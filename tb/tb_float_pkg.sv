// tb_float_pkg: reference conversions between real numbers and IEEE-754
// single-precision bit patterns for the testbenches. They work on real
// arithmetic with exact powers of two, independently of the bit-level RTL
// converters, and round to nearest with ties to even.
package tb_float_pkg;

  function automatic real pow2(int e);
    real r;
    r = 1.0;
    if (e >= 0) for (int i = 0; i < e; i++) r = r * 2.0;
    else        for (int i = 0; i < -e; i++) r = r / 2.0;
    return r;
  endfunction

  // Normal numbers and zero only (denormals read as zero).
  function automatic real bits_to_real(logic [31:0] b);
    real m;
    if (b[30:23] == 8'd0) return 0.0;
    m = 1.0 + real'(b[22:0]) / pow2(23);
    m = m * pow2(int'(b[30:23]) - 127);
    return b[31] ? -m : m;
  endfunction

  // Real to single precision, round to nearest even; finite normal range only.
  function automatic logic [31:0] real_to_bits(real r);
    logic sgn;
    int   e;
    real  a, m, fl, fr;
    longint unsigned mi;
    if (r == 0.0) return 32'd0;
    sgn = (r < 0.0);
    a   = sgn ? -r : r;
    e   = 0;
    while (a >= pow2(e + 1)) e++;
    while (a < pow2(e)) e--;
    m  = a * pow2(23 - e);              // in [2^23, 2^24)
    fl = $floor(m);
    fr = m - fl;
    mi = longint'(fl);
    if (fr > 0.5 || (fr == 0.5 && mi[0])) mi++;
    if (mi == 64'd16777216) begin
      mi = 64'd8388608;
      e++;
    end
    return {sgn, 8'(e + 127), mi[22:0]};
  endfunction

endpackage
