// tb_fp_pkg: reference arithmetic for the EP testbenches.
//
// Converts between real numbers and floating-point words of any exponent and
// fraction width (IEEE-754 layout, no subnormals), using only real arithmetic,
// so that expected results are worked out independently of the RTL. Also
// measures distances in units in the last place (ulp). Words are passed in
// 128-bit containers, right-aligned, so formats up to 127 bits fit.
package tb_fp_pkg;

  // Round v to the nearest word with EW exponent and FW fraction bits.
  // Magnitudes below the normal range become zero, above it infinity.
  function automatic logic [127:0] to_fp(real v, int ew, int fw);
    logic [127:0] r;
    real         m;
    int          e, bias, emax;
    longint      f;
    bit          s;
    bias = (1 << (ew - 1)) - 1;
    emax = (1 << ew) - 1;
    r    = '0;
    s    = (v < 0.0);
    m    = s ? -v : v;
    if (m == 0.0) return 128'(s) << (ew + fw);
    e = 0;
    while (m >= 2.0) begin m = m / 2.0; e++; end
    while (m < 1.0)  begin m = m * 2.0; e--; end
    f = longint'((m - 1.0) * (2.0 ** fw));   // the cast rounds to nearest
    if (f == (longint'(1) << fw)) begin f = 0; e++; end
    if (e + bias <= 0)         r = '0;
    else if (e + bias >= emax) r = 128'(emax) << fw;
    else                       r = (128'(e + bias) << fw) | 128'(f);
    return r | (128'(s) << (ew + fw));
  endfunction

  function automatic real from_fp(logic [127:0] w, int ew, int fw);
    int     e, bias;
    real    m;
    bit     s;
    bias = (1 << (ew - 1)) - 1;
    s    = w[ew + fw];
    e    = int'((w >> fw) & ((128'd1 << ew) - 1));
    if (e == 0) return 0.0;
    m = 1.0 + real'(w & ((128'd1 << fw) - 1)) / (2.0 ** fw);
    m = m * (2.0 ** (e - bias));
    return s ? -m : m;
  endfunction

  function automatic bit is_inf(logic [127:0] w, int ew, int fw);
    return (((w >> fw) & ((128'd1 << ew) - 1)) == ((128'd1 << ew) - 1));
  endfunction

  // One ulp of a word with FW fraction bits near magnitude |v|.
  function automatic real ulp(real v, int fw);
    real m;
    int  e;
    m = (v < 0.0) ? -v : v;
    if (m == 0.0) return 0.0;
    e = 0;
    while (m >= 2.0) begin m = m / 2.0; e++; end
    while (m < 1.0)  begin m = m * 2.0; e--; end
    return 2.0 ** (e - fw);
  endfunction

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // Uniform random real in [lo, hi).
  function automatic real urand(real lo, real hi);
    return lo + (hi - lo) * (real'($urandom) / 4294967296.0);
  endfunction

endpackage
