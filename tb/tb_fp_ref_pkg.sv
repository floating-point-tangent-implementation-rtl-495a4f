// tb_fp_ref_pkg: reference arithmetic for the testbenches, written apart from
// the design's own helpers.
//
// to_sp() rounds a double to binary32 (nearest-even, flush to zero below the
// normal range) by scaling and $floor instead of by bit slicing. Because a
// double holds more than twice the bits of a binary32, a sum or product of
// two binary32 values formed in double and rounded by to_sp() is the
// correctly rounded binary32 result. from_sp() gives the exact value of an
// encoding; ulp_err() measures a result against a real reference in units
// in the last place of the reference's binade.
package tb_fp_ref_pkg;

  function automatic real pow2(int e);
    real p;
    p = 1.0;
    if (e >= 0) for (int i = 0; i < e; i++) p = p * 2.0;
    else        for (int i = 0; i < -e; i++) p = p / 2.0;
    return p;
  endfunction

  function automatic logic [31:0] to_sp(real r);
    real    m, fl, rem, v;
    int     e;
    logic   s;
    s = (r < 0.0);
    v = s ? -r : r;
    if (v == 0.0) return {s, 31'd0};
    e = 0;
    while (v >= pow2(e + 1)) e++;
    while (v < pow2(e)) e--;
    m   = v * pow2(23 - e);          // in [2^23, 2^24), exact
    fl  = $floor(m);
    rem = m - fl;
    if (rem > 0.5 || (rem == 0.5 && (longint'(fl) % 2 == 1))) fl = fl + 1.0;
    if (fl >= 16777216.0) begin
      fl = fl / 2.0;
      e++;
    end
    if (e + 127 <= 0)   return {s, 31'd0};
    if (e + 127 >= 255) return {s, 8'hFF, 23'd0};
    return {s, 8'(e + 127), 23'(longint'(fl) - 64'd8388608)};
  endfunction

  function automatic real from_sp(logic [31:0] f);
    real v;
    if (f[30:23] == 0) return 0.0;
    v = (1.0 + real'(f[22:0]) / 8388608.0) * pow2(int'(f[30:23]) - 127);
    return f[31] ? -v : v;
  endfunction

  function automatic real ulp_err(logic [31:0] got, real ref_v);
    real a, u;
    int  e;
    a = (ref_v < 0.0) ? -ref_v : ref_v;
    e = 0;
    while (a >= pow2(e + 1)) e++;
    while (a < pow2(e)) e--;
    u = pow2(e - 23);
    a = from_sp(got) - ref_v;
    return ((a < 0.0) ? -a : a) / u;
  endfunction

endpackage
