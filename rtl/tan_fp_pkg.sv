// tan_fp_pkg: types, constants and elaboration-time helpers shared by the
// single-precision tangent pipeline.
//
// fp32_t is the IEEE-754 binary32 layout. The constants fix the ranges the
// datapath works in: inputs with a biased exponent below SMALL_EXP return X
// itself, and the 256 encodings from NEAR_LO up to PI2_SP (the binary32 value
// nearest pi/2) read a table instead of the main datapath.
//
// The table contents are computed here, at elaboration, from $tan and simple
// rational functions in double precision, then rounded to nearest-even
// binary32 by real_to_sp(). Nothing in this package is clocked logic.
package tan_fp_pkg;

  typedef struct packed {
    logic        sign;
    logic [7:0]  exp;
    logic [22:0] frac;
  } fp32_t;

  localparam int unsigned BIAS      = 127;
  // |X| < 2^(SMALL_EXP-BIAS) = 2^-12 returns X (tan(x) ~ x)
  localparam logic [7:0]  SMALL_EXP = 8'd115;
  // binary32 nearest pi/2 and the lowest of the 256 encodings below it
  localparam logic [31:0] PI2_SP    = 32'h3FC9_0FDB;
  localparam logic [31:0] NEAR_LO   = 32'h3FC9_0EDC;
  localparam logic [31:0] FP_ONE    = 32'h3F80_0000;

  // Fixed-point X: bit 17 has weight 2^0, bit 0 weight 2^-17 (18 bits = 9+9).
  localparam int unsigned FIX_W = 18;
  localparam int unsigned SEG_W = 9;

  // Reciprocal PPA: 2^PPA_SEG_W segments over [0,1), degree 2.
  localparam int unsigned PPA_SEG_W = 8;
  localparam int unsigned PPA_C0_W  = 29;  // weight 2^-28, value in (0.5,1]
  localparam int unsigned PPA_C1_W  = 25;  // weight 2^-24, value in (0.25,1]
  localparam int unsigned PPA_C2_W  = 15;  // weight 2^-14, value in (0.125,1]

  // Round a double to binary32, nearest-even. Results below the normal range
  // flush to zero, results above it become infinity.
  function automatic logic [31:0] real_to_sp(real r);
    logic [63:0] d;
    logic [52:0] m;
    logic [24:0] mant;
    logic        guard, sticky;
    int          e;
    d = $realtobits(r);
    if (d[62:0] == 63'd0) return {d[63], 31'd0};
    m    = {1'b1, d[51:0]};
    e    = int'(d[62:52]) - 1023 + 127;
    mant = {1'b0, m[52:29]};
    guard  = m[28];
    sticky = |m[27:0];
    if (guard && (sticky || mant[0])) mant = mant + 25'd1;
    if (mant[24]) begin
      mant = mant >> 1;
      e    = e + 1;
    end
    if (e <= 0)   return {d[63], 31'd0};
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    return {d[63], 8'(e), mant[22:0]};
  endfunction

  // Exact value of a binary32 encoding (zero for exponent 0).
  function automatic real sp_to_real(logic [31:0] f);
    logic [10:0] e;
    if (f[30:23] == 8'd0) return 0.0;
    e = 11'(int'(f[30:23]) - 127 + 1023);
    return $bitstoreal({f[31], e, f[22:0], 29'd0});
  endfunction

  // Binary32 encoding in the near-pi/2 window whose low byte is k: the window
  // NEAR_LO..PI2_SP spans 256 consecutive encodings with distinct low bytes.
  function automatic logic [31:0] near_pi2_code(logic [7:0] k);
    return (k >= NEAR_LO[7:0]) ? {NEAR_LO[31:8], k} : {PI2_SP[31:8], k};
  endfunction

  // Midpoint of reciprocal segment j and the Taylor coefficients of
  // 1/(1+x) about it: 1/(1+m), 1/(1+m)^2, 1/(1+m)^3.
  function automatic real ppa_mid(int j);
    return (real'(j) + 0.5) / real'(2 ** PPA_SEG_W);
  endfunction

  function automatic logic [PPA_C0_W-1:0] ppa_c0(int j);
    real v;
    v = 1.0 / (1.0 + ppa_mid(j));
    return PPA_C0_W'(longint'($floor(v * real'(64'd1 << 28) + 0.5)));
  endfunction

  function automatic logic [PPA_C1_W-1:0] ppa_c1(int j);
    real v;
    v = 1.0 / ((1.0 + ppa_mid(j)) ** 2);
    return PPA_C1_W'(longint'($floor(v * real'(64'd1 << 24) + 0.5)));
  endfunction

  function automatic logic [PPA_C2_W-1:0] ppa_c2(int j);
    real v;
    v = 1.0 / ((1.0 + ppa_mid(j)) ** 3);
    return PPA_C2_W'(longint'($floor(v * real'(64'd1 << 14) + 0.5)));
  endfunction

endpackage
