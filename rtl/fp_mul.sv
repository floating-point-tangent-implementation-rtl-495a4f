// fp_mul: binary32 multiplier, the multiplier of a hard floating-point DSP
// block. Computes a * b rounded to nearest-even.
//
// The 24x24-bit significand product is normalised by at most one place and
// rounded with a guard and a sticky bit; the exponents are added and rebiased.
// Like the hard FP blocks it models, it flushes subnormal inputs and results
// to zero; infinities propagate, and 0 * inf or a NaN input gives a quiet NaN.
//
// The tangent architecture uses the hard FP multipliers as given; their
// inside here, round-to-nearest-even and flush-to-zero are this design's
// choices.
//
// Timing: the result appears LATENCY cycles after the operands (LATENCY >= 1),
// one result per cycle. The register chain sits after the logic.
module fp_mul #(
  parameter int unsigned LATENCY = 4
) (
  input  logic                 clk,
  input  logic                 rst,
  input  tan_fp_pkg::fp32_t    a,
  input  tan_fp_pkg::fp32_t    b,
  output tan_fp_pkg::fp32_t    y
);
  import tan_fp_pkg::*;

  fp32_t res;

  always_comb begin
    logic        sign, a_zero, b_zero, a_spec, b_spec;
    logic [47:0] prod;
    logic [23:0] mant;
    logic [24:0] mant_r;
    logic        g, s;
    int          e;

    sign   = a.sign ^ b.sign;
    a_zero = (a.exp == 8'd0);
    b_zero = (b.exp == 8'd0);
    a_spec = (a.exp == 8'hFF);
    b_spec = (b.exp == 8'hFF);
    prod   = {1'b1, a.frac} * {1'b1, b.frac};
    e      = int'(a.exp) + int'(b.exp) - int'(BIAS);
    if (prod[47]) begin
      mant = prod[47:24];
      g    = prod[23];
      s    = |prod[22:0];
      e    = e + 1;
    end else begin
      mant = prod[46:23];
      g    = prod[22];
      s    = |prod[21:0];
    end
    mant_r = {1'b0, mant} + 25'(g && (s || mant[0]));
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      e      = e + 1;
    end

    if ((a_spec && a.frac != 0) || (b_spec && b.frac != 0) ||
        (a_spec && b_zero) || (b_spec && a_zero))
      res = {1'b0, 8'hFF, 23'h40_0000};
    else if (a_spec || b_spec)
      res = {sign, 8'hFF, 23'd0};
    else if (a_zero || b_zero || e <= 0)
      res = {sign, 31'd0};
    else if (e >= 255)
      res = {sign, 8'hFF, 23'd0};
    else
      res = {sign, 8'(e), mant_r[22:0]};
  end

  pipe_delay #(.WIDTH(32), .DEPTH(LATENCY)) u_pipe (
    .clk(clk), .rst(rst), .d(res), .q(y)
  );
endmodule
