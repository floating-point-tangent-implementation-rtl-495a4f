// fp_add: binary32 adder/subtractor, the adder of a hard floating-point DSP
// block. Computes a + b (sub = 0) or a - b (sub = 1), rounded to nearest-even.
//
// The smaller operand is aligned with guard, round and sticky bits, the
// significands are added or subtracted, a leading-zero count renormalises
// the difference and the result is rounded once. Like the hard FP blocks it
// models, it flushes subnormal inputs and results to zero; infinities
// propagate and invalid operations (inf - inf, NaN input) return a quiet NaN.
// An exact zero difference is +0.
//
// The tangent architecture uses the hard FP adders as given; their inside
// here, round-to-nearest-even and flush-to-zero are this design's choices.
//
// Timing: the result appears LATENCY cycles after the operands (LATENCY >= 1),
// one result per cycle. The register chain sits after the logic.
module fp_add #(
  parameter int unsigned LATENCY = 4
) (
  input  logic                 clk,
  input  logic                 rst,
  input  tan_fp_pkg::fp32_t    a,
  input  tan_fp_pkg::fp32_t    b,
  input  logic                 sub,
  output tan_fp_pkg::fp32_t    y
);
  import tan_fp_pkg::*;

  fp32_t res;

  always_comb begin
    fp32_t       x, z, bb;
    logic        a_zero, b_zero, a_spec, b_spec, eff_sub;
    logic [7:0]  d;
    logic [53:0] shifted;
    logic [26:0] mx, mz;
    logic [27:0] sum;
    logic [4:0]  lz;
    logic [23:0] mant;
    logic [24:0] mant_r;
    logic        g, s;
    int          e;

    bb      = b;
    bb.sign = b.sign ^ sub;
    a_zero  = (a.exp == 8'd0);
    b_zero  = (bb.exp == 8'd0);
    a_spec  = (a.exp == 8'hFF);
    b_spec  = (bb.exp == 8'hFF);
    res     = '0;
    // order by magnitude: x is the larger operand
    if ({a.exp, a.frac} >= {bb.exp, bb.frac}) begin
      x = a;  z = bb;
    end else begin
      x = bb; z = a;
    end
    eff_sub = x.sign ^ z.sign;
    mx      = {1'b1, x.frac, 3'b000};
    d       = x.exp - z.exp;
    shifted = {1'b1, z.frac, 3'b000, 27'd0} >> d;
    // bits shifted out of the 27-bit window collapse into the sticky bit
    mz      = (d > 8'd26) ? 27'd1 : {shifted[53:28], shifted[27] | (|shifted[26:0])};
    lz   = '0;
    mant = '0;
    mant_r = '0;
    g    = 1'b0;
    s    = 1'b0;
    e    = int'(x.exp);
    sum  = '0;

    if (a_spec || b_spec) begin
      if ((a_spec && a.frac != 0) || (b_spec && bb.frac != 0) ||
          (a_spec && b_spec && (a.sign != bb.sign)))
        res = {1'b0, 8'hFF, 23'h40_0000};
      else
        res = a_spec ? a : bb;
    end else if (a_zero && b_zero) begin
      res = {a.sign & bb.sign, 31'd0};
    end else if (b_zero) begin
      res = a;
    end else if (a_zero) begin
      res = bb;
    end else begin
      if (!eff_sub) begin
        sum = {1'b0, mx} + {1'b0, mz};
        if (sum[27]) begin
          sum = {1'b0, sum[27:2], sum[1] | sum[0]};
          e   = e + 1;
        end
      end else begin
        sum = {1'b0, mx - mz};
        // leading-zero count: the highest set bit wins
        for (int i = 0; i <= 26; i++)
          if (sum[i]) lz = 5'(26 - i);
        sum = sum << lz;
        e   = e - int'(lz);
      end
      mant   = sum[26:3];
      g      = sum[2];
      s      = sum[1] | sum[0];
      mant_r = {1'b0, mant} + 25'(g && (s || mant[0]));
      if (mant_r[24]) begin
        mant_r = mant_r >> 1;
        e      = e + 1;
      end
      if (sum[26:0] == 27'd0 || e <= 0)
        res = '0;
      else if (e >= 255)
        res = {x.sign, 8'hFF, 23'd0};
      else
        res = {x.sign, 8'(e), mant_r[22:0]};
    end
  end

  pipe_delay #(.WIDTH(32), .DEPTH(LATENCY)) u_pipe (
    .clk(clk), .rst(rst), .d(res), .q(y)
  );
endmodule
