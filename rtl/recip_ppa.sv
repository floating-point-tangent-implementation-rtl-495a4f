// recip_ppa: piecewise-polynomial approximation of f(x) = 1/(1+x) for the
// 23-bit fraction x in [0,1) of the denominator; f(x) lies in (0.5, 1].
//
// The top 8 bits of x select one of 256 segments; the other 15 bits give
// the signed offset d from the segment midpoint m (|d| <= 2^-9). The segment
// table holds the Taylor coefficients c0 = 1/(1+m), c1 = 1/(1+m)^2 and
// c2 = 1/(1+m)^3, computed at elaboration, and the result is
//   f ~ c0 - d*(c1 - d*c2)   (Horner form, two multiplications).
// It is rounded to 24 bits r[23:0] of weights 2^-1..2^-24. When f rounds to
// 1 (x = 0, or rounding overflows) the 25-bit sum wraps and r[23], the bit
// of weight 1/2, reads 0; fp_recip takes that as "result is exactly 1".
//
// The function 1/(1+x) and the test on the bit of weight 1/2 follow the
// published architecture; segment count, degree, coefficient widths and
// pipelining are this design's choices.
//
// Pipeline: ROM_LATENCY cycles for the table read, MUL_LATENCY for each
// multiply-add, 1 for the rounding; latency ROM_LATENCY + 2*MUL_LATENCY + 1
// (9 by default), one input per cycle.
module recip_ppa #(
  parameter int unsigned ROM_LATENCY = 2,
  parameter int unsigned MUL_LATENCY = 3
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [22:0] x,
  output logic [23:0] r
);
  import tan_fp_pkg::*;

  localparam int unsigned NSEG = 2 ** PPA_SEG_W;
  localparam int unsigned OFF_W = 23 - PPA_SEG_W;   // 15
  localparam int unsigned COEF_W = PPA_C0_W + PPA_C1_W + PPA_C2_W;

  typedef logic [NSEG-1:0][COEF_W-1:0] coef_table_t;

  function automatic coef_table_t gen_coefs();
    coef_table_t t;
    for (int j = 0; j < int'(NSEG); j++)
      t[j] = {ppa_c0(j), ppa_c1(j), ppa_c2(j)};
    return t;
  endfunction

  localparam coef_table_t COEFS = gen_coefs();

  // signed offset from the midpoint, weight 2^-23: x[14:0] - 2^14
  logic signed [OFF_W-1:0] d0;
  assign d0 = {~x[OFF_W-1], x[OFF_W-2:0]};

  // stage group 1: table read
  logic [COEF_W-1:0]       coef1;
  logic signed [OFF_W-1:0] d1;
  pipe_delay #(.WIDTH(COEF_W + OFF_W), .DEPTH(ROM_LATENCY)) u_rom_pipe (
    .clk(clk), .rst(rst), .d({COEFS[x[22 -: PPA_SEG_W]], d0}), .q({coef1, d1})
  );

  logic [PPA_C0_W-1:0] c0_1;
  logic [PPA_C1_W-1:0] c1_1;
  logic [PPA_C2_W-1:0] c2_1;
  assign {c0_1, c1_1, c2_1} = coef1;

  // stage group 2: t = c1 - d*c2 (weight 2^-24)
  logic signed [OFF_W+PPA_C2_W:0] p1;
  logic signed [PPA_C1_W+1:0]     t1;
  assign p1 = d1 * $signed({1'b0, c2_1});
  assign t1 = $signed({2'b00, c1_1}) - (PPA_C1_W+2)'(p1 >>> 13);

  logic signed [PPA_C1_W+1:0] t2;
  logic signed [OFF_W-1:0]    d2;
  logic [PPA_C0_W-1:0]        c0_2;
  pipe_delay #(.WIDTH(PPA_C1_W + 2 + OFF_W + PPA_C0_W), .DEPTH(MUL_LATENCY)) u_mul1_pipe (
    .clk(clk), .rst(rst), .d({t1, d1, c0_1}), .q({t2, d2, c0_2})
  );

  // stage group 3: y = c0 - d*t (weight 2^-28)
  logic signed [OFF_W+PPA_C1_W+2:0] p2;
  logic signed [PPA_C0_W+1:0]       y2;
  assign p2 = d2 * t2;
  assign y2 = $signed({2'b00, c0_2}) - (PPA_C0_W+2)'(p2 >>> 19);

  logic signed [PPA_C0_W+1:0] y3;
  pipe_delay #(.WIDTH(PPA_C0_W + 2), .DEPTH(MUL_LATENCY)) u_mul2_pipe (
    .clk(clk), .rst(rst), .d(y2), .q(y3)
  );

  // rounding to weight 2^-24; the carry out of bit 23 is dropped on purpose
  logic [PPA_C0_W+1:0] y_round;
  assign y_round = $unsigned(y3) + (PPA_C0_W+2)'(8);

  always_ff @(posedge clk) begin
    if (rst) r <= '0;
    else     r <= y_round[27:4];
  end
endmodule
