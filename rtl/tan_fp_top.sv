// tan_fp_top: pipelined binary32 tangent for inputs in [-pi/2, pi/2], built
// around floating-point adders and multipliers.
//
// |X| is split into three parts, |X| = c + a + b: c (weights 2^0..2^-8) and a
// (2^-9..2^-17) come from a fixed-point cast of |X| and index two tables of
// tan(c) and tan(a); b, the rest, is cut out of the fraction by a mask and
// kept in floating point. With t = tan(a) + b (tan(a+b) ~ tan(a) + b since
// b < 2^-17), the tangent-of-a-sum identity gives
//   tan|X| ~ (t + tan(c)) / (1 - t*tan(c)).
// Numerator, product and denominator are FP additions and a multiplication;
// the reciprocal of the denominator uses a piecewise polynomial on its
// fraction, carries the sign of X (tan(-x) = -tan(x)), and one last FP
// multiplication gives the result. A 2-bit select then returns X itself when
// |X| < 2^-12, the near-pi/2 table within 256 ulp of pi/2, and the datapath
// result otherwise.
//
// The decomposition, the order of operations, the two special ranges and
// the total latency of 32 follow the published architecture. The split of
// that latency among the units, the valid bit and the reset are this
// design's choices.
//
// Interface: x is sampled every cycle with in_valid; r and out_valid follow
// LATENCY cycles later (32 with the default unit latencies), one result per
// cycle, no stalls. Inputs outside [-pi/2, pi/2], infinities and NaNs are not
// supported. rst is synchronous and active high and clears the pipeline.
module tan_fp_top #(
  parameter int unsigned LUT_LATENCY     = 3,
  parameter int unsigned ADD_LATENCY     = 4,
  parameter int unsigned MUL_LATENCY     = 4,
  parameter int unsigned PPA_ROM_LATENCY = 2,
  parameter int unsigned PPA_MUL_LATENCY = 3
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  tan_fp_pkg::fp32_t    x,
  output logic                 out_valid,
  output tan_fp_pkg::fp32_t    r
);
  import tan_fp_pkg::*;

  // ---- schedule: cycle at which each value leaves its unit ----
  localparam int unsigned ALIGN_LATENCY = 2;
  localparam int unsigned INV_LATENCY   = PPA_ROM_LATENCY + 2 * PPA_MUL_LATENCY + 2;
  localparam int unsigned T_LUT  = ALIGN_LATENCY + LUT_LATENCY;   // tan(c), tan(a)
  localparam int unsigned T_B    = 1 + ADD_LATENCY;               // b
  localparam int unsigned T_AB   = (T_LUT > T_B) ? T_LUT : T_B;   // add1 inputs
  localparam int unsigned T_T    = T_AB + ADD_LATENCY;            // t = tan(a) + b
  localparam int unsigned T_N    = T_T + ADD_LATENCY;             // numerator
  localparam int unsigned T_P    = T_T + MUL_LATENCY;             // t * tan(c)
  localparam int unsigned T_D    = T_P + ADD_LATENCY;             // denominator
  localparam int unsigned T_INV  = T_D + INV_LATENCY;             // 1/D with sign
  localparam int unsigned T_R    = T_INV + MUL_LATENCY;           // N / D
  localparam int unsigned LATENCY = T_R + 1;                      // output mux

  fp32_t abs_x;
  assign abs_x = {1'b0, x.exp, x.frac};

  // ---- operand split ----
  logic [8:0] seg_c, seg_a;
  fixed_point_align u_align (
    .clk(clk), .rst(rst), .exp_x(x.exp), .frac_x(x.frac), .c(seg_c), .a(seg_a)
  );

  fp32_t tan_c, tan_a, b_raw;
  tan_c_lut #(.LATENCY(LUT_LATENCY)) u_lut_c (.clk(clk), .rst(rst), .idx(seg_c), .y(tan_c));
  tan_a_lut #(.LATENCY(LUT_LATENCY)) u_lut_a (.clk(clk), .rst(rst), .idx(seg_a), .y(tan_a));

  b_extract #(.ADD_LATENCY(ADD_LATENCY)) u_b (
    .clk(clk), .rst(rst), .exp_x(x.exp), .frac_x(x.frac), .b(b_raw)
  );

  fp32_t tan_a_al, b_al, tan_c_t;
  pipe_delay #(.WIDTH(32), .DEPTH(T_AB - T_LUT)) u_dly_a (.clk(clk), .rst(rst), .d(tan_a), .q(tan_a_al));
  pipe_delay #(.WIDTH(32), .DEPTH(T_AB - T_B))   u_dly_b (.clk(clk), .rst(rst), .d(b_raw), .q(b_al));
  pipe_delay #(.WIDTH(32), .DEPTH(T_T - T_LUT))  u_dly_c (.clk(clk), .rst(rst), .d(tan_c), .q(tan_c_t));

  // ---- numerator and denominator ----
  fp32_t t_sum, num, prod, den;
  fp_add #(.LATENCY(ADD_LATENCY)) u_add_t (
    .clk(clk), .rst(rst), .a(tan_a_al), .b(b_al), .sub(1'b0), .y(t_sum)
  );
  fp_add #(.LATENCY(ADD_LATENCY)) u_add_n (
    .clk(clk), .rst(rst), .a(t_sum), .b(tan_c_t), .sub(1'b0), .y(num)
  );
  fp_mul #(.LATENCY(MUL_LATENCY)) u_mul_p (
    .clk(clk), .rst(rst), .a(tan_c_t), .b(t_sum), .y(prod)
  );
  fp_add #(.LATENCY(ADD_LATENCY)) u_sub_d (
    .clk(clk), .rst(rst), .a(FP_ONE), .b(prod), .sub(1'b1), .y(den)
  );

  // ---- reciprocal (with the sign of X) and final product ----
  logic sign_d;
  pipe_delay #(.WIDTH(1), .DEPTH(T_D)) u_dly_sign (.clk(clk), .rst(rst), .d(x.sign), .q(sign_d));

  fp32_t inv;
  fp_recip #(.PPA_ROM_LATENCY(PPA_ROM_LATENCY), .PPA_MUL_LATENCY(PPA_MUL_LATENCY)) u_recip (
    .clk(clk), .rst(rst), .d(den), .sign_in(sign_d), .y(inv)
  );

  fp32_t num_al, quot;
  pipe_delay #(.WIDTH(32), .DEPTH(T_INV - T_N)) u_dly_n (.clk(clk), .rst(rst), .d(num), .q(num_al));
  fp_mul #(.LATENCY(MUL_LATENCY)) u_mul_r (
    .clk(clk), .rst(rst), .a(num_al), .b(inv), .y(quot)
  );

  // ---- special ranges and output select ----
  logic is_small, is_near;
  range_detect u_range (.abs_x(abs_x[30:0]), .is_small(is_small), .is_near(is_near));

  fp32_t near_val, near_al, x_al;
  logic  x_sign_lut;
  pipe_delay #(.WIDTH(1), .DEPTH(LUT_LATENCY)) u_dly_sign_lut (
    .clk(clk), .rst(rst), .d(x.sign), .q(x_sign_lut)
  );
  tan_near_pi2_lut #(.LATENCY(LUT_LATENCY)) u_lut_near (
    .clk(clk), .rst(rst), .idx(x.frac[7:0]), .y(near_val)
  );
  // the table holds tan(|x|); the sign of X is applied here
  pipe_delay #(.WIDTH(32), .DEPTH(T_R - LUT_LATENCY)) u_dly_near (
    .clk(clk), .rst(rst), .d({near_val.sign ^ x_sign_lut, near_val.exp, near_val.frac}), .q(near_al)
  );

  logic [1:0] sel_al;   // {near, small}
  pipe_delay #(.WIDTH(32 + 2), .DEPTH(T_R)) u_dly_x (
    .clk(clk), .rst(rst), .d({x, is_near, is_small}), .q({x_al, sel_al})
  );

  always_ff @(posedge clk) begin
    if (rst) r <= '0;
    else begin
      unique case (sel_al)
        2'b01:   r <= x_al;
        2'b10:   r <= near_al;
        default: r <= quot;
      endcase
    end
  end

  pipe_delay #(.WIDTH(1), .DEPTH(LATENCY)) u_dly_valid (
    .clk(clk), .rst(rst), .d(in_valid), .q(out_valid)
  );
endmodule
