// fp_recip: reciprocal of the positive binary32 denominator D, returned with
// the sign of X attached, so that one multiplication N * (1/D) gives the
// signed tangent.
//
// D = 2^(expD-127) * (1 + fracD). recip_ppa gives r ~ 1/(1 + fracD) in
// (0.5, 1] as 24 bits of weights 2^-1..2^-24; u = r[23] is its bit of weight
// 1/2. If u is clear, r is exactly 1 and the fraction is forced to 0.
// The exponent would be 2*bias - expD, less one when r < 1; both cases are
// one subtraction from newCst = {6'b111111, ~u, u}:
//   u = 1: 253 - expD,  fraction r[22:0]
//   u = 0: 254 - expD,  fraction 0
// newCst and the forced fraction follow the published architecture; the
// reading of its two low bits as ~u, u comes from the 254 / 253 cases above.
// D must be a normal number in (0, 1] or larger finite; zero is not handled.
//
// Latency PPA_ROM_LATENCY + 2*PPA_MUL_LATENCY + 2 cycles (10 by default):
// the PPA plus one packing register. One input per cycle.
module fp_recip #(
  parameter int unsigned PPA_ROM_LATENCY = 2,
  parameter int unsigned PPA_MUL_LATENCY = 3
) (
  input  logic                 clk,
  input  logic                 rst,
  input  tan_fp_pkg::fp32_t    d,
  input  logic                 sign_in,
  output tan_fp_pkg::fp32_t    y
);
  import tan_fp_pkg::*;

  localparam int unsigned PPA_LATENCY = PPA_ROM_LATENCY + 2 * PPA_MUL_LATENCY + 1;

  logic [23:0] r;
  logic [7:0]  exp_d;
  logic        sign_d;

  recip_ppa #(.ROM_LATENCY(PPA_ROM_LATENCY), .MUL_LATENCY(PPA_MUL_LATENCY)) u_ppa (
    .clk(clk), .rst(rst), .x(d.frac), .r(r)
  );

  pipe_delay #(.WIDTH(9), .DEPTH(PPA_LATENCY)) u_exp_pipe (
    .clk(clk), .rst(rst), .d({sign_in, d.exp}), .q({sign_d, exp_d})
  );

  logic       u;
  logic [7:0] new_cst;
  assign u       = r[23];
  assign new_cst = {6'b11_1111, ~u, u};

  always_ff @(posedge clk) begin
    if (rst) y <= '0;
    else     y <= {sign_d, new_cst - exp_d, u ? r[22:0] : 23'd0};
  end
endmodule
