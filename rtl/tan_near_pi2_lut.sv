// tan_near_pi2_lut: table of tan(x) for the 256 binary32 values closest to
// pi/2 from below, where the main datapath loses accuracy because its
// denominator 1 - (tan(a)+b)tan(c) cancels.
//
// The window runs from NEAR_LO = 0x3FC90EDC to PI2_SP = 0x3FC90FDB (pi/2
// rounded to binary32, which lies slightly above pi/2, so its tangent is
// negative). These 256 encodings have distinct low bytes, so the low byte of
// X is the index. Entry k holds tan() of the encoding with low byte k,
// rounded to nearest binary32, computed at elaboration.
// The 256-ulp range follows the published architecture; indexing by the low
// byte and the read latency are this design's choices.
// Read-only memory with LATENCY output registers (LATENCY >= 1).
module tan_near_pi2_lut #(
  parameter int unsigned LATENCY = 3
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [7:0]           idx,
  output tan_fp_pkg::fp32_t    y
);
  import tan_fp_pkg::*;

  typedef logic [255:0][31:0] table_t;

  function automatic table_t gen_table();
    table_t t;
    for (int k = 0; k < 256; k++)
      t[k] = real_to_sp($tan(sp_to_real(near_pi2_code(8'(k)))));
    return t;
  endfunction

  localparam table_t TABLE = gen_table();

  fp32_t rd;
  assign rd = TABLE[idx];

  pipe_delay #(.WIDTH(32), .DEPTH(LATENCY)) u_pipe (
    .clk(clk), .rst(rst), .d(rd), .q(y)
  );
endmodule
