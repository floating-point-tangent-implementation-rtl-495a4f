// range_detect: classifies |X| for the output multiplexer.
//
// is_small: expX < 115, i.e. |X| < 2^-12, where tan(x) rounds to x and X is
// returned unchanged. is_near: |X| lies in the 256-ulp window NEAR_LO..PI2_SP
// just below pi/2, where the result is read from tan_near_pi2_lut.
// The two flags form the 2-bit select {near, small}; at most one is set.
// The threshold 115 and the 256-ulp window follow the published
// architecture; the one-hot select encoding is a choice.
// Purely combinational.
module range_detect (
  input  logic [30:0] abs_x,
  output logic        is_small,
  output logic        is_near
);
  import tan_fp_pkg::*;

  assign is_small = abs_x[30:23] < SMALL_EXP;
  always_comb assert (!(is_small && is_near)) else $error("range flags overlap");

  assign is_near  = (abs_x >= NEAR_LO[30:0]) && (abs_x <= PI2_SP[30:0]);
endmodule
