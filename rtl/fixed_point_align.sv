// fixed_point_align: casts |X| to the fixed-point value that is split into
// the table indices c and a.
//
// Stage 1 subtracts the biased exponent from the bias, giving the right
// shift that aligns the significand so that the hidden 1 lands on weight
// 2^(expX-127). Stage 2 shifts the top 18 bits of '1'&fracX (the hidden bit
// and 17 fraction bits: 9 + 9 bits) right by that amount into an 18-bit
// fixed-point word whose bit 17 has weight 2^0 and bit 0 weight 2^-17; bits
// of lower weight are dropped here and recovered as b by b_extract.
// c = fix[17:9] (bits [35:27] of the 36-bit fixed-point X, weights 2^0..2^-8)
// and a = fix[8:0] (bits [26:18], weights 2^-9..2^-17).
//
// The 9+9-bit shifter, the 2^-17 cut-off and the field positions follow the
// published architecture; the split into two register stages is a choice.
//
// Valid for biased exponents 115..127; exponents above 127 shift by zero and
// the caller bypasses exponents below 115. The six lowest fraction bits are
// not used here: at expX = 127 they are exactly the bits that form b. Latency 2 cycles, one input per
// cycle.
module fixed_point_align (
  input  logic              clk,
  input  logic              rst,
  input  logic [7:0]        exp_x,
  input  logic [22:0]       frac_x,
  output logic [8:0]        c,
  output logic [8:0]        a
);
  import tan_fp_pkg::*;

  logic [7:0]       shamt_q;
  logic [FIX_W-1:0] sig_q;
  logic [FIX_W-1:0] fix_q;

  // stage 1: shift amount = bias - expX (saturated at zero)
  always_ff @(posedge clk) begin
    if (rst) begin
      shamt_q <= '0;
      sig_q   <= '0;
    end else begin
      shamt_q <= (exp_x >= 8'(BIAS)) ? 8'd0 : 8'(BIAS) - exp_x;
      sig_q   <= {1'b1, frac_x[22:23-FIX_W+1]};
    end
  end

  // stage 2: right shift; bits below weight 2^-17 fall off
  always_ff @(posedge clk) begin
    if (rst) fix_q <= '0;
    else     fix_q <= sig_q >> shamt_q;
  end

  assign c = fix_q[FIX_W-1 -: SEG_W];
  assign a = fix_q[SEG_W-1:0];
endmodule
