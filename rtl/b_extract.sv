// b_extract: produces b, the part of |X| below weight 2^-17, as a binary32
// number, so that it can enter the floating-point adders directly.
//
// Stage 1 reads a 23-bit mask from a 16-entry table indexed by the four
// least significant bits i of expX. Entry i is (2+i zeros, 21-i ones), MSB
// first: for a biased exponent 112+i it clears exactly the fraction bits of
// weight 2^-17 and above, which fixed_point_align has already placed in c
// and a. The masked fraction forms (0, expX, fracPostMask) = 2^e(1+b'), and
// an FP subtraction of (0, expX, 0) = 2^e leaves b = 2^e * b' exactly.
// The subtraction is an fp_add instance (a hard FP adder).
//
// The mask format and the exact FP subtraction follow the published
// architecture; the register after the AND is a choice.
//
// Meaningful for biased exponents 115..127. Latency 1 + ADD_LATENCY cycles,
// one input per cycle.
module b_extract #(
  parameter int unsigned ADD_LATENCY = 4
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [7:0]           exp_x,
  input  logic [22:0]          frac_x,
  output tan_fp_pkg::fp32_t    b
);
  import tan_fp_pkg::*;

  typedef logic [15:0][22:0] mask_table_t;

  function automatic mask_table_t gen_masks();
    mask_table_t t;
    for (int i = 0; i < 16; i++) t[i] = 23'h7F_FFFF >> (2 + i);
    return t;
  endfunction

  localparam mask_table_t MASKS = gen_masks();

  fp32_t with_mask_q, base_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      with_mask_q <= '0;
      base_q      <= '0;
    end else begin
      with_mask_q <= {1'b0, exp_x, frac_x & MASKS[exp_x[3:0]]};
      base_q      <= {1'b0, exp_x, 23'd0};
    end
  end

  fp_add #(.LATENCY(ADD_LATENCY)) u_sub (
    .clk(clk), .rst(rst), .a(with_mask_q), .b(base_q), .sub(1'b1), .y(b)
  );
endmodule
