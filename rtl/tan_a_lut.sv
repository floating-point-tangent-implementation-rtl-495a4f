// tan_a_lut: table of tan(a) in binary32 for the 9-bit segment a of the
// fixed-point input.
//
// Entry k holds tan(a = k * 2^-17), k = 0..511, rounded to nearest binary32 and
// computed at elaboration. Size, indexing and binary32 contents follow the published
// architecture; the read latency is a choice.
//
// Timing: a read-only memory read followed by LATENCY output registers
// (LATENCY >= 1); the entry appears LATENCY cycles after idx, one read per
// cycle.
module tan_a_lut #(
  parameter int unsigned LATENCY = 3
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [8:0]           idx,
  output tan_fp_pkg::fp32_t    y
);
  import tan_fp_pkg::*;

  typedef logic [511:0][31:0] table_t;

  function automatic table_t gen_table();
    table_t t;
    for (int k = 0; k < 512; k++)
      t[k] = real_to_sp($tan(real'(k) / 131072.0));
    return t;
  endfunction

  localparam table_t TABLE = gen_table();

  fp32_t rd;
  assign rd = TABLE[idx];

  pipe_delay #(.WIDTH(32), .DEPTH(LATENCY)) u_pipe (
    .clk(clk), .rst(rst), .d(rd), .q(y)
  );
endmodule
