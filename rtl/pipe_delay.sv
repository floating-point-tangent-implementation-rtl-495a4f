// pipe_delay: a DEPTH-stage register chain that delays a WIDTH-bit word.
//
// Used to balance the paths of the tangent pipeline so that operands meet at
// each floating-point unit in the same cycle, and as the output pipeline of
// units whose logic is written as one combinational step (synthesis may
// retime the registers into that logic). DEPTH = 0 is a plain wire.
// A generic helper of this design.
// Registers are reset to zero by the synchronous, active-high rst.
module pipe_delay #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [WIDTH-1:0] stage [DEPTH];
    always_ff @(posedge clk) begin
      if (rst) begin
        for (int i = 0; i < int'(DEPTH); i++) stage[i] <= '0;
      end else begin
        stage[0] <= d;
        for (int i = 1; i < int'(DEPTH); i++) stage[i] <= stage[i-1];
      end
    end
    assign q = stage[DEPTH-1];
  end
endmodule
