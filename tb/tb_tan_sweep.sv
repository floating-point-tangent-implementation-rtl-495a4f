// tb_tan_sweep: accuracy sweep of tan_fp_top at its default parameters over
// the whole input domain.
//
// For every binade of the main datapath (biased exponents 115..127) it steps
// through the fraction with a fixed stride, alternating the sign, and then
// runs every encoding from EDGE_LO (1.56970) up to pi/2: the last 0.0011
// before the near-pi/2 window and the 256-value window itself. Each result is compared with tan() in double precision.
// The bound is 4 ulp, and 10 ulp for EDGE_LO <= |x| < the window (where the
// denominator cancels). The worst error of each binade is printed.
module tb_tan_sweep;
  import tb_fp_ref_pkg::*;

  localparam int          STRIDE       = 17;
  localparam real         MAX_ULP      = 4.0;
  localparam real         MAX_ULP_EDGE = 10.0;
  localparam logic [30:0] EDGE_LO      = 31'h3FC8_EC00;
  localparam logic [30:0] NEAR_LO      = 31'h3FC9_0EDC;
  localparam logic [30:0] PI2          = 31'h3FC9_0FDB;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic        in_valid = 1'b0;
  logic [31:0] x_in = '0;
  logic        out_valid;
  logic [31:0] r_out;

  tan_fp_top dut (
    .clk(clk), .rst(rst), .in_valid(in_valid), .x(x_in),
    .out_valid(out_valid), .r(r_out)
  );

  always #5 clk = ~clk;

  int  checks = 0, failures = 0;
  real worst[16];
  real worst_edge = 0.0, worst_near = 0.0;

  logic [31:0] inq[$];

  initial begin
    repeat (8_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!rst && out_valid) begin
      logic [31:0] xv;
      logic [30:0] ax;
      real err, lim;
      xv  = inq.pop_front();
      ax  = xv[30:0];
      err = ulp_err(r_out, $tan(from_sp(xv)));
      lim = (ax >= EDGE_LO && ax < NEAR_LO) ? MAX_ULP_EDGE : MAX_ULP;
      if (ax >= NEAR_LO) begin
        if (err > worst_near) worst_near = err;
      end else if (ax >= EDGE_LO) begin
        if (err > worst_edge) worst_edge = err;
      end else if (err > worst[ax[26:23]]) worst[ax[26:23]] = err;
      checks++;
      if (err > lim || (r_out[31] != ($tan(from_sp(xv)) < 0.0))) begin
        failures++;
        if (failures < 20) $display("FAIL x=%h got %h err %0.2f ulp", xv, r_out, err);
      end
    end
  end

  task automatic drive(logic [31:0] v);
    @(negedge clk);
    x_in = v;
    in_valid = 1'b1;
    inq.push_back(v);
  endtask

  initial begin
    int n;
    foreach (worst[i]) worst[i] = 0.0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    n = 0;
    for (int e = 115; e <= 127; e++) begin
      for (int f = 0; f < (1 << 23); f += STRIDE) begin
        logic [31:0] v;
        v = {1'(n % 2), 8'(e), 23'(f)};
        n++;
        if (v[30:0] < EDGE_LO) drive(v);
      end
    end
    for (logic [30:0] a = EDGE_LO; a <= PI2; a++) drive({1'(a[0]), a});
    @(negedge clk) in_valid = 1'b0;
    while (inq.size() != 0) @(posedge clk);
    for (int e = 115; e <= 127; e++)
      $display("binade 2^%0d: worst %0.3f ulp", e - 127, worst[e % 16]);
    $display("from EDGE_LO to the window: worst %0.3f ulp", worst_edge);
    $display("near-pi/2 window: worst %0.3f ulp", worst_near);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
