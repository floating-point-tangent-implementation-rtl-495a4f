// tb_tan_fp_top: end-to-end test of the tangent pipeline at its default
// parameters.
//
// Streams one input per cycle (with occasional idle cycles) and compares each
// result with tan() computed in double precision, in ulps. Inputs cover
// every binade of the main datapath (2^-12 <= |x| < pi/2), the tiny-input
// bypass, the 256-entry window next to pi/2, the edges of each range and
// both signs. Checks: ulp error within MAX_ULP (MAX_ULP_EDGE next to the
// table window), the bypass returning x bit
// for bit, the sign, and the 32-cycle latency measured on the first input.
// Each mechanism (bypass, near-pi/2 table, main path, reciprocal forced to 1
// because the denominator is exactly 1, negative input) is counted and must occur at least once.
module tb_tan_fp_top;
  import tb_fp_ref_pkg::*;

  localparam int  LATENCY = 32;
  localparam int  N_RAND  = 20000;
  // Bound on the error: 4 ulp, except in the last 0.0011 before the
  // near-pi/2 table (|x| >= EDGE_LO), where the denominator cancels and the
  // rounding of the binary32 tan(c) entry is amplified (measured: < 9.6 ulp).
  localparam real         MAX_ULP      = 4.0;
  localparam real         MAX_ULP_EDGE = 10.0;
  localparam logic [30:0] EDGE_LO      = 31'h3FC8_EC00;

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

  int checks = 0, failures = 0;
  int n_small = 0, n_near = 0, n_main = 0, n_neg = 0, n_inv_one = 0;
  real worst = 0.0;
  logic [31:0] worst_x = '0;

  logic [31:0] inq[$];
  int cycle = 0, first_in = -1, first_out = -1;

  always @(posedge clk) cycle <= cycle + 1;


  // watchdog
  initial begin
    repeat (N_RAND * 3 + 20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drive(logic [31:0] v);
    @(negedge clk);
    x_in = v;
    in_valid = 1'b1;
    inq.push_back(v);
    if (first_in < 0) first_in = cycle;
  endtask

  function automatic logic [31:0] rand_main();
    int unsigned e;
    logic [31:0] v;
    e = 115 + ($urandom % 13);
    v = {$urandom % 2 == 1, 8'(e), 23'($urandom)};
    if ({1'b0, v[30:0]} > 32'h3FC9_0EDB) v[30:0] = 31'h3FC9_0EDB - 31'($urandom % 5000);
    return v;
  endfunction

  // checker
  always @(posedge clk) begin
    if (!rst && out_valid) begin
      logic [31:0] xv;
      real xr, ref_v, err;
      logic [30:0] ax;
      xv = inq.pop_front();
      if (first_out < 0) begin
        first_out = cycle;
        checks++;
        if (first_out - first_in != LATENCY) begin
          failures++;
          $display("FAIL latency %0d, expected %0d", first_out - first_in, LATENCY);
        end
      end
      ax = xv[30:0];
      xr = from_sp(xv);
      ref_v = $tan(xr);
      checks++;
      if (xv[31]) n_neg++;
      if (ax[30:23] < 115) begin
        n_small++;
        if (r_out != xv) begin
          failures++;
          $display("FAIL small x=%h got %h", xv, r_out);
        end
      end else begin
        if (ax >= 31'h3FC9_0EDC) n_near++; else n_main++;
        // |x| < 2^-8 gives c = 0, so the denominator is exactly 1 and the
        // reciprocal takes its forced-to-one path
        if (ax[30:23] < 119) n_inv_one++;
        err = ulp_err(r_out, ref_v);
        if (err > worst) begin
          worst = err;
          worst_x = xv;
        end
        if (err > ((ax >= EDGE_LO) ? MAX_ULP_EDGE : MAX_ULP) || (r_out[31] != (ref_v < 0.0))) begin
          failures++;
          if (failures < 20)
            $display("FAIL x=%h (%g) got %h (%g) ref %g err %0.2f ulp", xv, xr, r_out,
                     from_sp(r_out), ref_v, err);
        end
      end
    end
  end

  initial begin
    logic [31:0] edges[$];
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    edges = '{32'h0000_0000, 32'h8000_0000, 32'h3980_0000, 32'h397F_FFFF, 32'h3980_0001,
              32'h3B80_0000, 32'h3B7F_FFFF, 32'h3C00_0000, 32'h3F80_0000, 32'h3F7F_FFFF,
              32'h3FC9_0EDB, 32'h3FC9_0EDC, 32'h3FC9_0FDB, 32'hBFC9_0FDB, 32'h3FC9_0F00,
              32'hBFC9_0EDB, 32'h3F49_0FDB, 32'h3E80_0000, 32'h3A00_0000, 32'h3FC9_0000};
    foreach (edges[i]) drive(edges[i]);
    for (int k = 0; k < 256; k += 7) drive({$urandom % 2 == 1, 8'h7F, 23'h49_0EDC} + 32'(k));
    for (int k = 0; k < 2000; k++) drive({$urandom % 2 == 1, 31'h3FC8_EC00 + 31'($urandom % 32'h22DC)});
    for (int k = 0; k < 200; k++) drive({$urandom % 2 == 1, 8'(1 + $urandom % 114), 23'($urandom)});
    for (int k = 0; k < N_RAND; k++) begin
      if ($urandom % 16 == 0) begin
        @(negedge clk) in_valid = 1'b0;
      end
      drive(rand_main());
    end
    @(negedge clk) in_valid = 1'b0;
    while (inq.size() != 0) @(posedge clk);
    repeat (2) @(posedge clk);
    $display("worst error %0.3f ulp at x=%h; small=%0d near=%0d main=%0d neg=%0d inv_one=%0d",
             worst, worst_x, n_small, n_near, n_main, n_neg, n_inv_one);
    checks++;
    if (n_small == 0 || n_near == 0 || n_main == 0 || n_neg == 0 || n_inv_one == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
