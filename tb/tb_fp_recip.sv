// tb_fp_recip: checks the signed reciprocal. Denominators are random binary32
// values in [2^-30, 1] and exact powers of two (where the PPA result is
// forced to 1); the sign input is random. The result must carry that sign
// and be within MAX_ULP of 1/D computed in double precision. One input per
// cycle, results exactly 10 cycles later.
module tb_fp_recip;
  import tb_fp_ref_pkg::*;

  localparam int  LAT     = 10;
  localparam int  N       = 20000;
  localparam real MAX_ULP = 1.0;

  logic        clk = 1'b0, rst = 1'b1;
  logic [31:0] d = '0, y;
  logic        s = 1'b0;
  int checks = 0, failures = 0, n_pow2 = 0;
  real worst = 0.0;

  fp_recip dut (.clk(clk), .rst(rst), .d(d), .sign_in(s), .y(y));
  always #5 clk = ~clk;

  initial begin
    repeat (N + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real  exp_q[$];
  logic live_q[$];

  always @(posedge clk) begin
    if (!rst && live_q.size() > LAT) begin
      real e, err;
      logic live;
      e = exp_q.pop_front();
      live = live_q.pop_front();
      if (live) begin
        err = ulp_err(y, e);
        if (err > worst) worst = err;
        checks++;
        if (err > MAX_ULP || y[31] != (e < 0.0)) begin
          failures++;
          if (failures < 10) $display("FAIL expected %g got %h (%g)", e, y, from_sp(y));
        end
      end
    end
  end

  initial begin
    logic [31:0] v;
    logic sg;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int i = 0; i < LAT; i++) begin
      @(negedge clk);
      exp_q.push_back(0.0); live_q.push_back(1'b0);
    end
    for (int i = 0; i < N; i++) begin
      v = {1'b0, 8'(97 + ($urandom % 30)), 23'($urandom)};
      if (i % 9 == 0) begin
        v[22:0] = '0;
        n_pow2++;
      end
      if (i == 1) v = 32'h3F80_0000;
      sg = 1'($urandom);
      @(negedge clk);
      d = v; s = sg;
      exp_q.push_back((sg ? -1.0 : 1.0) / from_sp(v));
      live_q.push_back(1'b1);
    end
    repeat (LAT + 2) @(posedge clk);
    $display("worst error %0.3f ulp, %0d powers of two", worst, n_pow2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
