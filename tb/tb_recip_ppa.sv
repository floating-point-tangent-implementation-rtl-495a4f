// tb_recip_ppa: checks the 1/(1+x) approximation. For a 23-bit fraction x
// the reference is 1/(1 + x*2^-23) in double precision. The output r is read
// as r*2^-24 when its bit of weight 1/2 is set and as exactly 1 when it is
// clear; the error must stay within MAX_ERR units of 2^-24 (a faithful
// result). Covers x = 0 (must give 1), segment edges and random values, one
// per cycle, with results exactly 9 cycles later.
module tb_recip_ppa;
  localparam int  LAT     = 9;
  localparam int  N       = 50000;
  localparam real MAX_ERR = 0.75;

  logic        clk = 1'b0, rst = 1'b1;
  logic [22:0] x = '0;
  logic [23:0] r;
  int checks = 0, failures = 0;
  real worst = 0.0;

  recip_ppa dut (.clk(clk), .rst(rst), .x(x), .r(r));
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
      real e, got, err;
      logic live;
      e = exp_q.pop_front();
      live = live_q.pop_front();
      if (live) begin
        got = r[23] ? real'(r) / 16777216.0 : 1.0;
        err = (got - e) * 16777216.0;
        if (err < 0.0) err = -err;
        if (err > worst) worst = err;
        checks++;
        if (err > MAX_ERR) begin
          failures++;
          if (failures < 10) $display("FAIL expected %.9f got %.9f (r=%h)", e, got, r);
        end
      end
    end
  end

  initial begin
    logic [22:0] v;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int i = 0; i < LAT; i++) begin
      @(negedge clk);
      exp_q.push_back(0.0); live_q.push_back(1'b0);
    end
    for (int i = 0; i < N; i++) begin
      v = 23'($urandom);
      if (i == 0) v = 23'd0;
      if (i == 1) v = 23'h7F_FFFF;
      if (i == 2) v = 23'h00_7FFF;
      if (i == 3) v = 23'h00_8000;
      if (i % 5 == 4) v[14:0] = ($urandom % 2 == 1) ? 15'h7FFF : 15'h0;
      @(negedge clk);
      x = v;
      exp_q.push_back(1.0 / (1.0 + real'(v) / 8388608.0));
      live_q.push_back(1'b1);
    end
    repeat (LAT + 2) @(posedge clk);
    $display("worst error %0.3f units of 2^-24", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
