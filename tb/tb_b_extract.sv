// tb_b_extract: checks b, the part of |x| below weight 2^-17. The reference
// is |x| - floor(|x| * 2^17) * 2^-17 in double precision, which is exact and
// is then encoded as binary32 (zero when nothing is left). Inputs cover
// every exponent from 115 to 127 with random fractions and with fractions
// whose low bits are all zero or all one, one per cycle; results are
// expected exactly 5 cycles later.
module tb_b_extract;
  import tb_fp_ref_pkg::*;

  localparam int LAT = 5;
  localparam int N   = 5000;

  logic        clk = 1'b0, rst = 1'b1;
  logic [7:0]  e_in = '0;
  logic [22:0] f_in = '0;
  logic [31:0] b;
  int checks = 0, failures = 0;

  b_extract dut (.clk(clk), .rst(rst), .exp_x(e_in), .frac_x(f_in), .b(b));
  always #5 clk = ~clk;

  initial begin
    repeat (N + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] exp_q[$];
  logic        live_q[$];

  always @(posedge clk) begin
    if (!rst && live_q.size() > LAT) begin
      logic [31:0] e;
      logic        live;
      e = exp_q.pop_front();
      live = live_q.pop_front();
      if (live) begin
        checks++;
        if (b !== e) begin
          failures++;
          if (failures < 10) $display("FAIL expected %h got %h", e, b);
        end
      end
    end
  end

  initial begin
    logic [31:0] v;
    real xr;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int i = 0; i < LAT; i++) begin
      @(negedge clk);
      exp_q.push_back('0); live_q.push_back(1'b0);
    end
    for (int i = 0; i < N; i++) begin
      v = {1'b0, 8'(115 + ($urandom % 13)), 23'($urandom)};
      if (i % 7 == 1) v[5:0] = '0;
      if (i % 7 == 2) v[17:0] = '1;
      if (i % 7 == 3) v[22:0] = '0;
      @(negedge clk);
      e_in = v[30:23]; f_in = v[22:0];
      xr = from_sp(v);
      exp_q.push_back(to_sp(xr - $floor(xr * 131072.0) / 131072.0));
      live_q.push_back(1'b1);
    end
    repeat (LAT + 2) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
