// tb_fixed_point_align: checks the fixed-point split of |x| into c and a.
// The reference is floor(|x| * 2^17), computed in double precision: c is its
// upper 9 bits (weights 2^0..2^-8), a its lower 9 bits (2^-9..2^-17). Inputs
// cover every exponent from 115 to 127 with random fractions, one per cycle;
// results are expected exactly 2 cycles later.
module tb_fixed_point_align;
  import tb_fp_ref_pkg::*;

  localparam int LAT = 2;
  localparam int N   = 5000;

  logic        clk = 1'b0, rst = 1'b1;
  logic [7:0]  e_in = '0;
  logic [22:0] f_in = '0;
  logic [8:0]  c, a;
  int checks = 0, failures = 0;

  fixed_point_align dut (.clk(clk), .rst(rst), .exp_x(e_in), .frac_x(f_in), .c(c), .a(a));
  always #5 clk = ~clk;

  initial begin
    repeat (N + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [17:0] exp_q[$];
  logic        live_q[$];

  always @(posedge clk) begin
    if (!rst && live_q.size() > LAT) begin
      logic [17:0] e;
      logic        live;
      e = exp_q.pop_front();
      live = live_q.pop_front();
      if (live) begin
        checks++;
        if ({c, a} !== e) begin
          failures++;
          if (failures < 10) $display("FAIL expected c=%0d a=%0d got c=%0d a=%0d", e[17:9], e[8:0], c, a);
        end
      end
    end
  end

  initial begin
    logic [31:0] v;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int i = 0; i < LAT; i++) begin
      @(negedge clk);
      exp_q.push_back('0); live_q.push_back(1'b0);
    end
    for (int i = 0; i < N; i++) begin
      v = {1'b0, 8'(115 + ($urandom % 13)), 23'($urandom)};
      if (i < 13) v = {1'b0, 8'(115 + i), 23'h7F_FFFF};
      @(negedge clk);
      e_in = v[30:23]; f_in = v[22:0];
      exp_q.push_back(18'(longint'($floor(from_sp(v) * 131072.0))));
      live_q.push_back(1'b1);
    end
    repeat (LAT + 2) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
