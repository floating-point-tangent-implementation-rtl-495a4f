// tb_fp_mul: checks fp_mul against double-precision products rounded to
// binary32 (exact in double, so the rounding is the correct one). Random
// operands over the whole exponent range, exact halfway products (ties) (covering flush to zero and
// overflow to infinity), zeros, infinities and 0 * inf. Also checks the
// 4-cycle latency and one result per cycle.
module tb_fp_mul;
  import tb_fp_ref_pkg::*;

  localparam int LAT = 4;
  localparam int N   = 20000;

  logic        clk = 1'b0, rst = 1'b1;
  logic [31:0] a = '0, b = '0, y;
  int checks = 0, failures = 0;

  fp_mul dut (.clk(clk), .rst(rst), .a(a), .b(b), .y(y));
  always #5 clk = ~clk;

  initial begin
    repeat (N + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] exp_q[$];

  function automatic logic [31:0] rand_fp(int lo, int hi);
    return {1'($urandom), 8'(lo + int'($urandom % (hi - lo + 1))), 23'($urandom)};
  endfunction

  function automatic logic [31:0] reference(logic [31:0] p, logic [31:0] q);
    logic s;
    s = p[31] ^ q[31];
    if ((p[30:23] == 8'hFF && q[30:23] == 0) || (q[30:23] == 8'hFF && p[30:23] == 0))
      return 32'h7FC0_0000;
    if (p[30:23] == 8'hFF || q[30:23] == 8'hFF) return {s, 8'hFF, 23'd0};
    if (p[30:23] == 0 || q[30:23] == 0) return {s, 31'd0};
    return to_sp(from_sp(p) * from_sp(q)) | {s, 31'd0};
  endfunction

  always @(posedge clk) begin
    if (!rst && exp_q.size() > LAT) begin
      logic [31:0] e;
      e = exp_q.pop_front();
      checks++;
      if (y !== e) begin
        failures++;
        if (failures < 10) $display("FAIL expected %h got %h", e, y);
      end
    end
  end

  initial begin
    logic [31:0] p, q;
    int unsigned kind;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int i = 0; i < LAT; i++) begin
      @(negedge clk) a = 0; b = 0;
      exp_q.push_back(32'd0);
    end
    for (int i = 0; i < N; i++) begin
      kind = $urandom % 5;
      case (kind)
        0: begin p = rand_fp(1, 254);  q = rand_fp(1, 254); end
        1: begin p = rand_fp(100, 150); q = rand_fp(100, 150); end
        // exact halfway products: 1.5 * q with q's last bit set and q < 4/3
        3: begin
          p = {1'($urandom), 8'(100 + $urandom % 40), 23'h40_0000};
          q = {1'($urandom), 8'(100 + $urandom % 40), 23'($urandom % 32'h2A_AAAA) | 23'd1};
        end
        2: begin p = rand_fp(110, 140); q = ($urandom % 2 == 1) ? 32'd0 : rand_fp(60, 70); end
        default: begin p = rand_fp(60, 190); q = rand_fp(60, 190); end
      endcase
      if (i == 7) q = 32'h7F80_0000;
      if (i == 8) begin p = 32'hFF80_0000; q = 32'd0; end
      @(negedge clk);
      a = p; b = q;
      exp_q.push_back(reference(p, q));
    end
    @(negedge clk) a = 0; b = 0;
    repeat (LAT + 2) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
