// tb_fp_add: checks fp_add against double-precision arithmetic rounded to
// binary32 (correct rounding, since a double has over twice the bits).
// Random operands of random binades, nearby binades (cancellation), equal
// magnitudes of opposite sign, zeros and infinities, both add and subtract.
// Also checks the 4-cycle latency and one result per cycle.
module tb_fp_add;
  import tb_fp_ref_pkg::*;

  localparam int LAT = 4;
  localparam int N   = 20000;

  logic        clk = 1'b0, rst = 1'b1;
  logic [31:0] a = '0, b = '0, y;
  logic        sub = 1'b0;
  int checks = 0, failures = 0;

  fp_add dut (.clk(clk), .rst(rst), .a(a), .b(b), .sub(sub), .y(y));
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

  function automatic logic [31:0] reference(logic [31:0] p, logic [31:0] q, logic s);
    real r;
    if (p[30:23] == 8'hFF || q[30:23] == 8'hFF) begin
      if (p[30:23] == 8'hFF && q[30:23] == 8'hFF && (p[31] != (q[31] ^ s))) return 32'h7FC0_0000;
      return (p[30:23] == 8'hFF) ? p : {q[31] ^ s, q[30:0]};
    end
    r = s ? from_sp(p) - from_sp(q) : from_sp(p) + from_sp(q);
    if (r == 0.0) return (p[30:0] == 0 && q[30:0] == 0) ? {p[31] & (q[31] ^ s), 31'd0} : 32'd0;
    return to_sp(r);
  endfunction

  // compare LAT cycles after each input
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
    // fill the pipeline with zeros so that the first results line up
    for (int i = 0; i < LAT; i++) begin
      @(negedge clk) a = 0; b = 0; sub = 0;
      exp_q.push_back(32'd0);
    end
    for (int i = 0; i < N; i++) begin
      kind = $urandom % 6;
      case (kind)
        0: begin p = rand_fp(1, 254);  q = rand_fp(1, 254); end
        1: begin p = rand_fp(100, 140); q = rand_fp(100, 140); end
        2: begin p = rand_fp(120, 127); q = {p[31:8] ^ 24'($urandom % 4), 8'($urandom)}; end
        3: begin p = rand_fp(110, 130); q = {~p[31], p[30:0]}; end
        4: begin p = rand_fp(110, 130); q = ($urandom % 2 == 1) ? 32'd0 : 32'h8000_0000; end
        default: begin p = rand_fp(60, 190); q = rand_fp(60, 190); end
      endcase
      if (i == 5) q = 32'h7F80_0000;
      if (i == 6) begin p = 32'h7F80_0000; q = 32'hFF80_0000; end
      if ($urandom % 2 == 1) {p, q} = {q, p};
      @(negedge clk);
      a = p; b = q; sub = 1'($urandom);
      exp_q.push_back(reference(p, q, sub));
    end
    @(negedge clk) a = 0; b = 0;
    repeat (LAT + 2) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
