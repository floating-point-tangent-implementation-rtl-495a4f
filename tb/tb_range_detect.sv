// tb_range_detect: checks the two range flags against comparisons made on
// the real value of |x|: is_small when |x| < 2^-12, is_near when |x| lies
// between 1.5707660 (0x3FC90EDC) and the binary32 value of pi/2
// (0x3FC90FDB). Random magnitudes over the whole range plus the boundary
// encodings on both sides. Combinational: outputs are checked 1 ns after
// each input change.
module tb_range_detect;
  import tb_fp_ref_pkg::*;

  logic [30:0] ax = '0;
  logic        is_small, is_near;
  int checks = 0, failures = 0;

  range_detect dut (.abs_x(ax), .is_small(is_small), .is_near(is_near));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [30:0] v);
    real r;
    logic es, en;
    ax = v;
    #1;
    r  = from_sp({1'b0, v});
    es = (r < pow2(-12));
    en = (r >= 1.5707659721374512) && (r <= 1.5707963705062866);
    checks++;
    if (is_small !== es || is_near !== en) begin
      failures++;
      if (failures < 10) $display("FAIL x=%h small %b/%b near %b/%b", v, is_small, es, is_near, en);
    end
  endtask

  initial begin
    logic [30:0] edges[$];
    edges = '{31'h3980_0000, 31'h397F_FFFF, 31'h0, 31'h3FC9_0EDB, 31'h3FC9_0EDC,
              31'h3FC9_0FDB, 31'h3FC9_0FDC, 31'h3F80_0000, 31'h4000_0000};
    foreach (edges[i]) check(edges[i]);
    for (int i = 0; i < 3000; i++) check(31'({8'(100 + ($urandom % 28)), 23'($urandom)}));
    for (int i = 0; i < 1000; i++) check(31'h3FC9_0E00 + 31'($urandom % 512));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
