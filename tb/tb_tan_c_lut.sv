// tb_tan_c_lut: reads every entry of tan_c_lut, one address per cycle, and
// compares it with tan(c = k/256) evaluated in double precision and rounded to
// binary32 by the testbench's own rounding. Results are expected exactly 3
// cycles after the address.
module tb_tan_c_lut;
  import tb_fp_ref_pkg::*;

  localparam int LAT = 3;

  logic        clk = 1'b0, rst = 1'b1;
  logic [8:0]  idx = '0;
  logic [31:0] y;
  int checks = 0, failures = 0;

  tan_c_lut dut (.clk(clk), .rst(rst), .idx(idx), .y(y));
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] e;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int k = 0; k < 512 + LAT - 1; k++) begin
      if (k < 512) idx = 9'(k);
      @(posedge clk);
      #1;
      if (k >= LAT - 1) begin
        e = to_sp($tan(real'(k - LAT + 1) / 256.0));
        checks++;
        if (y !== e) begin
          failures++;
          if (failures < 10) $display("FAIL entry %0d expected %h got %h", k - LAT, e, y);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
