// tb_tan_near_pi2_lut: reads all 256 entries of the near-pi/2 table. For
// index k the input is the binary32 value in 0x3FC90EDC..0x3FC90FDB whose low
// byte is k; the expected entry is tan() of that value in double precision,
// rounded to binary32. Also checks that the last entry (pi/2 rounded up) is
// negative and the first one positive. Results 3 cycles after the address.
module tb_tan_near_pi2_lut;
  import tb_fp_ref_pkg::*;

  localparam int LAT = 3;

  logic        clk = 1'b0, rst = 1'b1;
  logic [7:0]  idx = '0;
  logic [31:0] y;
  int checks = 0, failures = 0;

  tan_near_pi2_lut dut (.clk(clk), .rst(rst), .idx(idx), .y(y));
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] e, v;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    // walk the window in increasing order of x
    for (int k = 0; k < 256 + LAT - 1; k++) begin
      v = 32'h3FC9_0EDC + 32'(k - LAT + 1);
      if (k < 256) idx = 8'(32'h3FC9_0EDC + 32'(k));
      @(posedge clk);
      #1;
      if (k >= LAT - 1) begin
        e = to_sp($tan(from_sp(v)));
        checks++;
        if (y !== e) begin
          failures++;
          if (failures < 10) $display("FAIL x=%h expected %h got %h", v, e, y);
        end
        if (k == LAT - 1 || k == 254 + LAT) begin
          checks++;
          if (y[31] != (k != LAT - 1)) begin
            failures++;
            $display("FAIL sign of tan(%h) is %b", v, y[31]);
          end
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
