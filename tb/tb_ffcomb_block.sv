// tb_ffcomb_block: the default block computes paths 1..4. Checks every input
// value one clock after it is loaded, the reset, and a 4-bit scan shift.
module tb_ffcomb_block;
  import dc_ref_pkg::*;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n, se, si, so;
  logic [3:0] d, y, exp;

  ffcomb_block dut (.clk(clk), .rst_n(rst_n), .se(se), .si(si), .d(d), .y(y), .so(so));

  always #500 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; se = 0; si = 0; d = 4'hf;
    #700;
    checks++;
    if (y !== core_out(16'h0)[3:0]) begin failures++; $display("reset value wrong"); end
    rst_n = 1;
    for (int v = 0; v < 16; v++) begin
      @(negedge clk) d = 4'(v);
      @(negedge clk);
      exp = core_out({12'h0, 4'(v)})[3:0];
      checks++;
      if (y !== exp) begin failures++; $display("in=%h y=%b expected %b", v, y, exp); end
    end
    // scan: shift 1,0,1,1 in; the register then holds 4'b1011 (first bit on top)
    se = 1;
    for (int s = 0; s < 4; s++) begin
      @(negedge clk) si = (s == 1) ? 1'b0 : 1'b1;
    end
    @(negedge clk);
    se = 0;
    checks++;
    if (y !== core_out(16'h000b)[3:0] || so !== 1'b1) begin failures++; $display("scan load wrong, y=%b", y); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
