// tb_selex: the RingO inputs are modelled by the testbench: every started
// line carries one common test clock. Normal mode must pass it at half
// frequency for every address of both arrays; special modes and the disable
// must silence the output while starting the right number of lines.
module tb_selex;
  import testchip_pkg::*;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic [6:0] add;
  logic en11, dis;
  logic [3:0] bsb;
  logic [255:0] sel, ringo;
  logic out, ck = 0;
  int edges;

  selex dut (.add(add), .en11(en11), .dis(dis), .bsb(bsb), .ringo(ringo), .sel(sel), .out(out));

  always #50 ck = ~ck;
  assign ringo = sel & {256{ck}};
  always @(out) edges++;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dis = 0; bsb = BSB_NORMAL;
    for (int e = 0; e < 2; e++)
      for (int a = 0; a < 128; a++) begin
        add = 7'(a); en11 = e[0];
        #200;
        edges = 0;
        #1000;   // 10 test-clock periods
        checks++;
        if (edges != 10) begin failures++; $display("add=%0d en11=%0d: %0d output edges", a, e, edges); end
      end
    for (int m = 1; m <= 4; m++) begin
      bsb = (m == 1) ? BSB_25 : (m == 2) ? BSB_50 : (m == 3) ? BSB_75 : BSB_100;
      add = 7'($urandom);
      #200;
      edges = 0;
      #1000;
      checks++;
      if (edges != 0 || $countones(sel) != 32 * m) begin failures++; $display("mode %b wrong", bsb); end
    end
    bsb = BSB_NORMAL; dis = 1;
    #200;
    edges = 0;
    #1000;
    checks++;
    if (edges != 0 || sel != '0) begin failures++; $display("disable wrong"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
