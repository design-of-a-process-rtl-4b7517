// tb_ringo: a 7-deep NAND-first ring and an 11-deep NOR-first ring. Checks
// the rest level when stopped, that the ring runs only when started, and the
// period 2 * depth * gate delay.
module tb_ringo;
  import testchip_pkg::*;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic en_a, en_o, out_a, out_o;
  realtime ta [$], to [$];

  ringo #(.DEPTH(7),  .FIRST(FIRST_NAND), .GATE_DELAY_FS(16200)) dut_a (.en(en_a), .out(out_a));
  ringo #(.DEPTH(11), .FIRST(FIRST_NOR),  .GATE_DELAY_FS(20000)) dut_o (.en(en_o), .out(out_o));

  always @(posedge out_a) ta.push_back($realtime);
  always @(posedge out_o) to.push_back($realtime);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real absr(real x);
    return x < 0.0 ? -x : x;
  endfunction

  task automatic chk(bit c, string msg);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    en_a = 1'b0;
    en_o = 1'b1;
    #2000;
    chk(out_a == 1'b1, "stopped NAND ring not high");
    chk(out_o == 1'b0, "stopped NOR ring not low");
    ta.delete(); to.delete();
    #5000;
    chk(ta.size() == 0 && to.size() == 0, "stopped ring oscillates");
    en_a = 1'b1;
    en_o = 1'b0;
    #20000;
    chk(ta.size() > 50, "NAND ring does not run");
    chk(to.size() > 40, "NOR ring does not run");
    if (ta.size() > 10)
      chk(absr((ta[10] - ta[5]) / 5.0 - 226.8) < 0.01, $sformatf("NAND ring period %f ps", (ta[10] - ta[5]) / 5.0));
    if (to.size() > 10)
      chk(absr((to[10] - to[5]) / 5.0 - 440.0) < 0.01, $sformatf("NOR ring period %f ps", (to[10] - to[5]) / 5.0));
    en_a = 1'b0;
    en_o = 1'b1;
    #2000;
    ta.delete(); to.delete();
    #5000;
    chk(ta.size() == 0 && to.size() == 0, "ring keeps running after stop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
