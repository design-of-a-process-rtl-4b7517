// tb_monitor_cell: a monitor with a longer transistor under test (+50 pm) and
// one with a shorter one (-50 pm). Both nodes stay high while en is low and
// until the latch settles (22.5 ns); then b = 0 for the longer transistor and
// b = 1 for the shorter one, with a the complement.
module tb_monitor_cell;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic en, a_l, b_l, a_s, b_s;

  monitor_cell #(.DELTA_L_PM(50))  dut_l (.en(en), .a(a_l), .b(b_l));
  monitor_cell #(.DELTA_L_PM(-50)) dut_s (.en(en), .a(a_s), .b(b_s));

  task automatic chk(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0;
    #1000;
    for (int r = 0; r < 3; r++) begin
      chk({a_l, b_l, a_s, b_s} == 4'b1111, "nodes not precharged with en low");
      en = 1;
      #20000;
      chk({a_l, b_l, a_s, b_s} == 4'b1111, "latch resolved before its settling time");
      #5000;
      chk(a_l == 1 && b_l == 0, "longer transistor: wrong state");
      chk(a_s == 0 && b_s == 1, "shorter transistor: wrong state");
      en = 0;
      #1000;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
