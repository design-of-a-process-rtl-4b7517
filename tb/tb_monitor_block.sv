// tb_monitor_block: full 400-element block. Raises EN, waits for the latches,
// captures with SE low, shifts the 800 results out and compares each with
// the sign of the length error given to that monitor (b = 0 when the
// transistor under test is longer than the reference). Also checks that
// bits shifted in at SI come out behind them.
module tb_monitor_block;
  timeunit 1ps; timeprecision 1fs;
  localparam int NE = 400, NB = 800;
  int checks = 0, failures = 0;
  logic en = 0, clk = 0, se = 0, si = 0, so;
  logic [NB-1:0] got, exp;
  int n_fail_m1 = 0, n_fail_m3 = 0;

  monitor_block dut (.en(en), .clk(clk), .se(se), .si(si), .so(so));

  always #2000 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < NE; e++) begin
      automatic int dl1 = 20 + 3 * (((e * 13) % 21) - 10);
      automatic int dl3 = -20 + 3 * (((e * 17) % 21) - 10);
      exp[2*e]   = (dl1 > 0) ? 1'b0 : 1'b1;
      exp[2*e+1] = (dl3 > 0) ? 1'b0 : 1'b1;
    end
    @(negedge clk) en = 1;
    #30000;
    @(negedge clk) se = 0;
    @(negedge clk) se = 1;
    for (int s = 0; s < NB; s++) begin
      got[NB-1-s] = so;
      si = s[0];
      @(negedge clk);
    end
    for (int p = 0; p < NB; p++) begin
      checks++;
      if (got[p] !== exp[p]) begin failures++; $display("monitor bit %0d: %b expected %b", p, got[p], exp[p]); end
    end
    for (int e = 0; e < NE; e++) begin
      if (!got[2*e]) n_fail_m1++;
      if (got[2*e+1]) n_fail_m3++;
    end
    $display("M1 longer than M2 in %0d of %0d elements, M3 shorter in %0d", n_fail_m1, NE, n_fail_m3);
    for (int s = 0; s < 8; s++) begin
      checks++;
      if (so !== s[0]) begin failures++; $display("scan-through bit %0d wrong", s); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
