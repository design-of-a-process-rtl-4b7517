// tb_freq_divider: 10-stage divider; 8192 input periods must give exactly
// 16 output edges (8 periods, f/1024) whatever the initial state.
module tb_freq_divider;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic clk_in = 1'b0, clk_out;
  int edges = 0;

  freq_divider dut (.clk_in(clk_in), .clk_out(clk_out));

  always @(clk_out) edges++;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20;
    for (int r = 0; r < 3; r++) begin
      edges = 0;
      for (int k = 0; k < 8192; k++) begin
        clk_in = 1'b1; #5;
        clk_in = 1'b0; #5;
      end
      checks++;
      if (edges != 16) begin
        failures++;
        $display("round %0d: %0d output edges, expected 16", r, edges);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
