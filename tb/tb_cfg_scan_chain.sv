// tb_cfg_scan_chain: shifts random 15-bit words in, most significant bit
// first; checks the parallel word after each load and that the previous word
// comes out at so during the next load.
module tb_cfg_scan_chain;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic clk = 0, si = 0, so;
  logic [14:0] q, w, prev, outw;

  cfg_scan_chain dut (.clk(clk), .si(si), .so(so), .q(q));

  always #500 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20; n++) begin
      w = 15'($urandom);
      for (int b = 14; b >= 0; b--) begin
        @(negedge clk);
        outw[b] = so;
        si = w[b];
      end
      @(negedge clk);
      checks++;
      if (q !== w) begin failures++; $display("load %0d: q=%h expected %h", n, q, w); end
      if (n > 0) begin
        checks++;
        if (outw !== prev) begin failures++; $display("load %0d: shifted out %h expected %h", n, outw, prev); end
      end
      prev = w;
      // the check above waited one more clock, which shifted once more
      prev = {w[13:0], si};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
