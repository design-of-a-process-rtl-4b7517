// tb_ffcomb_chain: chain 0 (paths 1..4). Streams a new input every clock and
// checks each result arrives exactly 21 clocks later; then shifts an 84-bit
// pattern through the scan path and checks it comes out unchanged.
module tb_ffcomb_chain;
  import dc_ref_pkg::*;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n, se, si, so;
  logic [3:0] d, q;
  logic [3:0] hist [$];
  logic [83:0] pat;

  ffcomb_chain dut (.clk(clk), .rst_n(rst_n), .se(se), .si(si), .d(d), .q(q), .so(so));

  always #500 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; se = 0; si = 0; d = 0;
    #700 rst_n = 1;
    for (int c = 0; c < 80; c++) begin
      @(negedge clk);
      if (c >= 21) begin
        checks++;
        if (q !== core_out({12'h0, hist[c-21]})[3:0]) begin
          failures++;
          $display("cycle %0d: q=%b expected %b", c, q, core_out({12'h0, hist[c-21]})[3:0]);
        end
      end
      d = 4'($urandom);
      hist.push_back(d);
    end
    pat = {$urandom, $urandom, $urandom};
    se = 1;
    for (int s = 0; s < 84; s++) begin
      @(negedge clk) si = pat[s];
    end
    for (int s = 0; s < 84; s++) begin
      @(negedge clk);
      checks++;
      if (so !== pat[s]) begin failures++; $display("scan bit %0d wrong", s); end
      si = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
