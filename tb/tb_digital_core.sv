// tb_digital_core: functional run (new 16-bit input every clock, each result
// checked 21 clocks later against the Karnaugh-map reference) and a scan test
// through all 336 flip-flops: load a pattern, clock once with se low, shift
// out and check every captured bit (first registers take din, second
// registers the path functions of the first, later ones the previous stage).
module tb_digital_core;
  import dc_ref_pkg::*;
  timeunit 1ps; timeprecision 1fs;
  localparam int NB = 336;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n, se, si, so;
  logic [15:0] din, dout;
  logic [15:0] hist [$];
  logic [NB-1:0] pat, got, exp;

  digital_core dut (.clk(clk), .rst_n(rst_n), .se(se), .si(si), .so(so), .din(din), .dout(dout));

  always #500 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; se = 0; si = 0; din = 0;
    #700;
    checks++;
    if (dout !== 16'h0) begin failures++; $display("reset: dout=%h", dout); end
    rst_n = 1;
    for (int c = 0; c < 100; c++) begin
      @(negedge clk);
      if (c >= 21) begin
        checks++;
        if (dout !== core_out(hist[c-21])) begin
          failures++;
          $display("cycle %0d: dout=%h expected %h", c, dout, core_out(hist[c-21]));
        end
      end
      din = 16'($urandom);
      hist.push_back(din);
    end
    // scan load: scan position p is reached by the bit shifted in at step NB-1-p
    for (int w = 0; w < NB / 32 + 1; w++) pat[w*32 +: 32] = $urandom;
    se = 1;
    for (int s = 0; s < NB; s++) begin
      @(negedge clk) si = pat[NB-1-s];
    end
    @(negedge clk);
    din = 16'($urandom);
    se = 0;
    @(negedge clk);
    se = 1;
    for (int s = 0; s < NB; s++) begin
      got[NB-1-s] = so;
      @(negedge clk);
    end
    for (int c = 0; c < 4; c++) begin
      automatic int base = 84 * c;
      logic [15:0] v;
      exp[base +: 4] = din[4*c +: 4];
      v = '0;
      v[4*c +: 4] = pat[base +: 4];
      for (int j = 0; j < 4; j++) exp[base + 4 + j] = path_out(4*c + j, v);
      for (int p = 8; p < 84; p++) exp[base + p] = pat[base + p - 4];
    end
    for (int p = 0; p < NB; p++) begin
      checks++;
      if (got[p] !== exp[p]) begin failures++; $display("scan position %0d: %b expected %b", p, got[p], exp[p]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
