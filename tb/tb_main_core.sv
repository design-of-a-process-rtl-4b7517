// tb_main_core: loads configurations through the 15-bit scan chain (SI,
// CLKs) and checks OUT runs at f_RingO / 2048 for the addressed RingO, that
// the previous word comes back at SO, and that a special mode or the
// all-disabled code silences OUT.
module tb_main_core;
  import testchip_pkg::*;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic clks = 0, si = 0, so, out;
  core_cfg_t cfg, prev, back;
  realtime t [$];

  main_core dut (.clks(clks), .si(si), .so(so), .out(out));

  always @(posedge out) t.push_back($realtime);

  function automatic real ring_ps(int i, int depth);
    return 2.0 * depth * (16.2 + 0.010 * ((37 * i) % 128));
  endfunction

  task automatic load(core_cfg_t w);
    for (int b = 14; b >= 0; b--) begin
      back[b] = so;
      si = w[b];
      #5000 clks = 1;
      #5000 clks = 0;
    end
  endtask

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prev = '0;
    load(prev);
    for (int n = 0; n < 4; n++) begin
      automatic int a = (n * 37 + 20) % 128;
      automatic int depth = n[0] ? 11 : 7;
      automatic real exp_ps = 2048.0 * ring_ps(a, depth);
      automatic real per;
      cfg.en11 = n[0];
      cfg.bsb  = BSB_NORMAL;
      cfg.add  = {3'(n), 7'(a)};
      load(cfg);
      checks++;
      if (back !== prev) begin failures++; $display("scan out %h expected %h", back, prev); end
      prev = cfg;
      t.delete();
      #(4.0 * exp_ps);
      per = t.size() > 2 ? (t[t.size()-1] - t[0]) / (t.size() - 1) : 0.0;
      checks++;
      if (per - exp_ps > 1.0 || exp_ps - per > 1.0) begin
        failures++;
        $display("cfg %0d: OUT period %f ps expected %f", n, per, exp_ps);
      end
    end
    cfg.bsb = BSB_50;
    load(cfg);
    t.delete();
    #2000000;
    checks++;
    if (t.size() != 0) begin failures++; $display("OUT runs in a special mode"); end
    cfg.bsb = BSB_NORMAL;
    cfg.add[9:7] = 3'd6;
    load(cfg);
    t.delete();
    #2000000;
    checks++;
    if (t.size() != 0) begin failures++; $display("OUT runs with all blocks disabled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
