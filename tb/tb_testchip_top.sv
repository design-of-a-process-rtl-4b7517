// tb_testchip_top: end-to-end run of the whole chip at its default sizes.
//
// Ring-oscillator cores: each of the six cores is loaded through its own
// scan chain and measured at OUT (period = 2048 RingO periods), cycling
// through the four C-block types and both arrays; the previous word must come
// back at SO. On core 0 the four special modes (25/50/75/100 % of an array
// started, OUT quiet) and the all-disabled code are run; the number of
// started RingOs is read inside the C-block.
// Digital core: a stream of inputs checked 21 clocks later, then a scan load,
// one capture clock and a scan unload through all 336 flip-flops.
// Monitor block: EN, capture, 800-bit unload, compared with the length
// errors of the monitor models.
// Each mechanism is counted; one that never happens is a failure.
module tb_testchip_top;
  import testchip_pkg::*;
  import dc_ref_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  int checks = 0, failures = 0;
  int n_measure = 0, n_array11 = 0, n_array7 = 0, n_scan_back = 0, n_special = 0,
      n_disable = 0, n_dc_func = 0, n_dc_scan = 0, n_mon = 0;
  int n_cblock [4] = '{0, 0, 0, 0};

  logic [1:0]  core_clks = '0, core_si = '0, core_so, core_out;
  logic        dc_clk = 0, dc_rst_n = 0, dc_se = 0, dc_si = 0, dc_so;
  logic [15:0] dc_din = '0, dc_dout;
  logic        mon_en = 0, mon_clk = 0, mon_se = 0, mon_si = 0, mon_so;

  testchip_top #(.N_CORES(2)) dut (
    .core_clks(core_clks), .core_si(core_si), .core_so(core_so), .core_out(core_out),
    .dc_clk(dc_clk), .dc_rst_n(dc_rst_n), .dc_se(dc_se), .dc_si(dc_si), .dc_so(dc_so),
    .dc_din(dc_din), .dc_dout(dc_dout),
    .mon_en(mon_en), .mon_clk(mon_clk), .mon_se(mon_se), .mon_si(mon_si), .mon_so(mon_so));

  realtime t [2][$];
  for (genvar m = 0; m < 2; m++) begin : g_watch
    always @(posedge core_out[m]) t[m].push_back($realtime);
  end

  task automatic chk(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic real ring_ps(int i, int depth);
    return 2.0 * depth * (16.2 + 0.010 * ((37 * i) % 128));
  endfunction

  core_cfg_t last [2];

  task automatic load(int m, core_cfg_t w);
    core_cfg_t back;
    for (int b = 14; b >= 0; b--) begin
      back[b] = core_so[m];
      core_si[m] = w[b];
      #5000 core_clks[m] = 1;
      #5000 core_clks[m] = 0;
    end
    chk(back === last[m], $sformatf("core %0d: scan out %h expected %h", m, back, last[m]));
    n_scan_back++;
    last[m] = w;
  endtask

  int started;
  task automatic count_started(int k);
    logic [255:0] s;
    case (k)
      0: s = dut.g_core[0].u_core.u_c2.g_cb[0].sel;
      1: s = dut.g_core[0].u_core.u_c2.g_cb[1].sel;
      2: s = ~dut.g_core[0].u_core.u_c2.g_cb[2].sel;
      default: s = ~dut.g_core[0].u_core.u_c2.g_cb[3].sel;
    endcase
    started = $countones(s);
  endtask

  initial begin
    #2000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- ring-oscillator cores ----------------
  task automatic run_cores();
    for (int m = 0; m < 2; m++) begin
      last[m] = '0;
      load(m, '0);
    end
    for (int n = 0; n < 6; n++) begin
      automatic int m = n % 2;
      automatic int k = n % 4;
      automatic int a = (n * 43 + 9) % 128;
      automatic int depth = (n / 2) % 2 ? 11 : 7;
      automatic real exp_ps = 2048.0 * ring_ps(a, depth);
      automatic real per;
      automatic core_cfg_t c;
      c.en11 = (depth == 11);
      c.bsb  = BSB_NORMAL;
      c.add  = {3'(k), 7'(a)};
      load(m, c);
      t[m].delete();
      #(4.0 * exp_ps);
      per = t[m].size() > 2 ? (t[m][t[m].size()-1] - t[m][0]) / (t[m].size() - 1) : 0.0;
      chk(per - exp_ps < 1.0 && exp_ps - per < 1.0,
          $sformatf("core %0d block %0d ring %0d/%0d: OUT period %f expected %f", m, k, a, depth, per, exp_ps));
      n_measure++;
      n_cblock[k]++;
      if (depth == 11) n_array11++; else n_array7++;
      load(m, '{en11: 1'b0, bsb: BSB_NORMAL, add: 10'h3ff});  // park the core
    end
    for (int md = 1; md <= 4; md++) begin
      automatic core_cfg_t c;
      c.en11 = md[0];
      c.bsb  = (md == 1) ? BSB_25 : (md == 2) ? BSB_50 : (md == 3) ? BSB_75 : BSB_100;
      c.add  = {3'(md - 1), 7'd33};
      load(0, c);
      t[0].delete();
      #200000;
      count_started(md - 1);
      chk(started == 32 * md, $sformatf("mode %b: %0d RingOs started", c.bsb, started));
      chk(t[0].size() == 0, "OUT runs in a special mode");
      n_special++;
    end
    load(0, '{en11: 1'b0, bsb: BSB_100, add: {3'd5, 7'd0}});
    t[0].delete();
    #200000;
    for (int k = 0; k < 4; k++) begin
      count_started(k);
      chk(started == 0, "RingOs run with every C-block disabled");
    end
    chk(t[0].size() == 0, "OUT runs with every C-block disabled");
    n_disable++;
  endtask

  // ---------------- digital core ----------------
  always #500 dc_clk = ~dc_clk;

  task automatic run_dcore();
    logic [15:0] hist [$];
    logic [335:0] pat, got, exp;
    #1200 dc_rst_n = 1;
    for (int c = 0; c < 60; c++) begin
      @(negedge dc_clk);
      if (c >= 21) begin
        chk(dc_dout === dc_ref_pkg::core_out(hist[c-21]), $sformatf("digital core cycle %0d: %h expected %h", c, dc_dout, dc_ref_pkg::core_out(hist[c-21])));
        n_dc_func++;
      end
      dc_din = 16'($urandom);
      hist.push_back(dc_din);
    end
    for (int w = 0; w < 11; w++) pat[w*32 +: 32] = $urandom;
    dc_se = 1;
    for (int s = 0; s < 336; s++) begin
      @(negedge dc_clk) dc_si = pat[335-s];
    end
    @(negedge dc_clk);
    dc_se = 0;
    @(negedge dc_clk);
    dc_se = 1;
    for (int s = 0; s < 336; s++) begin
      got[335-s] = dc_so;
      @(negedge dc_clk);
    end
    for (int c = 0; c < 4; c++) begin
      automatic int base = 84 * c;
      automatic logic [15:0] v = '0;
      exp[base +: 4] = dc_din[4*c +: 4];
      v[4*c +: 4] = pat[base +: 4];
      for (int j = 0; j < 4; j++) exp[base + 4 + j] = path_out(4*c + j, v);
      for (int p = 8; p < 84; p++) exp[base + p] = pat[base + p - 4];
    end
    chk(got === exp, "digital core scan capture/unload wrong");
    n_dc_scan++;
  endtask

  // ---------------- monitor block ----------------
  always #2000 mon_clk = ~mon_clk;

  task automatic run_monitor();
    logic [799:0] got, exp;
    for (int e = 0; e < 400; e++) begin
      automatic int dl1 = 20 + 3 * (((e * 13) % 21) - 10);
      automatic int dl3 = -20 + 3 * (((e * 17) % 21) - 10);
      exp[2*e]   = (dl1 > 0) ? 1'b0 : 1'b1;
      exp[2*e+1] = (dl3 > 0) ? 1'b0 : 1'b1;
    end
    @(negedge mon_clk) mon_en = 1;
    #30000;
    @(negedge mon_clk) mon_se = 0;
    @(negedge mon_clk) mon_se = 1;
    for (int s = 0; s < 800; s++) begin
      got[799-s] = mon_so;
      @(negedge mon_clk);
    end
    chk(got === exp, "monitor block results wrong");
    n_mon++;
  endtask

  initial begin
    fork
      run_cores();
      run_dcore();
      run_monitor();
    join
    chk(n_measure > 0,   "no frequency measurement");
    chk(n_array7 > 0,    "7-deep array never measured");
    chk(n_array11 > 0,   "11-deep array never measured");
    for (int k = 0; k < 4; k++) chk(n_cblock[k] > 0, $sformatf("C-block %0d never measured", k));
    chk(n_scan_back > 0, "no scan read-back");
    chk(n_special == 4,  "special modes not all run");
    chk(n_disable > 0,   "all-disabled code never run");
    chk(n_dc_func > 0,   "digital core never run");
    chk(n_dc_scan > 0,   "digital core scan never run");
    chk(n_mon > 0,       "monitor block never read");
    $display("measurements %0d (7-deep %0d, 11-deep %0d; per C-block %0d %0d %0d %0d), scan read-backs %0d,",
             n_measure, n_array7, n_array11, n_cblock[0], n_cblock[1], n_cblock[2], n_cblock[3], n_scan_back);
    $display("special modes %0d, all-disabled %0d, digital core results %0d + scan %0d, monitor reads %0d",
             n_special, n_disable, n_dc_func, n_dc_scan, n_mon);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
