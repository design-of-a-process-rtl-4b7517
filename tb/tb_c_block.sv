// tb_c_block: a NAND-first and a NOR-first C-block. In normal mode the output
// period must be twice the addressed RingO's period (7- or 11-deep); in the
// special modes the right number of RingOs start and the output is quiet;
// disabled, nothing starts.
module tb_c_block;
  import testchip_pkg::*;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic [6:0] add;
  logic en11, dis;
  logic [3:0] bsb;
  logic out_a, out_o;
  logic [255:0] sel_a, sel_o;
  realtime ta [$], to [$];

  c_block #(.FIRST(FIRST_NAND)) dut_a (.add(add), .en11(en11), .dis(dis), .bsb(bsb), .out(out_a), .sel(sel_a));
  c_block #(.FIRST(FIRST_NOR))  dut_o (.add(add), .en11(en11), .dis(dis), .bsb(bsb), .out(out_o), .sel(sel_o));

  always @(posedge out_a) ta.push_back($realtime);
  always @(posedge out_o) to.push_back($realtime);

  function automatic real ring_ps(int i, int depth);
    return 2.0 * depth * (16.2 + 0.010 * ((37 * i) % 128));
  endfunction

  function automatic real period(realtime q [$]);
    if (q.size() < 4) return 0.0;
    return (q[q.size()-1] - q[1]) / (q.size() - 2);
  endfunction

  task automatic chk(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dis = 0; bsb = BSB_NORMAL;
    for (int n = 0; n < 8; n++) begin
      automatic int a = (n * 45 + 11) % 128;
      automatic int depth = n[0] ? 11 : 7;
      automatic real exp_ps;
      add = 7'(a);
      en11 = n[0];
      exp_ps = 2.0 * ring_ps(a, depth);
      #2000;
      ta.delete(); to.delete();
      #8000;
      chk(period(ta) - exp_ps < 0.01 && exp_ps - period(ta) < 0.01,
          $sformatf("NAND add=%0d en11=%0d period %f expected %f", a, n[0], period(ta), exp_ps));
      chk(period(to) - exp_ps < 0.01 && exp_ps - period(to) < 0.01,
          $sformatf("NOR add=%0d en11=%0d period %f expected %f", a, n[0], period(to), exp_ps));
      chk($countones(sel_a) == 1 && $countones(~sel_o) == 1, "normal mode starts more than one RingO");
    end
    for (int m = 1; m <= 4; m++) begin
      bsb = (m == 1) ? BSB_25 : (m == 2) ? BSB_50 : (m == 3) ? BSB_75 : BSB_100;
      en11 = m[0];
      #2000;
      ta.delete(); to.delete();
      #3000;
      chk($countones(sel_a) == 32 * m && $countones(~sel_o) == 32 * m,
          $sformatf("mode %b: %0d RingOs started", bsb, $countones(sel_a)));
      chk(ta.size() == 0 && to.size() == 0 && out_a == 0 && out_o == 0, "output not quiet in special mode");
    end
    bsb = BSB_NORMAL;
    dis = 1;
    #2000;
    ta.delete(); to.delete();
    #3000;
    chk(sel_a == '0 && sel_o == '1, "disabled block starts RingOs");
    chk(ta.size() == 0 && to.size() == 0, "disabled block drives its output");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
