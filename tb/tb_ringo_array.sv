// tb_ringo_array: starts single rings of a 128-ring, 7-deep NAND-first array
// and checks that only that ring runs, with period
// 2 * 7 * (16.2 ps + 10 fs * ((37 * i) mod 128)).
module tb_ringo_array;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic [127:0] en, out, prev;
  realtime t [$];
  int others;
  int idx;

  ringo_array dut (.en(en), .out(out));

  always @(posedge out[idx]) t.push_back($realtime);
  always @(out) begin
    for (int i = 0; i < 128; i++) if (i != idx && out[i] != prev[i]) others++;
    prev = out;
  end

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = '0;
    idx = 0;
    #3000;
    prev = out;
    for (int n = 0; n < 12; n++) begin
      automatic int i = (n * 53 + 7) % 128;
      automatic real exp_ps = 2.0 * 7.0 * (16.2 + 0.010 * ((37 * i) % 128));
      automatic real per;
      idx = i;
      en = '0;
      en[i] = 1'b1;
      #500;
      t.delete();
      others = 0;
      #5000;
      per = (t[t.size()-1] - t[1]) / (t.size() - 2);
      checks += 2;
      if (per - exp_ps > 0.01 || exp_ps - per > 0.01) begin
        failures++;
        $display("ring %0d: period %f ps, expected %f", i, per, exp_ps);
      end
      if (others != 0) begin
        failures++;
        $display("ring %0d: %0d toggles on rings that were not started", i, others);
      end
      en = '0;
      #3000;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
