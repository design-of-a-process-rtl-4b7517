// tb_c2_block: ADD<9:7> = k must enable C-block k alone and bring its
// addressed RingO to the output at half frequency; ADD<9:7> >= 4 must
// disable all four blocks.
module tb_c2_block;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic [9:0] add;
  logic [3:0] bsb;
  logic en11, out;
  logic [3:0] dis;
  realtime t [$];

  c2_block dut (.add(add), .bsb(bsb), .en11(en11), .out(out), .dis(dis));

  always @(posedge out) t.push_back($realtime);

  function automatic real ring_ps(int i, int depth);
    return 2.0 * depth * (16.2 + 0.010 * ((37 * i) % 128));
  endfunction

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bsb = 4'b1111;
    for (int n = 0; n < 12; n++) begin
      automatic int k = n % 4;
      automatic int a = (n * 71 + 5) % 128;
      automatic int depth = (n / 4) % 2 ? 11 : 7;
      automatic real exp_ps = 2.0 * ring_ps(a, depth);
      automatic real per;
      add = {3'(k), 7'(a)};
      en11 = (depth == 11);
      #2000;
      t.delete();
      #8000;
      per = t.size() > 3 ? (t[t.size()-1] - t[1]) / (t.size() - 2) : 0.0;
      checks += 2;
      if (per - exp_ps > 0.01 || exp_ps - per > 0.01) begin
        failures++;
        $display("block %0d add %0d: period %f expected %f", k, a, per, exp_ps);
      end
      if (dis != ~(4'b1 << k)) begin
        failures++;
        $display("block %0d: dis=%b", k, dis);
      end
    end
    for (int k = 4; k < 8; k++) begin
      add = {3'(k), 7'd9};
      #2000;
      t.delete();
      #5000;
      checks++;
      if (dis != 4'b1111 || t.size() != 0) begin
        failures++;
        $display("code %0d does not disable all blocks", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
