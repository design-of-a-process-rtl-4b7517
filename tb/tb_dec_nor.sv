// tb_dec_nor: one-hot groups give the single matching output; forced groups
// (as in the special modes) give 32, 64, 96 or 128 active outputs.
module tb_dec_nor;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic [15:0]  sm_n;
  logic [127:0] add_dec, exp;

  dec_nor dut (.sm_n(sm_n), .add_dec(add_dec));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 128; a++) begin
      sm_n = '1;
      sm_n[12 + (a % 4)] = 1'b0;
      sm_n[8 + (a / 4) % 4] = 1'b0;
      sm_n[a / 16] = 1'b0;
      #10;
      exp = '0;
      exp[a] = 1'b1;
      checks++;
      if (add_dec !== exp) begin
        failures++;
        $display("a=%0d add_dec=%h", a, add_dec);
      end
    end
    for (int k = 1; k <= 4; k++) begin
      sm_n = '0;
      for (int j = k; j < 4; j++) sm_n[12 + j] = 1'b1;
      #10;
      exp = '0;
      for (int i = 0; i < 128; i++) if ((i % 4) < k) exp[i] = 1'b1;
      checks++;
      if (add_dec !== exp || $countones(add_dec) != 32 * k) begin
        failures++;
        $display("forced %0d: add_dec=%h", k, add_dec);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
