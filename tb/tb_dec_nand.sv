// tb_dec_nand: all 128 addresses; the expected active-low lines are built
// from the address fields (LSG at 12+ADD<1:0>, MDG at 8+ADD<3:2>, MSG at
// ADD<6:4>).
module tb_dec_nand;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic [6:0] add;
  logic [15:0] hier_n, exp_n;

  dec_nand dut (.add(add), .hier_n(hier_n));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 128; a++) begin
      add = 7'(a);
      #10;
      exp_n = '1;
      exp_n[12 + (a & 3)] = 1'b0;
      exp_n[8 + ((a >> 2) & 3)] = 1'b0;
      exp_n[(a >> 4) & 7] = 1'b0;
      checks++;
      if (hier_n !== exp_n) begin
        failures++;
        $display("add=%0d hier_n=%b expected %b", a, hier_n, exp_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
