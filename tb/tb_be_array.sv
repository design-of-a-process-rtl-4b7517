// tb_be_array: random decoded lines with every dis/en11 combination, for a
// NAND-first (active high) and a NOR-first (active low) array.
module tb_be_array;
  import testchip_pkg::*;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic [127:0] add_dec;
  logic dis, en11;
  logic [255:0] sel_nand, sel_nor, exp;

  be_array #(.FIRST(FIRST_NAND)) dut_nand (.add_dec(add_dec), .dis(dis), .en11(en11), .sel(sel_nand));
  be_array #(.FIRST(FIRST_NOR))  dut_nor  (.add_dec(add_dec), .dis(dis), .en11(en11), .sel(sel_nor));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 100; n++) begin
      for (int c = 0; c < 4; c++) begin
        add_dec = {$urandom, $urandom, $urandom, $urandom};
        dis  = c[1];
        en11 = c[0];
        #10;
        exp = '0;
        if (!dis) begin
          if (en11) exp[255:128] = add_dec;
          else      exp[127:0]   = add_dec;
        end
        checks += 2;
        if (sel_nand !== exp) begin
          failures++;
          $display("NAND dis=%b en11=%b mismatch", dis, en11);
        end
        if (sel_nor !== ~exp) begin
          failures++;
          $display("NOR dis=%b en11=%b mismatch", dis, en11);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
