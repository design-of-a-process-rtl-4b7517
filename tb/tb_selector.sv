// tb_selector: every address in both arrays in normal mode, the four special
// modes (count and position of started RingOs) and the disable, for NAND- and
// NOR-first RingOs. Also checks the shared hierarchical lines.
module tb_selector;
  import testchip_pkg::*;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic [6:0] add;
  logic en11, dis;
  logic [3:0] bsb;
  logic [255:0] sel_a, sel_o, exp;
  logic [15:0] hier_a, hier_o;
  logic [3:0] codes [5] = '{4'b1111, 4'b1110, 4'b1100, 4'b1000, 4'b0000};

  selector #(.FIRST(FIRST_NAND)) dut_a (.add(add), .en11(en11), .dis(dis), .bsb(bsb), .sel(sel_a), .hier_n(hier_a));
  selector #(.FIRST(FIRST_NOR))  dut_o (.add(add), .en11(en11), .dis(dis), .bsb(bsb), .sel(sel_o), .hier_n(hier_o));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(int m);
    #10;
    exp = '0;
    if (!dis)
      for (int i = 0; i < 128; i++) begin
        bit on = (m == 0) ? (i == int'(add)) : ((i % 4) < m);
        if (on) exp[en11 ? 128 + i : i] = 1'b1;
      end
    checks += 3;
    if (sel_a !== exp) begin
      failures++;
      $display("NAND add=%0d en11=%b dis=%b bsb=%b wrong", add, en11, dis, bsb);
    end
    if (sel_o !== ~exp) begin
      failures++;
      $display("NOR add=%0d en11=%b dis=%b bsb=%b wrong", add, en11, dis, bsb);
    end
    if (hier_a[12 + add[1:0]] !== 1'b0 || hier_a[8 + add[3:2]] !== 1'b0 || hier_a[add[6:4]] !== 1'b0
        || $countones(hier_a) != 13 || hier_o !== hier_a) begin
      failures++;
      $display("hier lines wrong for add=%0d", add);
    end
  endtask

  initial begin
    bsb = 4'b1111;
    dis = 1'b0;
    for (int e = 0; e < 2; e++)
      for (int a = 0; a < 128; a++) begin
        add = 7'(a);
        en11 = e[0];
        check_one(0);
      end
    for (int m = 1; m < 5; m++)
      for (int e = 0; e < 2; e++) begin
        add = 7'($urandom);
        en11 = e[0];
        bsb = codes[m];
        check_one(m);
      end
    dis = 1'b1;
    for (int m = 0; m < 5; m++) begin
      bsb = codes[m];
      add = 7'($urandom);
      en11 = m[0];
      check_one(m);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
