// tb_bsc: normal mode passes the lines through; each special mode gives the
// fixed pattern of the mode table whatever the address lines are.
module tb_bsc;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic [15:0] hier_n, sm_n, exp_n;
  logic [3:0]  bsb;
  logic [3:0]  codes [5] = '{4'b1111, 4'b1110, 4'b1100, 4'b1000, 4'b0000};
  logic [3:0]  lsg_pat [5] = '{4'b0000, 4'b1110, 4'b1100, 4'b1000, 4'b0000};

  bsc dut (.hier_n(hier_n), .bsb(bsb), .sm_n(sm_n));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      for (int m = 0; m < 5; m++) begin
        hier_n = 16'($urandom);
        bsb = codes[m];
        #10;
        exp_n = (m == 0) ? hier_n : {lsg_pat[m], 4'b0000, 8'b0000_0000};
        checks++;
        if (sm_n !== exp_n) begin
          failures++;
          $display("mode %b in %h: sm_n=%h expected %h", bsb, hier_n, sm_n, exp_n);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
