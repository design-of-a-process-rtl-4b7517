// tb_fd_mux: pulses the selected RingO input and a neighbour (other array,
// other address) and counts output edges: the output must change once per
// rising edge of the selected input only (frequency halved), and must stay
// low when the mux is not active.
module tb_fd_mux;
  timeunit 1ps; timeprecision 1fs;
  int checks = 0, failures = 0;
  logic [255:0] ringo;
  logic en11, active;
  logic [15:0] hier;
  logic out;
  int edges;

  fd_mux dut (.ringo(ringo), .en11(en11), .hier(hier), .active(active), .out(out));

  always @(out) edges++;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] lines(int a);
    logic [15:0] h = '0;
    h[12 + (a % 4)] = 1'b1;
    h[8 + (a / 4) % 4] = 1'b1;
    h[a / 16] = 1'b1;
    return h;
  endfunction

  task automatic pulse(int idx, int n);
    for (int k = 0; k < n; k++) begin
      ringo[idx] = 1'b1; #50;
      ringo[idx] = 1'b0; #50;
    end
  endtask

  initial begin
    ringo = '0;
    active = 1'b1;
    for (int t = 0; t < 40; t++) begin
      automatic int a = (t * 29 + 3) % 128;
      automatic int e = t % 2;
      automatic int own = e ? 128 + a : a;
      automatic int other_arr = e ? a : 128 + a;
      automatic int other_addr = e ? 128 + (a ^ (1 << (t % 7))) : (a ^ (1 << (t % 7)));
      en11 = e[0];
      hier = lines(a);
      #100;
      edges = 0;
      pulse(own, 6);
      checks++;
      if (edges != 6) begin
        failures++;
        $display("a=%0d en11=%0d: %0d output edges for 6 input periods", a, e, edges);
      end
      edges = 0;
      pulse(other_arr, 5);
      pulse(other_addr, 5);
      checks++;
      if (edges != 0) begin
        failures++;
        $display("a=%0d en11=%0d: unselected input reached the output", a, e);
      end
    end
    active = 1'b0;
    #10;
    edges = 0;
    pulse(5, 8);
    checks++;
    if (edges != 0 || out !== 1'b0) begin
      failures++;
      $display("inactive mux drove the output");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
