// ffcomb_block: FF-Comb block of the digital core.
//
// A 4-bit register of scannable flip-flops with asynchronous reset, followed
// by four 4-input combinational nets. Each net is described here by its truth
// table (LUTS[j] gives output j; table index {q3,q2,q1,q0}); the gate-level
// netlist of the nets is not reproduced. The default tables are the
// end-to-end functions of the first group of paths.
// With se high the register shifts: bit 0 takes si, bit j takes bit j-1 and
// so is bit 3. With se low it loads d. Latency d -> y is one clock.
module ffcomb_block
  import testchip_pkg::*;
#(
  parameter lut4x4_t LUTS = chain_luts(0)
) (
  input  logic       clk,
  input  logic       rst_n,  // asynchronous reset, active low
  input  logic       se,     // scan enable
  input  logic       si,     // scan in
  input  logic [3:0] d,      // functional data in
  output logic [3:0] y,      // combinational outputs
  output logic       so      // scan out
);
  timeunit 1ps; timeprecision 1fs;

  logic [3:0] q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  q <= '0;
    else if (se) q <= {q[2:0], si};
    else         q <= d;

  always_comb
    for (int j = 0; j < 4; j++) y[j] = LUTS[j][q];

  assign so = q[3];
endmodule
