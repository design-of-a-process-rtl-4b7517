// digital_core: the digital core, combinational and sequential logic built to
// be run both at nominal supply and in the subthreshold regime.
//
// Four FF-Comb chains side by side, chain c taking inputs din[4c+3:4c] and
// producing dout[4c+3:4c]; output k is the path function PATH_LUT[k]
// (testchip_pkg) of its group's four inputs, 21 clocks after they are taken.
// Every flip-flop is on one scan chain, si -> chain 0 -> chain 1 -> chain 2
// -> chain 3 -> so, 4 * 21 * 4 = 336 bits, so on the chip only SI, CLK, SE,
// Reset and SO are pins: a test loads inputs by scan, clocks the core with
// se low and shifts the results out. din/dout are the logical 16-bit data
// ports (din feeds the first register of each chain).
module digital_core
  import testchip_pkg::*;
#(
  parameter int unsigned BLOCKS = DC_BLOCKS
) (
  input  logic        clk,
  input  logic        rst_n,   // asynchronous reset, active low
  input  logic        se,      // scan enable
  input  logic        si,      // scan in
  output logic        so,      // scan out
  input  logic [15:0] din,
  output logic [15:0] dout
);
  timeunit 1ps; timeprecision 1fs;

  logic scan [DC_CHAINS+1];
  assign scan[0] = si;

  for (genvar c = 0; c < DC_CHAINS; c++) begin : g_chain
    ffcomb_chain #(.BLOCKS(BLOCKS), .FUNC(chain_luts(c))) u_chain (
      .clk(clk), .rst_n(rst_n), .se(se), .si(scan[c]),
      .d(din[4*c +: 4]), .q(dout[4*c +: 4]), .so(scan[c+1]));
  end

  assign so = scan[DC_CHAINS];
endmodule
