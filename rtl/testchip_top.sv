// testchip_top: the characterisation test chip.
//
// Six ring-oscillator main cores with identical function, one per standard
// cell library (0 REF, 1 LF1, 2 LF2, 3 LF3, 4 LF2 rotated by 90 degrees,
// 5 ULP), each with its own scan chain pins (SI, SO, CLKs) and output pin;
// the digital core with its five pins (SI, CLK, SE, Reset, SO) plus its
// logical data ports; and the litho monitor block with its five pins (EN, SI,
// SE, CLK, SO). The blocks are independent; they share no signal.
// Supplies, back-bias wells and pads are not modelled. The libraries differ
// in the silicon only; here every core uses the same gate delay.
module testchip_top
  import testchip_pkg::*;
#(
  parameter int unsigned N_CORES       = 6,
  parameter int unsigned GATE_DELAY_FS = 16200,
  parameter int unsigned SPREAD_FS     = 10,
  parameter int unsigned DIV_STAGES    = 10,
  parameter int unsigned DC_BLOCKS_P   = DC_BLOCKS,
  parameter int unsigned MON_ELEMS_P   = MON_ELEMS
) (
  // ring-oscillator main cores
  input  logic [N_CORES-1:0] core_clks,
  input  logic [N_CORES-1:0] core_si,
  output logic [N_CORES-1:0] core_so,
  output logic [N_CORES-1:0] core_out,
  // digital core
  input  logic               dc_clk,
  input  logic               dc_rst_n,
  input  logic               dc_se,
  input  logic               dc_si,
  output logic               dc_so,
  input  logic [15:0]        dc_din,
  output logic [15:0]        dc_dout,
  // litho monitor block
  input  logic               mon_en,
  input  logic               mon_clk,
  input  logic               mon_se,
  input  logic               mon_si,
  output logic               mon_so
);
  timeunit 1ps; timeprecision 1fs;

  for (genvar m = 0; m < N_CORES; m++) begin : g_core
    main_core #(.GATE_DELAY_FS(GATE_DELAY_FS), .SPREAD_FS(SPREAD_FS), .DIV_STAGES(DIV_STAGES))
      u_core (.clks(core_clks[m]), .si(core_si[m]), .so(core_so[m]), .out(core_out[m]));
  end

  digital_core #(.BLOCKS(DC_BLOCKS_P)) u_dcore (
    .clk(dc_clk), .rst_n(dc_rst_n), .se(dc_se), .si(dc_si), .so(dc_so),
    .din(dc_din), .dout(dc_dout));

  monitor_block #(.N_ELEM(MON_ELEMS_P)) u_mon (
    .en(mon_en), .clk(mon_clk), .se(mon_se), .si(mon_si), .so(mon_so));
endmodule
