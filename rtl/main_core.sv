// main_core: one ring-oscillator module of the test chip. The six modules are
// identical in function and differ only in the standard-cell library (and
// orientation) they are laid out with, which this model reflects only through
// the gate delay.
//
// Pins: SI, SO and CLKs of the 15-bit configuration scan chain and OUT.
// The scan word (testchip_pkg::core_cfg_t, en11 at the top, then bsb, then
// add) drives the C2-block; its output passes the DIV_STAGES-stage ripple
// divider, so OUT runs at f_RingO / 2 / 2**DIV_STAGES (f / 2048 by default).
module main_core
  import testchip_pkg::*;
#(
  parameter int unsigned GATE_DELAY_FS = 16200,
  parameter int unsigned SPREAD_FS     = 10,
  parameter int unsigned DIV_STAGES    = 10
) (
  input  logic clks,   // scan clock
  input  logic si,     // scan in
  output logic so,     // scan out
  output logic out     // divided RingO signal
);
  timeunit 1ps; timeprecision 1fs;

  core_cfg_t        cfg;
  logic [CFG_W-1:0] cfg_bits;
  logic             mux_out;
  logic [N_CBLOCK-1:0] dis;

  cfg_scan_chain #(.WIDTH(CFG_W)) u_scan (.clk(clks), .si(si), .so(so), .q(cfg_bits));
  assign cfg = core_cfg_t'(cfg_bits);

  c2_block #(.GATE_DELAY_FS(GATE_DELAY_FS), .SPREAD_FS(SPREAD_FS)) u_c2 (
    .add(cfg.add), .bsb(cfg.bsb), .en11(cfg.en11), .out(mux_out), .dis(dis));

  freq_divider #(.STAGES(DIV_STAGES)) u_div (.clk_in(mux_out), .clk_out(out));
endmodule
