// c_block: one C-block, the unit that measures one kind of logic gate.
//
// Two arrays of 128 ring oscillators, 7 and 11 gates deep, built from one gate
// type, with their selex (selector plus FD mux). In normal mode the selector
// starts the single RingO given by en11 and add, and the mux forwards it at
// half its frequency. In the special modes 25..100 % of the chosen array runs
// and the output is quiet. With dis high no RingO runs.
// FIRST is the RingOs' first gate: NAND for inverter and NAND rings, NOR for
// NOR and mixed rings.
module c_block
  import testchip_pkg::*;
#(
  parameter first_gate_e FIRST         = FIRST_NAND,
  parameter int unsigned GATE_DELAY_FS = 16200,
  parameter int unsigned SPREAD_FS     = 10
) (
  input  logic [ADD_W-1:0] add,
  input  logic             en11,
  input  logic             dis,
  input  logic [3:0]       bsb,
  output logic             out,     // selected RingO, frequency / 2
  output logic [N_SEL-1:0] sel      // RingO start signals (observation)
);
  timeunit 1ps; timeprecision 1fs;

  logic [N_SEL-1:0] ringo_out;

  ringo_array #(.N(N_RINGO), .DEPTH(DEPTH_SHORT), .FIRST(FIRST),
                .GATE_DELAY_FS(GATE_DELAY_FS), .SPREAD_FS(SPREAD_FS))
    u_short (.en(sel[N_RINGO-1:0]), .out(ringo_out[N_RINGO-1:0]));

  ringo_array #(.N(N_RINGO), .DEPTH(DEPTH_LONG), .FIRST(FIRST),
                .GATE_DELAY_FS(GATE_DELAY_FS), .SPREAD_FS(SPREAD_FS))
    u_long (.en(sel[N_SEL-1:N_RINGO]), .out(ringo_out[N_SEL-1:N_RINGO]));

  selex #(.FIRST(FIRST)) u_selex (
    .add(add), .en11(en11), .dis(dis), .bsb(bsb),
    .ringo(ringo_out), .sel(sel), .out(out));
endmodule
