// c2_block: the four C-blocks of a main core, with inverter (INV), NAND, NOR
// and mixed (MXD) ring oscillators, in that order as blocks 0..3.
//
// The blocks share ADD<6:0>, the block-select bits and en11. ADD<9:7> is the
// coded disable: value k (0..3) enables C-block k and disables the others;
// values 4..7 disable all four (no RingO runs, the 0 % activity point).
// Only the enabled block's mux drives; the others hold their outputs low, so
// the single output is their OR.
module c2_block
  import testchip_pkg::*;
#(
  parameter int unsigned GATE_DELAY_FS = 16200,
  parameter int unsigned SPREAD_FS     = 10
) (
  input  logic [9:0]          add,   // ADD<6:0> address, ADD<9:7> coded disable
  input  logic [3:0]          bsb,   // block select, active low
  input  logic                en11,  // array select
  output logic                out,   // selected RingO, frequency / 2
  output logic [N_CBLOCK-1:0] dis    // decoded disables (observation)
);
  timeunit 1ps; timeprecision 1fs;

  localparam first_gate_e FIRST_OF [N_CBLOCK] = '{FIRST_NAND, FIRST_NAND, FIRST_NOR, FIRST_NOR};

  logic [N_CBLOCK-1:0] cb_out;

  always_comb
    for (int k = 0; k < N_CBLOCK; k++)
      dis[k] = (add[9:7] != 3'(k));

  for (genvar k = 0; k < N_CBLOCK; k++) begin : g_cb
    logic [N_SEL-1:0] sel;
    c_block #(.FIRST(FIRST_OF[k]), .GATE_DELAY_FS(GATE_DELAY_FS), .SPREAD_FS(SPREAD_FS))
      u_cb (.add(add[6:0]), .en11(en11), .dis(dis[k]), .bsb(bsb), .out(cb_out[k]), .sel(sel));
  end

  assign out = |cb_out;
endmodule
