// selector: 256-line selector of a C-block.
//
// Chain of four stages: dec_nand decodes the 7-bit address into 16 active-low
// hierarchical lines, bsc applies the special modes, dec_nor builds the 128
// decoded lines and be_array combines them with dis and en11 into the 256
// RingO start signals (polarity set by the RingOs' first gate).
// The pre-BSC hierarchical lines are also brought out, because the mux of the
// same C-block shares this decoder. Combinational.
module selector
  import testchip_pkg::*;
#(
  parameter first_gate_e FIRST = FIRST_NAND
) (
  input  logic [ADD_W-1:0]  add,     // RingO address ADD<6:0>
  input  logic              en11,    // 1: 11-deep array
  input  logic              dis,     // C-block disable
  input  logic [3:0]        bsb,     // block select, active low
  output logic [N_SEL-1:0]  sel,     // RingO start signals
  output logic [N_HIER-1:0] hier_n   // shared hierarchical lines, active low
);
  timeunit 1ps; timeprecision 1fs;

  logic [N_HIER-1:0]  sm_n;
  logic [N_RINGO-1:0] add_dec;

  dec_nand u_dec_nand (.add(add), .hier_n(hier_n));
  bsc      u_bsc      (.hier_n(hier_n), .bsb(bsb), .sm_n(sm_n));
  dec_nor  u_dec_nor  (.sm_n(sm_n), .add_dec(add_dec));
  be_array #(.FIRST(FIRST)) u_be (.add_dec(add_dec), .dis(dis), .en11(en11), .sel(sel));
endmodule
