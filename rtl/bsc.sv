// bsc: Bit Selection Control, between the NAND and the NOR plane of the
// selector. It implements the special modes used for power-versus-activity
// measurements.
//
// In normal mode (bsb = 1111) the 16 active-low hierarchical lines pass
// unchanged, so exactly one RingO is selected. In the special modes the
// address is ignored: every MSG and MDG line is forced active and, of the four
// LSG lines, one, two, three or all four are forced active (bsb = 1110, 1100,
// 1000, 0000), so 25, 50, 75 or 100 % of the array runs at once.
// The per-line rule (LSG line 0 follows bsb0, line k>0 follows bsb k, all other
// lines are forced whenever bsb0 is low) reproduces the mode table exactly;
// codes outside the table are not used. Combinational.
module bsc
  import testchip_pkg::*;
(
  input  logic [N_HIER-1:0] hier_n,  // from dec_nand, active low
  input  logic [3:0]        bsb,     // block select, active low
  output logic [N_HIER-1:0] sm_n     // to dec_nor, active low
);
  timeunit 1ps; timeprecision 1fs;

  logic special;
  assign special = ~bsb[0];

  always_comb begin
    for (int k = 0; k < 8; k++)
      sm_n[MSG_LO + k] = hier_n[MSG_LO + k] & ~special;
    for (int k = 0; k < 4; k++)
      sm_n[MDG_LO + k] = hier_n[MDG_LO + k] & ~special;
    sm_n[LSG_LO] = hier_n[LSG_LO] & ~special;
    for (int k = 1; k < 4; k++)
      sm_n[LSG_LO + k] = special ? bsb[k] : hier_n[LSG_LO + k];
  end
endmodule
