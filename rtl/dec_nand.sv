// dec_nand: NAND plane of the shared address decoder of a C-block.
//
// The 7-bit RingO address is split into three groups, each fully decoded by
// NAND gates: the least significant group ADD<1:0> (4 lines), the middle group
// ADD<3:2> (4 lines) and the most significant group ADD<6:4> (8 lines). The 16
// outputs are the hierarchical 4 x 4 x 8 address, active low as a NAND plane
// produces it. Line positions follow testchip_pkg (MSG at 0..7, MDG at 8..11,
// LSG at 12..15); this ordering matches the special-mode table of the BSC,
// which forces lines 15..12 as one group of four and 7..0 as the group of 8.
// Purely combinational.
module dec_nand
  import testchip_pkg::*;
(
  input  logic [ADD_W-1:0]  add,     // RingO address ADD<6:0>
  output logic [N_HIER-1:0] hier_n   // hierarchical lines, active low
);
  timeunit 1ps; timeprecision 1fs;

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      hier_n[LSG_LO + k] = ~(add[1:0] == 2'(k));
      hier_n[MDG_LO + k] = ~(add[3:2] == 2'(k));
    end
    for (int k = 0; k < 8; k++)
      hier_n[MSG_LO + k] = ~(add[6:4] == 3'(k));
  end
endmodule
