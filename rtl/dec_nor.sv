// dec_nor: NOR plane of the selector. Each of the 128 outputs is a 3-input NOR
// of one line from each hierarchical group (LSG, MDG, MSG) of the active-low
// inputs, so output i is high when the lines for i[1:0], i[3:2] and i[6:4] are
// all active. In normal mode exactly one output is high; in the special modes
// the BSC has forced several lines active and several outputs go high.
// Combinational.
module dec_nor
  import testchip_pkg::*;
(
  input  logic [N_HIER-1:0]  sm_n,     // from bsc, active low
  output logic [N_RINGO-1:0] add_dec   // decoded lines, active high
);
  timeunit 1ps; timeprecision 1fs;

  always_comb
    for (int i = 0; i < N_RINGO; i++)
      add_dec[i] = ~(sm_n[LSG_LO + (i % 4)] | sm_n[MDG_LO + ((i / 4) % 4)]
                     | sm_n[MSG_LO + (i / 16)]);
endmodule
