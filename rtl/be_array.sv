// be_array: Block Enable array, 256 enablers that turn the decoded address
// into the start signals of the two RingO arrays of a C-block.
//
// A RingO runs when its C-block is not disabled (dis low), its array is chosen
// (en11 high for the 11-deep array at lines 255..128, low for the 7-deep array
// at lines 127..0) and its decoded address line is high. The gates follow the
// smallest of the three compared circuits: a global disable per array
// (dis OR en11, dis OR NOT en11) is NORed with the inverted address line.
// RingOs that start with a NAND need an active-high select; RingOs that start
// with a NOR need it active low, so FIRST inverts every output for NOR.
// Combinational.
module be_array
  import testchip_pkg::*;
#(
  parameter first_gate_e FIRST = FIRST_NAND
) (
  input  logic [N_RINGO-1:0] add_dec,  // from dec_nor, active high
  input  logic               dis,      // C-block disable
  input  logic               en11,     // array select
  output logic [N_SEL-1:0]   sel       // RingO start signals
);
  timeunit 1ps; timeprecision 1fs;

  logic gdis_short, gdis_long;
  assign gdis_short = dis | en11;
  assign gdis_long  = dis | ~en11;

  always_comb
    for (int i = 0; i < N_RINGO; i++) begin
      sel[i]           = ~(gdis_short | ~add_dec[i]);
      sel[N_RINGO + i] = ~(gdis_long  | ~add_dec[i]);
      if (FIRST == FIRST_NOR) begin
        sel[i]           = ~sel[i];
        sel[N_RINGO + i] = ~sel[N_RINGO + i];
      end
    end
endmodule
