// selex: selector and multiplexer of a C-block sharing one address decoder.
//
// The selector produces the 256 RingO start signals. Its NAND-plane lines
// (active low, taken before the special-mode logic) pass an inverter bank and
// steer the FD mux, so the mux always follows the address while the selector
// may start many RingOs. The mux output is only enabled in normal mode
// (bsb = 1111) with the C-block enabled.
module selex
  import testchip_pkg::*;
#(
  parameter first_gate_e FIRST = FIRST_NAND
) (
  input  logic [ADD_W-1:0] add,
  input  logic             en11,
  input  logic             dis,
  input  logic [3:0]       bsb,
  input  logic [N_SEL-1:0] ringo,   // RingO outputs
  output logic [N_SEL-1:0] sel,     // RingO start signals
  output logic             out      // mux output, RingO frequency / 2
);
  timeunit 1ps; timeprecision 1fs;

  logic [N_HIER-1:0] hier_n, hier;
  logic              active;

  selector #(.FIRST(FIRST)) u_sel (
    .add(add), .en11(en11), .dis(dis), .bsb(bsb), .sel(sel), .hier_n(hier_n));

  assign hier   = ~hier_n;
  assign active = (bsb == BSB_NORMAL) & ~dis;

  fd_mux u_mux (.ringo(ringo), .en11(en11), .hier(hier), .active(active), .out(out));
endmodule
