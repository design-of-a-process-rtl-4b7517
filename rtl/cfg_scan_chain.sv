// cfg_scan_chain: serial-in serial-out shift register that holds a main
// core's configuration (ADD<9:0>, BS<3:0>, EN: 15 bits) loaded before a
// measurement. On each rising edge of clk the word moves up one bit and si
// enters at bit 0; so is the top bit, so shifting WIDTH bits in, most
// significant first, loads the word and brings the old one out at so.
// The register drives the core directly (no separate update latch) and has no
// reset, since it is always loaded before use.
module cfg_scan_chain #(
  parameter int unsigned WIDTH = 15
) (
  input  logic             clk,   // CLKs pin
  input  logic             si,    // SI pin
  output logic             so,    // SO pin
  output logic [WIDTH-1:0] q      // configuration word
);
  timeunit 1ps; timeprecision 1fs;

  always_ff @(posedge clk) q <= {q[WIDTH-2:0], si};
  assign so = q[WIDTH-1];
endmodule
