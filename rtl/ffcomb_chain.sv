// ffcomb_chain: FF-Comb chain of the digital core, BLOCKS FF-Comb blocks in a
// row followed by a 4-bit output register, all on one scan path
// (si -> block 0 ... block BLOCKS-1 -> output register -> so).
// Data entering at d reaches q BLOCKS+1 clocks later (21 by default).
//
// The chain's end-to-end function is set by FUNC (four truth tables). The
// first block applies it; the remaining blocks carry their four bits through
// unchanged. This split of the function over the blocks is this model's own:
// only the end-to-end function of each path is specified.
module ffcomb_chain
  import testchip_pkg::*;
#(
  parameter int unsigned BLOCKS = 20,
  parameter lut4x4_t     FUNC   = chain_luts(0)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       se,
  input  logic       si,
  input  logic [3:0] d,
  output logic [3:0] q,
  output logic       so
);
  timeunit 1ps; timeprecision 1fs;

  logic [3:0] y    [BLOCKS+1];
  logic       scan [BLOCKS+1];

  assign y[0]    = d;
  assign scan[0] = si;

  for (genvar b = 0; b < BLOCKS; b++) begin : g_blk
    ffcomb_block #(.LUTS(b == 0 ? FUNC : LUT_IDENTITY)) u_blk (
      .clk(clk), .rst_n(rst_n), .se(se), .si(scan[b]),
      .d(y[b]), .y(y[b+1]), .so(scan[b+1]));
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  q <= '0;
    else if (se) q <= {q[2:0], scan[BLOCKS]};
    else         q <= y[BLOCKS];

  assign so = q[3];
endmodule
