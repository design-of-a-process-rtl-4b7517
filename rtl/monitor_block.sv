// monitor_block: the litho monitor block, N_ELEM basic elements read out by a
// scan chain; pins EN, SI, SE, CLK and SO.
//
// Each basic element holds two monitors placed side by side: one compares M1
// (next to the contact) with the reference M2, the other compares M3 (at the
// end of the poly line) with M2. Each gives one pass/fail bit, its b node.
// A flip-flop per monitor (2 * N_ELEM in all) captures the bits on a clock
// edge with se low and shifts them with se high: bit 0 takes si, so is the
// last bit, element e's M1 result is bit 2e and its M3 result bit 2e+1.
// Use: raise en, wait for the latches to settle (about 22.5 ns), clock once
// with se low, then shift 2 * N_ELEM bits out with se high.
//
// The length errors given to the monitor models (a systematic part per
// transistor plus a spread (e*13 mod 21 - 10) * SPREAD_PM for M1 and
// (e*17 mod 21 - 10) * SPREAD_PM for M3) only stand in for silicon; their
// values are this model's choice. The expected direction follows the
// layout: M1 longer than M2, M3 shorter.
module monitor_block
  import testchip_pkg::*;
#(
  parameter int unsigned N_ELEM    = MON_ELEMS,
  parameter int          DL_M1_PM  = 20,
  parameter int          DL_M3_PM  = -20,
  parameter int          SPREAD_PM = 3
) (
  input  logic en,
  input  logic clk,
  input  logic se,
  input  logic si,
  output logic so
);
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned NBITS = 2 * N_ELEM;

  logic [NBITS-1:0] res, chain;

  for (genvar e = 0; e < N_ELEM; e++) begin : g_elem
    logic a1, a3;
    monitor_cell #(.DELTA_L_PM(DL_M1_PM + SPREAD_PM * (((e * 13) % 21) - 10)))
      u_m1 (.en(en), .a(a1), .b(res[2*e]));
    monitor_cell #(.DELTA_L_PM(DL_M3_PM + SPREAD_PM * (((e * 17) % 21) - 10)))
      u_m3 (.en(en), .a(a3), .b(res[2*e+1]));
  end

  always_ff @(posedge clk)
    if (se) chain <= {chain[NBITS-2:0], si};
    else    chain <= res;

  assign so = chain[NBITS-1];
endmodule
