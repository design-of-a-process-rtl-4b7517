// ringo_array: behavioural model of one array of N ring oscillators of the
// same depth and first gate (not synthesizable: built from ringo).
//
// Ring i gets the gate delay GATE_DELAY_FS + SPREAD_FS * ((37*i) mod 128).
// The spread stands in for the device mismatch the chip is built to measure;
// its pattern is this model's choice and gives every ring of an array a
// different period, so a simulation can tell which ring reaches the output.
// Set SPREAD_FS to 0 for identical rings.
module ringo_array
  import testchip_pkg::*;
#(
  parameter int unsigned N             = 128,
  parameter int unsigned DEPTH         = 7,
  parameter first_gate_e FIRST         = FIRST_NAND,
  parameter int unsigned GATE_DELAY_FS = 16200,
  parameter int unsigned SPREAD_FS     = 10
) (
  input  logic [N-1:0] en,    // start signals
  output logic [N-1:0] out    // ring outputs
);
  timeunit 1ps; timeprecision 1fs;

  for (genvar i = 0; i < N; i++) begin : g_ring
    ringo #(
      .DEPTH(DEPTH), .FIRST(FIRST),
      .GATE_DELAY_FS(GATE_DELAY_FS + SPREAD_FS * ((37 * i) % 128))
    ) u_ringo (.en(en[i]), .out(out[i]));
  end
endmodule
