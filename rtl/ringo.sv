// ringo: behavioural model of one ring oscillator (not synthesizable logic:
// an analog loop of standard cells, modelled with gate delays).
//
// DEPTH gates in a loop: the first is a NAND or a NOR whose second input is
// the start signal 'en', the others invert. A NAND-first ring runs while en is
// high and rests with its output high (odd depth); a NOR-first ring runs while en is low
// and rests low. Every gate has the same delay GATE_DELAY_FS, so the ring
// oscillates with period 2 * DEPTH * GATE_DELAY_FS. The default 16.2 ps gives
// about 4.4 GHz at depth 7 and 2.8 GHz at depth 11, the extracted-layout
// frequencies of the inverter rings. The model keeps one event per half
// period instead of one per gate: a single wavefront circulates, as in the
// real ring once it has settled, and the first edge after a start comes one
// half period later.
module ringo
  import testchip_pkg::*;
#(
  parameter int unsigned DEPTH         = 7,
  parameter first_gate_e FIRST         = FIRST_NAND,
  parameter int unsigned GATE_DELAY_FS = 16200
) (
  input  logic en,    // start signal from the selector
  output logic out    // ring output (last gate)
);
  timeunit 1ps; timeprecision 1fs;

  // Level of the last gate when the ring is stopped: the first gate is forced
  // (NAND to 1, NOR to 0) and DEPTH-1 inverters follow.
  localparam logic REST = (FIRST == FIRST_NAND) ? ~1'((DEPTH - 1) % 2) : 1'((DEPTH - 1) % 2);

  logic run;
  logic osc;

  assign run = (FIRST == FIRST_NAND) ? en : ~en;

  // A started ring changes its output once every DEPTH gate delays; a stopped
  // one returns to its rest level.
  always begin
    if (!run) begin
      osc = REST;
      @(run);
    end else begin
      #(DEPTH * GATE_DELAY_FS * 1fs);
      osc = run ? ~osc : REST;
    end
  end

  assign out = osc;
endmodule
