// fd_mux: 256-to-1 frequency-divider multiplexer of a C-block (2 x 4 x 4 x 8).
//
// Stage 1 (pass gates) picks, for each of the 128 positions, the 7-deep or the
// 11-deep RingO with en11. Stage 2 is 32 4:1 muxes steered by the four LSG
// lines, stage 3 is 8 4:1 muxes steered by the four MDG lines. Each of the 8
// stage-3 outputs clocks a toggle flip-flop, which regenerates the signal and
// halves its frequency; the 8:1 pass-gate last stage, steered by the 8 MSG
// lines, then forwards the selected flip-flop. The output is therefore a
// square wave at half the selected RingO's frequency.
// The select lines are the decoder's hierarchical lines, active high here
// (the inverter bank sits in selex). A switch that is off does not drive its
// node; in this two-valued model an undriven node reads 0. The last stage is
// gated by 'active', so the output is quiet outside normal mode or when the
// C-block is disabled. The toggle flip-flops have no reset (the main core has
// no reset pin): their phase is arbitrary, their frequency is not.
module fd_mux
  import testchip_pkg::*;
(
  input  logic [N_SEL-1:0]  ringo,   // RingO outputs, [127:0] 7-deep, [255:128] 11-deep
  input  logic              en11,    // stage-1 select
  input  logic [N_HIER-1:0] hier,    // hierarchical select lines, active high
  input  logic              active,  // normal mode and C-block enabled
  output logic              out      // selected RingO, frequency / 2
);
  timeunit 1ps; timeprecision 1fs;

  logic [N_RINGO-1:0] s1;
  logic [31:0]        s2;
  logic [7:0]         s3;
  logic [7:0]         fd;

  always_comb begin
    for (int j = 0; j < N_RINGO; j++)
      s1[j] = en11 ? ringo[N_RINGO + j] : ringo[j];
    for (int k = 0; k < 32; k++) begin
      s2[k] = 1'b0;
      for (int m = 0; m < 4; m++) s2[k] |= s1[4*k + m] & hier[LSG_LO + m];
    end
    for (int p = 0; p < 8; p++) begin
      s3[p] = 1'b0;
      for (int m = 0; m < 4; m++) s3[p] |= s2[4*p + m] & hier[MDG_LO + m];
    end
  end

  for (genvar p = 0; p < 8; p++) begin : g_fd
    logic q;
    always_ff @(posedge s3[p]) q <= ~q;
    assign fd[p] = q;
  end

  always_comb begin
    out = 1'b0;
    for (int p = 0; p < 8; p++) out |= fd[p] & hier[MSG_LO + p];
    out &= active;
  end
endmodule
