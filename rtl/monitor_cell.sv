// monitor_cell: behavioural model of one litho monitor with its sensing
// circuit (an analog latch; not synthesizable logic).
//
// The circuit compares the drive current of a minimum-size transistor under
// test with the reference transistor M2 of the same three-transistor group.
// Two cross-coupled inverters are released from their precharged state when
// en rises; the side whose transistor drives more current falls first and
// wins. The model takes the length difference DELTA_L_PM = L_test - L_ref
// (picometres): a longer, weaker transistor under test (DELTA_L_PM > 0) ends
// with b = 0, a = 1; a shorter one with b = 1, a = 0; equal lengths leave a
// metastable latch that settles at random. The outcome appears SETTLE_PS after
// en rises (22.5 ns, the post-layout settling time). With en low both nodes
// are precharged high. The result holds until en falls.
module monitor_cell #(
  parameter int          DELTA_L_PM = 20,
  parameter int unsigned SETTLE_PS  = 22500
) (
  input  logic en,
  output logic a,
  output logic b
);
  timeunit 1ps; timeprecision 1fs;

  logic done;    // latch has settled since en last rose
  logic res_b;   // value the b node settles to

  assign b = (en && done) ? res_b  : 1'b1;
  assign a = (en && done) ? ~res_b : 1'b1;

  always @(en) begin
    done <= 1'b0;
    if (en) begin
      if (DELTA_L_PM > 0)      res_b <= 1'b0;
      else if (DELTA_L_PM < 0) res_b <= 1'b1;
      else                     res_b <= 1'($urandom);
      #(SETTLE_PS * 1ps);
      if (en) done <= 1'b1;
    end
  end
endmodule
