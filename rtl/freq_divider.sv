// freq_divider: ripple divider between a core's multiplexer and its output
// pad, a cascade of STAGES toggle flip-flops (default 10, division by 1024,
// the "factor thousand" that brings the multi-GHz RingO signal under the
// 100 MHz the measurement equipment accepts). Each flip-flop is clocked by the
// previous one's output. No reset: only the frequency matters.
module freq_divider #(
  parameter int unsigned STAGES = 10
) (
  input  logic clk_in,   // high-frequency input
  output logic clk_out   // clk_in / 2**STAGES
);
  timeunit 1ps; timeprecision 1fs;

  logic [STAGES-1:0] q;

  for (genvar k = 0; k < STAGES; k++) begin : g_stage
    logic t;
    if (k == 0) begin : g_first
      always_ff @(posedge clk_in) t <= ~t;
    end else begin : g_next
      always_ff @(posedge q[k-1]) t <= ~t;
    end
    assign q[k] = t;
  end

  assign clk_out = q[STAGES-1];
endmodule
