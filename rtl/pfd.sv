// pfd: phase/frequency detector of the symbol timing loop.
//
// How it works. It watches the prefiltered transition pulses y(k). At each
// rising edge it reports (a) the number of sampling periods since the previous
// rising edge, which the frequency controller uses to find the data rate, and
// (b) the divider count at that instant, which is the loop's phase sample for
// the phase estimator. The interval counter saturates at its maximum, and
// interval_ok_o is low for the first edge after reset or after a saturated
// gap. The document names this block and its two outputs only; the
// edge-interval and phase-sample formulation is this design's.
//
// Timing: edge_o, interval_o, interval_ok_o and phase_o are registered and
// appear one cycle after the rising edge of y; phase_o holds the divider count
// of the edge cycle itself.
module pfd #(
  parameter int unsigned IV_W  = 18,
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             y,
  input  logic [CNT_W-1:0] div_cnt,
  output logic             edge_o,
  output logic [IV_W-1:0]  interval_o,
  output logic             interval_ok_o,
  output logic [CNT_W-1:0] phase_o
);

  logic            y_q, rise, seen;
  logic [IV_W-1:0] since;

  assign rise = y && !y_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_q           <= 1'b0;
      seen          <= 1'b0;
      since         <= '0;
      edge_o        <= 1'b0;
      interval_o    <= '0;
      interval_ok_o <= 1'b0;
      phase_o       <= '0;
    end else begin
      y_q    <= y;
      edge_o <= rise;
      if (rise) begin
        interval_o    <= since + 1'b1;
        interval_ok_o <= seen && (since != '1);
        phase_o       <= div_cnt;
        seen          <= 1'b1;
        since         <= '0;
      end else if (since != '1) begin
        since <= since + 1'b1;
      end
    end
  end

endmodule
