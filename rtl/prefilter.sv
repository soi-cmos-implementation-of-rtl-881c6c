// prefilter: narrow-band pulse filter of the timing circuit. It passes the
// transition pulses, which are MIN_W sampling periods wide (2 Ts), and removes
// every narrower pulse, such as the error pulses that carrier frequency offset
// causes in z(k).
//
// How it works. z is kept in a delay line of 2*MIN_W-1 taps. The output is the
// tap MIN_W-1 places back, kept only if some run of MIN_W consecutive ones in
// the delay line contains it, i.e. if the pulse it belongs to is at least
// MIN_W wide. Wider pulses pass with their full width. The document gives the
// width rule (pass pulses >= 2 Ts, drop narrower ones); the delay-line form is
// this design's.
//
// Timing: y_o is z delayed by MIN_W-1 cycles (one cycle for MIN_W = 2).
module prefilter #(
  parameter int unsigned MIN_W = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic z,
  output logic y_o
);

  localparam int unsigned TAPS = 2 * MIN_W - 1;

  logic [TAPS-1:1] zq;
  logic [TAPS-1:0] taps;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) zq <= '0;
    else        zq <= {zq[TAPS-2:1], z};
  end

  assign taps = {zq, z};

  always_comb begin
    y_o = 1'b0;
    // Windows [s, s+MIN_W-1] that contain tap MIN_W-1: s = 0 .. MIN_W-1.
    for (int s = 0; s < MIN_W; s++)
      if (&taps[s +: MIN_W]) y_o = 1'b1;
  end

endmodule
