// transition_detector: front of the symbol timing circuit. It selects the
// input (s_T), samples it, and marks every symbol transition with a pulse
// tau = 2 Ts wide.
//
// How it works. s(k) is the selected input registered at fs; s_d(k) is s(k)
// delayed by TAU sampling periods. For the demodulated NRZ data (s_T = 1) a
// transition makes s and s_d differ for TAU samples, so z = s XOR s_d. For the
// 1-bit PSK signal (s_T = 0) the carrier sits at a quarter of fs (per the
// sampling rule fs = 4 fIF/(2n+1)), so two samples apart it is always
// inverted; a 180 degree phase step makes s and s_d equal for TAU samples, so
// z = s XNOR s_d. Slow frequency drift shifts the 1-bit pattern now and then
// and leaves narrower error pulses, removed later by the prefilter.
//
// The input mux, the flip-flop, the tau delay and the XOR/XNOR choice follow
// the document; tying the XOR/XNOR choice to s_T is the reading of its text.
//
// Timing: z_o is combinational from registered s and s_d; a transition
// present at the input in cycle k shows on z_o from cycle k+1 for TAU cycles.
module transition_detector
  import ddpsk_pkg::*;
#(
  parameter int unsigned TAU = 2
) (
  input  logic    clk,
  input  logic    rst_n,
  input  str_in_t s_t,
  input  logic    r_n,
  input  logic    j_n,
  output logic    s_o,
  output logic    s_d_o,
  output logic    z_o
);

  logic           s;
  logic [TAU-1:0] dly;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s   <= 1'b0;
      dly <= '0;
    end else begin
      s   <= (s_t == STR_IN_DATA) ? j_n : r_n;
      dly <= {dly[TAU-2:0], s};
    end
  end

  assign s_o   = s;
  assign s_d_o = dly[TAU-1];
  assign z_o   = (s_t == STR_IN_DATA) ? (s ^ dly[TAU-1]) : ~(s ^ dly[TAU-1]);

endmodule
