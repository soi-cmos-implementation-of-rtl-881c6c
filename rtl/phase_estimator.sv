// phase_estimator: phase correction of the timing loop.
//
// How it works. At every transition edge the PFD reports the divider count.
// In lock that count equals TARGET, the known pipeline delay from a symbol
// boundary at the input to the edge report, so that T_clk rises exactly on
// the boundary. The difference, taken modulo N into the range (-N/2, N/2],
// is the phase error. The estimator then issues one dec (hold) per cycle for
// a positive error or one inc (skip) per cycle for a negative one until the
// divider has moved by the error. This always finishes before the next
// transition, because the error is at most half a symbol. locked_o is high
// while the last error was within one sampling period, the lock rule the
// document gives (phase ambiguity of +-Ts). The document names the block and
// that rule; the rest is this design's.
//
// A rate change (flush) drops a pending correction, which was measured
// against the old modulus; the divider is reloaded instead.
//
// Timing: corrections start the cycle after edge_i.
module phase_estimator
  import ddpsk_pkg::*;
#(
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  rate_t            rate,
  input  logic [CNT_W-1:0] target,
  input  logic             edge_i,
  input  logic             flush,
  input  logic [CNT_W-1:0] phase_i,
  output logic             inc_o,
  output logic             dec_o,
  output logic             locked_o
);

  logic signed [CNT_W+1:0] n, diff, err, pend;

  assign n    = (CNT_W+2)'(symbol_len(rate));

  always_comb begin
    diff = $signed({2'b00, phase_i}) - $signed({2'b00, target});
    if (diff < 0) diff = diff + n;            // now in [0, N)
    if (diff > (n >>> 1)) err = diff - n;     // into (-N/2, N/2]
    else                  err = diff;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend     <= '0;
      locked_o <= 1'b0;
    end else if (flush) begin
      pend     <= '0;
    end else if (edge_i) begin
      pend     <= err;
      locked_o <= (err >= -1) && (err <= 1);
    end else if (pend > 0) begin
      pend <= pend - 1;
    end else if (pend < 0) begin
      pend <= pend + 1;
    end
  end

  assign dec_o = !edge_i && (pend > 0);
  assign inc_o = !edge_i && (pend < 0);

endmodule
