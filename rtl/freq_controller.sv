// freq_controller: selects which divider stage (data rate) the timing loop and
// the baseband delay unit use, from the spacing of transition pulses.
//
// How it works. Transitions of a symbol stream are whole symbols apart. Each
// measured interval between transition pulses is classed as the fastest rate
// whose symbol length times RUN_LIMIT still exceeds it: for the default
// numbers an interval under 200 samples is 100 kbps, under 2000 is 10 kbps,
// under 20000 is 1 kbps, longer is 0.1 kbps. The limit of 5 symbols matches
// the document's framing rule, which inserts transition bits so that five
// equal bits in a row do not occur and warns that such a run would be taken
// for the next lower rate. A faster class is adopted at once (an interval that
// short cannot occur at the slower rate); a slower class only after CONFIRM
// consecutive intervals agree, so one long run of equal bits does not change
// the rate. The confirmation rule is this design's; the document says only
// that the controller counts transition pulses to pick the clock frequency.
//
// Timing: rate_o changes in the cycle after the deciding edge; change_o
// pulses in that cycle. Reset selects 100 kbps.
module freq_controller
  import ddpsk_pkg::*;
#(
  parameter int unsigned IV_W      = 18,
  parameter int unsigned RUN_LIMIT = 5,
  parameter int unsigned CONFIRM   = 2
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            edge_i,
  input  logic [IV_W-1:0] interval_i,
  input  logic            interval_ok_i,
  output rate_t           rate_o,
  output logic            change_o
);

  localparam int unsigned CW = $clog2(CONFIRM + 1);

  rate_t         cls, pend;
  logic [CW-1:0] agree;

  always_comb begin
    cls = RATE_100;
    for (int j = NUM_RATES - 2; j >= 0; j--)
      if (32'(interval_i) < RUN_LIMIT * symbol_len(rate_t'(j))) cls = rate_t'(j);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rate_o   <= RATE_100K;
      pend     <= RATE_100K;
      agree    <= '0;
      change_o <= 1'b0;
    end else begin
      change_o <= 1'b0;
      if (edge_i && interval_ok_i) begin
        if (cls < rate_o) begin
          rate_o   <= cls;
          change_o <= 1'b1;
          agree    <= '0;
        end else if (cls > rate_o) begin
          if (cls == pend && agree + 1'b1 >= CW'(CONFIRM)) begin
            rate_o   <= cls;
            change_o <= 1'b1;
            agree    <= '0;
          end else begin
            agree <= (cls == pend) ? agree + 1'b1 : CW'(1);
            pend  <= cls;
          end
        end else begin
          agree <= '0;
        end
      end
    end
  end

endmodule
