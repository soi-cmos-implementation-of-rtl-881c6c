// freq_divider: the programmable divide-by-N of the timing loop, built as an
// increment-decrement counter clocked by the sampling clock fs.
//
// How it works. The counter runs modulo N = 40 * 10^rate (40, 400, 4000 and
// 40000 for 100, 10, 1 and 0.1 kbps, so fs/N is the symbol clock). Normally it
// advances by one per cycle; an inc command advances it by two and a dec
// command holds it, which moves the clock phase by one sampling period. The
// recovered clock T_clk is high for the first half of the count. The N values
// and the increment-decrement form follow the document; the document draws
// the divider as a chain of /40 and /10 stages and a selector, and a single
// counter with a selectable modulus is this design's equivalent. After a rate
// change the timing loop loads the count it would have if the deciding
// transition lay exactly on a symbol boundary (load, load_val); without a load
// a count beyond the new modulus restarts from zero.
//
// Timing: cnt_o and tclk_o are registered; T_clk rises in the cycle cnt_o is 0.
module freq_divider
  import ddpsk_pkg::*;
#(
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  rate_t            rate,
  input  logic             inc,
  input  logic             dec,
  input  logic             load,
  input  logic [CNT_W-1:0] load_val,
  output logic [CNT_W-1:0] cnt_o,
  output logic             tclk_o
);

  logic [CNT_W-1:0] n, nxt;
  logic [CNT_W:0]   sum;

  assign n = CNT_W'(symbol_len(rate));

  always_comb begin
    if (inc && !dec)      sum = {1'b0, cnt_o} + 2;
    else if (dec && !inc) sum = {1'b0, cnt_o};
    else                  sum = {1'b0, cnt_o} + 1;
    if (load)                  nxt = load_val;
    else if (cnt_o >= n)       nxt = '0;
    else if (sum >= {1'b0, n}) nxt = CNT_W'(sum - {1'b0, n});
    else                       nxt = sum[CNT_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt_o <= '0;
    else        cnt_o <= nxt;
  end

  assign tclk_o = cnt_o < (n >> 1);

endmodule
