// updown_accumulator: the low-pass (matched) filter of one baseband branch,
// an up/down counter that integrates the 1-bit mixer output over one symbol.
//
// How it works. In each cycle where the decimator strobe en is high the
// counter steps up for a mixer output of 1 (samples agree) and down for 0
// (samples disagree); other cycles are dropped, which is the down-by-L
// decimator in front of the accumulator. The reset circuit's pulse clr marks
// the first sample of a new symbol: the finished sum is copied to sum_o and
// the counter restarts with the current sample. At every rate the decimator
// keeps 40 samples per symbol, so an 8-bit signed counter suffices; it
// saturates rather than wraps if a symbol runs long (for example while the
// timing loop is still changing rate).
//
// The document states that the filters are accumulators or up/down counters
// reset by RC once per symbol; the saturation and the output register are this
// design's choices.
//
// Timing: sum_o and valid_o appear one cycle after clr.
module updown_accumulator #(
  parameter int unsigned W = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clr,
  input  logic                en,
  input  logic                up,
  output logic signed [W-1:0] sum_o,
  output logic                valid_o
);

  localparam logic signed [W-1:0] MAXV = {1'b0, {(W-1){1'b1}}};
  localparam logic signed [W-1:0] MINV = {1'b1, {(W-1){1'b0}}};

  logic signed [W-1:0] acc;
  logic signed [1:0]   delta;

  always_comb begin
    if (!en)     delta = 2'sd0;
    else if (up) delta = 2'sd1;
    else         delta = -2'sd1;
  end

  function automatic logic signed [W-1:0] sat_add(input logic signed [W-1:0] a,
                                                  input logic signed [1:0]   d);
    if (d > 0 && a == MAXV) return a;
    if (d < 0 && a == MINV) return a;
    return a + W'(d);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc     <= '0;
      sum_o   <= '0;
      valid_o <= 1'b0;
    end else begin
      valid_o <= clr;
      if (clr) begin
        sum_o <= acc;
        acc   <= W'(delta);
      end else begin
        acc <= sat_add(acc, delta);
      end
    end
  end

endmodule
