// ddpsk_baseband: the single/double differential PSK detector of the
// demodulator, from the 1-bit sampled IF signal r_n to the detected bit J_n.
//
// How it works (the document's receiver diagram, Fig. 1 there).
//   * First differential stage (autocorrelation): the sample r(k) is mixed
//     with the same signal one symbol earlier, r(k-T), for the I branch and
//     with r(k-T-1), the delayed signal shifted by 90 degrees of carrier, for
//     the Q branch. With 1-bit samples each mixer is an XNOR gate.
//   * The decimator L keeps only the samples at the delay unit's decimation
//     strobe, so every rate yields 40 products per symbol.
//   * Up/down counters integrate the products over a symbol and are dumped and
//     cleared by the reset circuit's pulse sym_clr, giving I_n and Q_n.
//   * Second differential stage: x_n = I_n or I_n*I_{n-1}, y_n = Q_n or
//     Q_n*Q_{n-1}, chosen by the modulation select m (1 = DPSK, 0 = DDPSK).
//   * J_n = sgn(x_n + y_n), 1 for a sum >= 0.
// A data bit 1 means "same phase as the reference": this is the XNOR
// convention of the document's encoder example (c_n = d_n XNOR d_{n-1}).
//
// Interface and timing. sym_clr marks the first sample of each symbol. I_o and
// Q_o hold the last symbol sums (one cycle after sym_clr); J_o and J_valid
// follow three cycles after sym_clr. mode and rate are static settings; rate
// comes from the timing circuit's frequency controller.
module ddpsk_baseband
  import ddpsk_pkg::*;
#(
  parameter int unsigned TC_STAGES = 40,
  parameter int unsigned M         = 10,
  parameter int unsigned ACC_W     = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     r,
  input  rate_t                    rate,
  input  mode_t                    mode,
  input  logic                     sym_clr,
  output logic signed [ACC_W-1:0]  I_o,
  output logic signed [ACC_W-1:0]  Q_o,
  output logic signed [2*ACC_W:0]  sum_o,
  output logic                     J_o,
  output logic                     J_valid
);

  logic strobe, r_del, r_del90;
  logic x_i, y_q;
  logic i_valid, q_valid, xv, yv;
  logic signed [2*ACC_W-1:0] x_n, y_n;

  multirate_delay #(.TC_STAGES(TC_STAGES), .M(M)) u_delay (
    .clk, .rst_n, .rate, .r,
    .strobe, .r_del, .r_del90
  );

  // 1-bit mixers
  assign x_i = ~(r ^ r_del);
  assign y_q = ~(r ^ r_del90);

  updown_accumulator #(.W(ACC_W)) u_acc_i (
    .clk, .rst_n, .clr(sym_clr), .en(strobe), .up(x_i),
    .sum_o(I_o), .valid_o(i_valid)
  );

  updown_accumulator #(.W(ACC_W)) u_acc_q (
    .clk, .rst_n, .clr(sym_clr), .en(strobe), .up(y_q),
    .sum_o(Q_o), .valid_o(q_valid)
  );

  symbol_diff_stage #(.W(ACC_W)) u_diff_i (
    .clk, .rst_n, .mode, .load(i_valid), .cur(I_o), .x_o(x_n), .valid_o(xv)
  );

  symbol_diff_stage #(.W(ACC_W)) u_diff_q (
    .clk, .rst_n, .mode, .load(q_valid), .cur(Q_o), .x_o(y_n), .valid_o(yv)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum_o   <= '0;
      J_o     <= 1'b0;
      J_valid <= 1'b0;
    end else begin
      J_valid <= xv;
      if (xv) begin
        sum_o <= (2*ACC_W+1)'(x_n) + (2*ACC_W+1)'(y_n);
        J_o   <= ((2*ACC_W+1)'(x_n) + (2*ACC_W+1)'(y_n)) >= 0;
      end
    end
  end

  // Both branches are cleared by the same pulse, so their results coincide.
  a_branches_aligned: assert property (@(posedge clk) disable iff (!rst_n) xv == yv);

endmodule
