// symbol_timing_recovery (STR): recovers the symbol clock T_clk and the data
// rate from the 1-bit PSK signal or from the demodulated data, using only the
// sampling clock fs as reference.
//
// How it works (the document's STR block diagram):
//   transition_detector  s_T input select, tau = 2 Ts delay and XOR/XNOR
//                        give pulses z(k) at symbol transitions;
//   prefilter            drops pulses narrower than 2 Ts, giving y(k);
//   pfd                  measures the spacing of y pulses and samples the
//                        divider phase at each one;
//   freq_controller      picks the divider stage (rate) from the spacing;
//   phase_estimator      turns the phase sample into inc/dec steps;
//   freq_divider         divide-by-N increment-decrement counter -> T_clk.
// The loop is a first-order digital PLL: each transition pulls the divider
// phase fully onto it, and missing transitions leave the clock free-running
// at fs/N. The targets TARGET_PSK and TARGET_DATA are the pipeline delays
// from a symbol boundary to the PFD's phase sample for the two inputs, so that
// T_clk rises on the boundary; for the data input the extra delay of the
// baseband detector is included, which keeps the loop from chasing its own
// output. A rate change is decided two cycles after the phase sample of the
// deciding transition; the divider is then loaded with target + 3, the count
// it would have had if that transition had been on time.
//
// Interface: r_n is the sampled PSK signal, j_n the detected data bit, s_t the
// input select. tclk_o is the recovered clock, rate_o the detected rate,
// locked_o the phase lock flag; z_o and y_o bring out the transition pulses
// before and after the prefilter (the latter is a probe pad on the chip).
module symbol_timing_recovery
  import ddpsk_pkg::*;
#(
  parameter int unsigned TAU         = 2,
  parameter int unsigned CNT_W       = 16,
  parameter int unsigned IV_W        = 18,
  parameter int unsigned TARGET_PSK  = 2,
  parameter int unsigned TARGET_DATA = 5
) (
  input  logic    clk,
  input  logic    rst_n,
  input  str_in_t s_t,
  input  logic    r_n,
  input  logic    j_n,
  output logic    tclk_o,
  output rate_t   rate_o,
  output logic    locked_o,
  output logic    z_o,
  output logic    y_o,
  output logic    edge_o,
  output logic    rate_change_o,
  output logic    inc_o,
  output logic    dec_o
);

  logic [CNT_W-1:0] div_cnt, phase;
  logic [IV_W-1:0]  interval;
  logic             interval_ok;
  logic [CNT_W-1:0] target;

  assign target = (s_t == STR_IN_DATA) ? CNT_W'(TARGET_DATA) : CNT_W'(TARGET_PSK);

  transition_detector #(.TAU(TAU)) u_td (
    .clk, .rst_n, .s_t, .r_n, .j_n, .s_o(), .s_d_o(), .z_o
  );

  prefilter #(.MIN_W(TAU)) u_pf (
    .clk, .rst_n, .z(z_o), .y_o
  );

  pfd #(.IV_W(IV_W), .CNT_W(CNT_W)) u_pfd (
    .clk, .rst_n, .y(y_o), .div_cnt,
    .edge_o, .interval_o(interval), .interval_ok_o(interval_ok), .phase_o(phase)
  );

  freq_controller #(.IV_W(IV_W)) u_fc (
    .clk, .rst_n, .edge_i(edge_o), .interval_i(interval),
    .interval_ok_i(interval_ok), .rate_o, .change_o(rate_change_o)
  );

  phase_estimator #(.CNT_W(CNT_W)) u_pe (
    .clk, .rst_n, .rate(rate_o), .target, .edge_i(edge_o), .flush(rate_change_o),
    .phase_i(phase),
    .inc_o, .dec_o, .locked_o
  );

  freq_divider #(.CNT_W(CNT_W)) u_div (
    .clk, .rst_n, .rate(rate_o), .inc(inc_o), .dec(dec_o),
    .load(rate_change_o), .load_val(target + CNT_W'(3)),
    .cnt_o(div_cnt), .tclk_o
  );

endmodule
