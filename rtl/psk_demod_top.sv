// psk_demod_top: the digital part of the multirate single/double differential
// PSK demodulator, clocked by the 4 MHz sampling clock.
//
// Signal flow. The 1-bit ADC hard-limits the IF input and samples it at fs,
// giving r_n. The baseband detector correlates r_n with itself one symbol
// earlier (I and Q), integrates over each symbol, optionally differences the
// results once more (DDPSK, m = 0) and outputs the bit J_n. The symbol timing
// recovery circuit derives the symbol clock T_clk and the data rate from r_n
// (s_T = 0) or from J_n (s_T = 1); the rate steers the baseband's multirate
// delay unit, and the reset circuit turns each rising edge of T_clk into the
// pulse that dumps and clears the baseband accumulators.
//
// Ports. vin is the amplified analog IF signal, represented here as a signed
// number (the analog front end and IF amplifier are outside this RTL). mode is
// m, s_t is s_T. data_o / data_valid_o give one detected bit per symbol, three
// cycles after the symbol ends. tclk_o, rate_o and locked_o come from the
// timing loop; y_o is the prefiltered transition pulse train (a probe output
// on the chip). Debug outputs show the branch sums and loop events.
//
// The STR target for the data input is the pipeline delay from a T_clk edge to
// a change of J_n (3 cycles in the baseband) plus the detector's own 2 cycles.
module psk_demod_top
  import ddpsk_pkg::*;
#(
  parameter int unsigned VIN_W     = 12,
  parameter int unsigned TC_STAGES = 40,
  parameter int unsigned M         = 10,
  parameter int unsigned ACC_W     = 8,
  parameter int unsigned TAU       = 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [VIN_W-1:0]  vin,
  input  mode_t                    mode,
  input  str_in_t                  s_t,
  output logic                     r_n_o,
  output logic                     data_o,
  output logic                     data_valid_o,
  output logic                     tclk_o,
  output rate_t                    rate_o,
  output logic                     locked_o,
  output logic                     y_o,
  output logic                     z_o,
  output logic signed [ACC_W-1:0]  i_sum_o,
  output logic signed [ACC_W-1:0]  q_sum_o,
  output logic                     rate_change_o,
  output logic                     inc_o,
  output logic                     dec_o
);

  logic r_n, sym_clr, edge_unused;
  logic signed [2*ACC_W:0] sum_unused;

  adc_1bit #(.VIN_W(VIN_W)) u_adc (
    .clk, .rst_n, .vin, .r_o(r_n)
  );

  symbol_timing_recovery #(
    .TAU(TAU), .TARGET_PSK(TAU), .TARGET_DATA(TAU + 3)
  ) u_str (
    .clk, .rst_n, .s_t, .r_n, .j_n(data_o),
    .tclk_o, .rate_o, .locked_o, .z_o, .y_o, .edge_o(edge_unused),
    .rate_change_o, .inc_o, .dec_o
  );

  reset_circuit u_rc (
    .clk, .rst_n, .tclk(tclk_o), .pulse_o(sym_clr)
  );

  ddpsk_baseband #(.TC_STAGES(TC_STAGES), .M(M), .ACC_W(ACC_W)) u_bb (
    .clk, .rst_n, .r(r_n), .rate(rate_o), .mode, .sym_clr,
    .I_o(i_sum_o), .Q_o(q_sum_o), .sum_o(sum_unused),
    .J_o(data_o), .J_valid(data_valid_o)
  );

  assign r_n_o = r_n;

endmodule
