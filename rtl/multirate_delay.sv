// multirate_delay: one-symbol delay T of the 1-bit sampled IF signal for all
// four data rates, built as in the document from a chain of down-by-M
// decimators followed by a constant delay Tc of TC_STAGES flip-flops.
//
// How it works. A cascade of NUM_RATES-1 modulo-M counters turns the sampling
// clock into decimation strobes at fs, fs/M, fs/M^2 and fs/M^3. The rate input
// selects one of them. On each selected strobe the TC_STAGES-deep shift
// register moves by one place, so its last stage always holds the sample taken
// TC_STAGES strobes ago, i.e. exactly one symbol T = TC_STAGES * M^rate
// samples earlier. Because the constant delay is a multiple of four samples
// the carrier phase of the delayed sample lines up with the current one.
//
// The register is two bits wide: besides r(k) it carries r(k-1), so the same
// shift also delivers r(k-T-1), the delayed sample one sampling period later in
// carrier phase, which is the 90 degree branch of the Q mixer. The document
// draws the 90 degree shift after the delay; taking it one sample before the
// decimator is this design's choice and gives the same sample at every rate.
//
// Interface and timing. r is the current sample (registered by the ADC).
// strobe is high in the cycles the selected decimator samples; in exactly
// those cycles r_del = r(k-T) and r_del90 = r(k-T-1) are valid for the current
// r. After a rate change the stored samples belong to the old rate and the
// first symbol that follows is not a valid reference. Reset clears all state.
module multirate_delay
  import ddpsk_pkg::*;
#(
  parameter int unsigned TC_STAGES = 40,   // constant delay Tc = m * Ts, m = 40
  parameter int unsigned M         = 10    // decimation ratio per stage
) (
  input  logic  clk,
  input  logic  rst_n,
  input  rate_t rate,
  input  logic  r,
  output logic  strobe,
  output logic  r_del,
  output logic  r_del90
);

  localparam int unsigned CW = (M > 1) ? $clog2(M) : 1;

  logic                  r_prev;
  logic [CW-1:0]         dcnt [1:NUM_RATES-1];
  logic [NUM_RATES-1:0]  stb;
  logic [1:0]            sr [TC_STAGES];

  // Decimator strobes: stage j fires once every M fires of stage j-1.
  assign stb[0] = 1'b1;
  for (genvar j = 1; j < NUM_RATES; j++) begin : g_stb
    assign stb[j] = stb[j-1] && (dcnt[j] == CW'(M - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 1; j < NUM_RATES; j++) dcnt[j] <= '0;
    end else begin
      for (int j = 1; j < NUM_RATES; j++)
        if (stb[j-1]) dcnt[j] <= (dcnt[j] == CW'(M - 1)) ? '0 : dcnt[j] + 1'b1;
    end
  end

  assign strobe = stb[rate];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_prev <= 1'b0;
      for (int i = 0; i < TC_STAGES; i++) sr[i] <= 2'b00;
    end else begin
      r_prev <= r;
      if (strobe) begin
        sr[0] <= {r, r_prev};
        for (int i = 1; i < TC_STAGES; i++) sr[i] <= sr[i-1];
      end
    end
  end

  assign r_del   = sr[TC_STAGES-1][1];
  assign r_del90 = sr[TC_STAGES-1][0];

endmodule
