// adc_1bit: behavioural model of the 1-bit A/D converter (hard limiter).
// It is not synthesizable hardware in the real chip: there the comparator is
// an analog two-stage differential amplifier with about 60 dB gain, followed
// by a sampling flip-flop clocked at fs.
//
// The model stands the analog IF voltage in as a signed number vin. The
// comparator output is 1 for vin >= 0 and 0 otherwise (the hard-limiting rule
// s(k) = sgn(r(k))); the flip-flop samples it on each fs edge. Only the
// sampling flip-flop is real logic.
//
// Timing: r_o is the sign of vin at the previous clock edge.
module adc_1bit #(
  parameter int unsigned VIN_W = 12
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [VIN_W-1:0] vin,
  output logic                    r_o
);

  logic vout;

  // Comparator: hard limiting of the amplified IF signal.
  always_comb vout = (vin >= 0);

  // Sampling flip-flop.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) r_o <= 1'b0;
    else        r_o <= vout;
  end

endmodule
