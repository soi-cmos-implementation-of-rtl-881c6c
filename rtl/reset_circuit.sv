// reset_circuit (RC): turns the recovered symbol clock T_clk into a short
// pulse that dumps and clears the baseband accumulators once per symbol.
//
// How it works. T_clk is sampled every cycle; a rising edge (T_clk high, the
// previous sample low) starts a pulse PULSE_LEN sampling periods long. The
// document says only that RC produces very short pulses every data period from
// the recovered clock; the rising-edge choice and the one-cycle default width
// are this design's.
//
// Timing: pulse_o is combinational for its first cycle, so it is high in the
// same cycle T_clk rises.
module reset_circuit #(
  parameter int unsigned PULSE_LEN = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic tclk,
  output logic pulse_o
);

  localparam int unsigned CW = $clog2(PULSE_LEN + 1);

  logic          tclk_q;
  logic [CW-1:0] left;
  logic          rise;

  assign rise = tclk && !tclk_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tclk_q <= 1'b1;
      left   <= '0;
    end else begin
      tclk_q <= tclk;
      if (rise)           left <= CW'(PULSE_LEN - 1);
      else if (left != 0) left <= left - 1'b1;
    end
  end

  assign pulse_o = rise || (left != 0);

endmodule
