// symbol_diff_stage: second differential detector of one branch (I or Q) with
// the modulation select m.
//
// How it works. Each time the branch accumulator delivers a new symbol sum
// (load), the stage outputs either that sum itself (m = 1, DPSK: one
// differential stage only) or its product with the sum of the previous symbol
// (m = 0, DDPSK: the second stage removes the constant phase error dw*T left by
// the first stage). The previous sum is kept in a one-symbol register, the
// block "T" of the document's figure. The document draws a multiplier here;
// a full signed multiply of the two sums is this design's reading of it.
//
// Timing: x_o and valid_o appear one cycle after load. Reset clears the
// stored symbol to zero, so the first DDPSK output after reset is zero.
module symbol_diff_stage
  import ddpsk_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  mode_t                 mode,
  input  logic                  load,
  input  logic signed [W-1:0]   cur,
  output logic signed [2*W-1:0] x_o,
  output logic                  valid_o
);

  logic signed [W-1:0] prev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev    <= '0;
      x_o     <= '0;
      valid_o <= 1'b0;
    end else begin
      valid_o <= load;
      if (load) begin
        prev <= cur;
        if (mode == MODE_DPSK) x_o <= (2*W)'(cur);
        else                   x_o <= cur * prev;
      end
    end
  end

endmodule
