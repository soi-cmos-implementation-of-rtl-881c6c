// tb_symbol_diff_stage: feeds random symbol sums; in DPSK mode the output must
// be the sum itself, in DDPSK mode the product with the previous sum. The
// output must appear one cycle after load.
`timescale 1ns/1ps
module tb_symbol_diff_stage;
  import ddpsk_pkg::*;
  logic clk = 0, rst_n = 0, load = 0;
  mode_t mode = MODE_DDPSK;
  logic signed [7:0] cur = 0;
  logic signed [15:0] x_o;
  logic valid_o;
  int checks = 0, failures = 0;
  int prev = 0, expv;

  symbol_diff_stage #(.W(8)) dut (.clk, .rst_n, .mode, .load, .cur, .x_o, .valid_o);

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      mode = (i < 100) ? MODE_DDPSK : ((i % 3 == 0) ? MODE_DDPSK : MODE_DPSK);
      cur  = 8'($urandom_range(0, 80)) - 8'sd40;
      load = 1;
      expv = (mode == MODE_DPSK) ? int'(cur) : int'(cur) * prev;
      prev = int'(cur);
      @(negedge clk);
      load = 0;
      cur = 8'($urandom_range(0, 255));   // must not matter outside load
      checks++;
      if (!valid_o || int'(x_o) != expv) begin
        failures++;
        if (failures < 10) $display("FAIL i=%0d got %0d exp %0d", i, x_o, expv);
      end
      @(negedge clk);
      checks++;
      if (valid_o) begin failures++; $display("FAIL valid held"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
