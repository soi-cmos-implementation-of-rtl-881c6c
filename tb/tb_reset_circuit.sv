// tb_reset_circuit: a clock of random period and duty cycle drives T_clk; the
// pulse must be high exactly in the cycle T_clk rises and in no other.
`timescale 1ns/1ps
module tb_reset_circuit;
  logic clk = 0, rst_n = 0, tclk = 0, pulse_o;
  int checks = 0, failures = 0, rises = 0;
  bit tclk_prev = 0;

  reset_circuit dut (.clk, .rst_n, .tclk, .pulse_o);

  always #5 clk = ~clk;

  initial begin
    int hi, lo;
    tclk = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    tclk_prev = 0;
    for (int p = 0; p < 100; p++) begin
      hi = $urandom_range(1, 30);
      lo = $urandom_range(1, 30);
      for (int c = 0; c < hi + lo; c++) begin
        @(negedge clk);
        tclk = (c < hi);
        #1;
        checks++;
        if (pulse_o !== (tclk && !tclk_prev)) begin
          failures++;
          if (failures < 10) $display("FAIL p=%0d c=%0d pulse=%0b", p, c, pulse_o);
        end
        if (pulse_o) rises++;
        tclk_prev = tclk;
      end
    end
    checks++;
    if (rises != 100) begin failures++; $display("FAIL %0d pulses for 100 periods", rises); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
