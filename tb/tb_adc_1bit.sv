// tb_adc_1bit: a sampled sine of random amplitude and phase at the 1-bit ADC
// model; the output must be the sign of the previous sample (1 for >= 0).
`timescale 1ns/1ps
module tb_adc_1bit;
  logic clk = 0, rst_n = 0;
  logic signed [11:0] vin = 0;
  logic r_o;
  int checks = 0, failures = 0;
  bit expv;

  adc_1bit #(.VIN_W(12)) dut (.clk, .rst_n, .vin, .r_o);

  always #5 clk = ~clk;

  initial begin
    real a, ph;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      if (k % 100 == 0) begin a = real'($urandom_range(1, 2000)); ph = real'($urandom_range(0, 628)) / 100.0; end
      vin = 12'($rtoi(a * $cos(1.5707963 * real'(k) + ph)));
      if (k % 37 == 0) vin = 0;
      expv = (vin >= 0);
      @(posedge clk); #1;
      checks++;
      if (r_o !== expv) begin failures++; if (failures < 10) $display("FAIL k=%0d", k); end
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
