// tb_updown_accumulator: random up/down/idle steps with a clear every few
// dozen cycles; the dumped sum must equal a software count of the symbol that
// ended (including saturation at the limits of the 8-bit counter).
`timescale 1ns/1ps
module tb_updown_accumulator;
  logic clk = 0, rst_n = 0, clr = 0, en = 0, up = 0;
  logic signed [7:0] sum_o;
  logic valid_o;
  int checks = 0, failures = 0;
  int model = 0, expect_sum = 0;
  bit pending = 0;

  updown_accumulator #(.W(8)) dut (.clk, .rst_n, .clr, .en, .up, .sum_o, .valid_o);

  always #5 clk = ~clk;

  initial begin
    int len;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 60; s++) begin
      // symbol lengths up to 300 cycles drive the counter into saturation
      len = (s % 10 == 9) ? 300 : $urandom_range(20, 60);
      for (int c = 0; c < len; c++) begin
        @(negedge clk);
        clr = (c == 0);
        en  = 1'($urandom_range(1)) | (s % 10 == 9);
        up  = (s % 20 == 9) ? 1'b1 : (s % 20 == 19) ? 1'b0 : 1'($urandom_range(1));
        if (clr) begin
          expect_sum = model;
          model = 0;
          pending = 1;
        end
        if (en) begin
          if (up && model < 127) model++;
          else if (!up && model > -128) model--;
        end
        @(posedge clk); #1;
        if (pending) begin
          pending = 0;
          checks++;
          if (!valid_o || sum_o != expect_sum) begin
            failures++;
            $display("FAIL symbol %0d: got %0d valid %0b exp %0d", s, sum_o, valid_o, expect_sum);
          end
        end else if (valid_o) begin
          failures++; $display("FAIL spurious valid");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
