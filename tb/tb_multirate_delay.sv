// tb_multirate_delay: checks the one-symbol delay at all four rates against a
// software history of the input. At each decimation strobe r_del must equal
// the input one symbol (40 * 10^rate samples) earlier and r_del90 the input
// one sample before that; the strobes must come exactly every 10^rate cycles.
// Uses the default 40 stages and M = 10.
`timescale 1ns/1ps
module tb_multirate_delay;
  import ddpsk_pkg::*;
  logic clk = 0, rst_n = 0, r = 0;
  rate_t rate = RATE_100K;
  logic strobe, r_del, r_del90;
  int checks = 0, failures = 0;

  multirate_delay dut (.clk, .rst_n, .rate, .r, .strobe, .r_del, .r_del90);

  always #5 clk = ~clk;

  bit hist [$];          // input history, newest last
  int last_strobe = -1, cyc = 0;

  task automatic run_rate(rate_t rt, int nsym);
    int n, step, nstrobe;
    rate = rt;
    n = int'(symbol_len(rt));
    step = n / 40;
    nstrobe = 0;
    last_strobe = -1;
    hist.delete();
    for (int c = 0; c < nsym * n; c++) begin
      @(negedge clk);
      r = 1'($urandom_range(1));
      hist.push_back(r);
      #1;
      if (strobe) begin
        if (last_strobe >= 0) begin
          checks++;
          if (c - last_strobe != step) begin
            failures++; $display("FAIL strobe spacing %0d rate %0d", c - last_strobe, rt);
          end
        end
        last_strobe = c;
        // valid once the register has been refilled at this rate
        if (c >= n + step + 1) begin
          checks++;
          if (r_del !== hist[c - n] || r_del90 !== hist[c - n - 1]) begin
            failures++;
            if (failures < 10) $display("FAIL delay rate %0d c=%0d got %0b%0b exp %0b%0b",
                                        rt, c, r_del, r_del90, hist[c-n], hist[c-n-1]);
          end
        end
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_rate(RATE_100K, 6);
    run_rate(RATE_10K, 4);
    run_rate(RATE_1K, 3);
    run_rate(RATE_100, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
