// tb_freq_controller: feeds interval reports. Intervals that are whole
// multiples (1 to 4) of a rate's symbol length must select that rate:
// immediately when it is faster than the current one, after two agreeing
// intervals when it is slower. A single long interval must not change the
// rate, and intervals marked not ok must be ignored.
`timescale 1ns/1ps
module tb_freq_controller;
  import ddpsk_pkg::*;
  logic clk = 0, rst_n = 0, edge_i = 0, interval_ok_i = 0;
  logic [17:0] interval_i = 0;
  rate_t rate_o;
  logic change_o;
  int checks = 0, failures = 0;

  freq_controller dut (.clk, .rst_n, .edge_i, .interval_i, .interval_ok_i, .rate_o, .change_o);

  always #5 clk = ~clk;

  task automatic report(int iv, bit ok = 1);
    @(negedge clk);
    edge_i = 1; interval_i = 18'(iv); interval_ok_i = ok;
    @(negedge clk);
    edge_i = 0;
  endtask

  task automatic expect_rate(rate_t r, string what);
    checks++;
    if (rate_o !== r) begin failures++; $display("FAIL %s: rate %0d exp %0d", what, rate_o, r); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    expect_rate(RATE_100K, "reset");
    for (int t = 0; t < 40; t++) begin
      rate_t tgt, cur;
      int n;
      cur = rate_o;
      tgt = rate_t'($urandom_range(0, 3));
      n = int'(symbol_len(tgt));
      report(n * $urandom_range(1, 4) + $urandom_range(0, 2));
      if (tgt < cur) expect_rate(tgt, "faster at once");
      else if (tgt > cur) begin
        expect_rate(cur, "slower needs confirmation");
        report(n * 9, 0);                        // not ok: ignored
        expect_rate(cur, "ignored report");
        report(n * $urandom_range(1, 4) + 1);
        expect_rate(tgt, "slower confirmed");
      end else expect_rate(cur, "same");
      // one long run at the current rate changes nothing
      if (rate_o != RATE_100) begin
        cur = rate_o;
        report(int'(symbol_len(cur)) * 6);
        report(int'(symbol_len(cur)) * 2);
        expect_rate(cur, "single long run");
      end
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
