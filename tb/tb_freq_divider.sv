// tb_freq_divider: at each rate the count must run modulo 40 * 10^rate and
// T_clk must be high for the first half; an inc must advance it by two, a dec
// hold it, and a load set it (loads only at 100 kbps, so the period count at
// the slower rates is undisturbed). Checked cycle by cycle against a model.
`timescale 1ns/1ps
module tb_freq_divider;
  import ddpsk_pkg::*;
  logic clk = 0, rst_n = 0, inc = 0, dec = 0, load = 0;
  logic [15:0] load_val = 0;
  rate_t rate = RATE_100K;
  logic [15:0] cnt_o;
  logic tclk_o;
  int checks = 0, failures = 0, model = 0, rises = 0;

  freq_divider dut (.clk, .rst_n, .rate, .inc, .dec, .load, .load_val, .cnt_o, .tclk_o);

  always #5 clk = ~clk;

  task automatic run(rate_t r, int cycles);
    int n;
    bit prev_t;
    rate = r;
    n = int'(symbol_len(r));
    rises = 0;
    prev_t = 1;
    inc = 0; dec = 0; load = 0;
    @(negedge clk);
    model = int'(cnt_o);
    model = (model >= n) ? 0 : (model + 1) % n;
    for (int c = 0; c < cycles; c++) begin
      @(negedge clk);
      inc = ($urandom_range(0, 99) == 0);
      dec = !inc && ($urandom_range(0, 99) == 0);
      load = (r == RATE_100K) && ($urandom_range(0, 999) == 0);
      load_val = 16'($urandom_range(0, n - 1));
      checks++;
      if (cnt_o != 16'(model) || tclk_o !== (model < n / 2)) begin
        failures++;
        if (failures < 10) $display("FAIL rate %0d c=%0d cnt=%0d exp %0d", r, c, cnt_o, model);
      end
      if (tclk_o && !prev_t) rises++;
      prev_t = tclk_o;
      if (load)            model = load_val;
      else if (model >= n) model = 0;
      else                 model = (model + (inc ? 2 : dec ? 0 : 1)) % n;
    end
    // about cycles/n clock periods
    checks++;
    if (rises < cycles / n - 2 || rises > cycles / n + 2) begin
      failures++; $display("FAIL rate %0d: %0d periods in %0d cycles", r, rises, cycles);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(RATE_100K, 2000);
    run(RATE_10K, 8000);
    run(RATE_1K, 40000);
    run(RATE_100, 200000);
    run(RATE_100K, 400);
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
