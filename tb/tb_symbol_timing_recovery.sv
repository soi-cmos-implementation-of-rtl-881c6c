// tb_symbol_timing_recovery: the timing loop on its own.
// PSK input: a 1-bit carrier at fs/4 whose phase flips at symbol boundaries
// (1010 preamble, then run-limited random symbols), with now and then one
// sample flipped to imitate the narrow error pulses of a frequency offset.
// Each segment starts at an arbitrary phase relative to the loop. The test
// checks that the rate is found and the loop locked by the fifth symbol, and
// that afterwards every rising edge of T_clk falls on a symbol boundary within
// one sample and the clock period is the symbol length. Rates are visited
// 100 k -> 10 k -> 100 k -> 1 k -> 0.1 k.
// Data input: NRZ data changing three cycles after each boundary (the
// detector's output delay); T_clk must again rise on the boundaries.
`timescale 1ns/1ps
module tb_symbol_timing_recovery;
  import ddpsk_pkg::*;
  logic clk = 0, rst_n = 0, r_n = 0, j_n = 0;
  str_in_t s_t = STR_IN_PSK;
  logic tclk_o, locked_o, z_o, y_o, edge_o, rate_change_o, inc_o, dec_o;
  rate_t rate_o;
  int checks = 0, failures = 0;

  symbol_timing_recovery dut (.clk, .rst_n, .s_t, .r_n, .j_n, .tclk_o, .rate_o,
                              .locked_o, .z_o, .y_o, .edge_o, .rate_change_o,
                              .inc_o, .dec_o);

  always #5 clk = ~clk;

  int seg_pos = 0;   // sample index within the current segment
  int seg_n = 40;
  bit seg_check = 0;
  bit tclk_q = 1;
  int rises_checked = 0;

  // T_clk edge checker
  always @(posedge clk) begin
    if (rst_n && seg_check && tclk_o && !tclk_q) begin
      int off;
      off = seg_pos % seg_n;
      if (off > seg_n / 2) off -= seg_n;
      checks++;
      rises_checked++;
      if (off < -1 || off > 1) begin
        failures++;
        if (failures < 10) $display("FAIL T_clk rise %0d samples from boundary (N=%0d)", off, seg_n);
      end
    end
    tclk_q <= tclk_o;
  end

  task automatic segment(rate_t rt, int nsym, int skew, bit data_in);
    int n, run;
    bit d, prev;
    n = int'(symbol_len(rt));
    s_t = data_in ? STR_IN_DATA : STR_IN_PSK;
    seg_n = n; seg_check = 0;
    // arbitrary phase: idle skew samples first
    for (int s = 0; s < skew; s++) begin
      @(negedge clk); r_n = ((s % 4 == 0) || (s % 4 == 3)); seg_pos = -1;
    end
    prev = 0; run = 0;
    for (int i = 0; i < nsym; i++) begin
      if (i < 4) d = (i % 2 == 0);
      else begin
        d = 1'($urandom_range(1));
        if (d == prev && run >= 3) d = ~d;
      end
      run = (d == prev) ? run + 1 : 0;
      prev = d;
      if (i == 5) begin
        checks += 2;
        if (rate_o !== rt) begin failures++; $display("FAIL rate %0d exp %0d", rate_o, rt); end
        if (!locked_o)     begin failures++; $display("FAIL not locked at rate %0d", rt); end
      end
      if (i == 6) seg_check = 1;
      for (int s = 0; s < n; s++) begin
        @(negedge clk);
        seg_pos = i * n + s;
        r_n = ((s % 4 == 0) || (s % 4 == 3)) ^ !d;
        if (s % 20 == 7 && $urandom_range(0, 3) == 0) r_n = ~r_n;   // isolated narrow error pulse
        if (s == 3) j_n = d;
      end
    end
    seg_check = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    segment(RATE_100K, 40, 17, 0);
    segment(RATE_10K, 20, 123, 0);
    segment(RATE_100K, 30, 5, 0);
    segment(RATE_1K, 12, 1711, 0);
    segment(RATE_100, 9, 9000, 0);
    segment(RATE_100K, 40, 0, 0);
    segment(RATE_100K, 40, 0, 1);
    checks++;
    if (rises_checked < 120) begin failures++; $display("FAIL only %0d clock edges checked", rises_checked); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
