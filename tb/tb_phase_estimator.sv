// tb_phase_estimator: random phase samples at each rate. After every edge the
// number of dec (hold) cycles minus inc (skip) cycles must equal the phase
// error phase - target folded into (-N/2, N/2], and locked must be high
// exactly when that error is within one sample. A flush cancels a pending
// correction.
`timescale 1ns/1ps
module tb_phase_estimator;
  import ddpsk_pkg::*;
  logic clk = 0, rst_n = 0, edge_i = 0, flush = 0;
  rate_t rate = RATE_100K;
  logic [15:0] target = 16'd2, phase_i = 0;
  logic inc_o, dec_o, locked_o;
  int checks = 0, failures = 0;

  phase_estimator dut (.clk, .rst_n, .rate, .target, .edge_i, .flush, .phase_i,
                       .inc_o, .dec_o, .locked_o);

  always #5 clk = ~clk;

  initial begin
    int n, e, net, ph;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 120; t++) begin
      rate = rate_t'(t % 3);     // 100 k, 10 k, 1 k
      n = int'(symbol_len(rate));
      ph = (t % 5 == 0) ? (2 + $urandom_range(0, 2) + n - 1) % n : $urandom_range(0, n - 1);
      e = ph - 2;
      if (e < 0) e += n;
      if (e > n / 2) e -= n;
      @(negedge clk);
      edge_i = 1; phase_i = 16'(ph);
      @(negedge clk);
      edge_i = 0;
      #1;
      checks++;
      if (locked_o !== (e >= -1 && e <= 1)) begin failures++; $display("FAIL lock e=%0d", e); end
      net = 0;
      if (t % 7 == 3 && (e > 3 || e < -3)) begin
        // flush part-way: the remaining correction must be dropped
        for (int c = 0; c < 2; c++) begin
          net += dec_o ? 1 : 0; net -= inc_o ? 1 : 0;
          @(negedge clk); #1;
        end
        flush = 1; @(negedge clk); flush = 0; #1;
        repeat (n) begin
          checks++;
          if (inc_o || dec_o) begin failures++; $display("FAIL correction after flush"); end
          @(negedge clk); #1;
        end
        continue;
      end
      repeat (n) begin
        if (inc_o && dec_o) begin failures++; $display("FAIL inc and dec"); end
        net += dec_o ? 1 : 0;
        net -= inc_o ? 1 : 0;
        @(negedge clk); #1;
      end
      checks++;
      if (net != e) begin failures++; $display("FAIL t=%0d correction %0d exp %0d rate %0d ph %0d", t, net, e, rate, ph); end
    end
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
