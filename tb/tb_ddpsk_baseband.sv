// tb_ddpsk_baseband: the baseband detector with ideal symbol timing.
// A 1-bit PSK carrier at fs/4 (sample pattern 1,0,0,1 shifted by 180 degrees
// for symbol 0) carries a random transmitted stream d_n. The symbol clear
// pulse is given on the first sample of each symbol. For each rate and each
// mode the test checks:
//   * |I_n| equals the 40 decimated samples per symbol, with the sign of the
//     first differential decoding c_n = d_n XNOR d_{n-1};
//   * at 100 kbps, where every sample is used, Q_n is zero (quadrature) but
//     for the one sample at the symbol edge, so within +-2;
//   * J_n equals c_n (DPSK) or c_n XNOR c_{n-1} (DDPSK), three cycles after
//     the clear pulse.
`timescale 1ns/1ps
module tb_ddpsk_baseband;
  import ddpsk_pkg::*;
  logic clk = 0, rst_n = 0, r = 0, sym_clr = 0;
  rate_t rate = RATE_100K;
  mode_t mode = MODE_DDPSK;
  logic signed [7:0] I_o, Q_o;
  logic signed [16:0] sum_o;
  logic J_o, J_valid;
  int checks = 0, failures = 0;
  bit d [$];

  ddpsk_baseband dut (.clk, .rst_n, .r, .rate, .mode, .sym_clr,
                      .I_o, .Q_o, .sum_o, .J_o, .J_valid);

  always #5 clk = ~clk;

  function automatic bit xn(bit a, bit b); return ~(a ^ b); endfunction

  task automatic run(rate_t rt, mode_t md, int nsym);
    int n;
    bit c_i, c_p, exp_j;
    rate = rt; mode = md;
    n = int'(symbol_len(rt));
    d.delete();
    for (int i = 0; i < nsym; i++) begin
      d.push_back(1'($urandom_range(1)));
      for (int s = 0; s < n; s++) begin
        @(negedge clk);
        sym_clr = (s == 0);
        r = ((s % 4 == 0) || (s % 4 == 3)) ^ !d[i];
        // at s == 1 the sums of symbol i-1 are on I_o / Q_o;
        // at s == 3 its detected bit is on J_o
        if (i >= 3 && s == 1) begin
          c_i = xn(d[i-1], d[i-2]);
          checks++;
          if (I_o != (c_i ? 8'sd40 : -8'sd40) || (rt == RATE_100K && (Q_o > 2 || Q_o < -2))) begin
            failures++;
            if (failures < 10) $display("FAIL rate %0d sym %0d I=%0d Q=%0d exp I=%0d", rt, i-1, I_o, Q_o, c_i ? 40 : -40);
          end
        end
        if (i >= 3 && s == 3) begin
          c_i = xn(d[i-1], d[i-2]);
          c_p = xn(d[i-2], d[i-3]);
          exp_j = (md == MODE_DPSK) ? c_i : xn(c_i, c_p);
          checks++;
          if (!J_valid || J_o !== exp_j) begin
            failures++;
            if (failures < 10) $display("FAIL rate %0d mode %0d sym %0d J=%0b exp %0b", rt, md, i-1, J_o, exp_j);
          end
        end
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(RATE_100K, MODE_DDPSK, 60);
    run(RATE_100K, MODE_DPSK, 40);
    run(RATE_10K, MODE_DDPSK, 20);
    run(RATE_10K, MODE_DPSK, 12);
    run(RATE_1K, MODE_DDPSK, 10);
    run(RATE_100, MODE_DDPSK, 7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
