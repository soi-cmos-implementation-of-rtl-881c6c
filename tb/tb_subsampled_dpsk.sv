// tb_subsampled_dpsk: workload test of the subsampling mode at full size.
// A 15 MHz IF (sampling factor n = 7: fs = 4 fIF / 15) carries 100 kbps data
// sent without differential encoding, and the demodulator runs in DPSK mode.
// After a 1010 preamble the transmitter repeats the pattern 1110100010; a
// single differential stage must then output the XNOR of neighbouring bits,
// which for this pattern is the repeating sequence 0110001100 (shifted by one
// bit). The test counts each output bit against that rule, requires the
// recovered rate to be 100 kbps, the loop to be locked, and T_clk to have a
// period of 40 samples while locked.
`timescale 1ns/1ps
module tb_subsampled_dpsk;
  import ddpsk_pkg::*;

  localparam real PI = 3.14159265358979;
  localparam int  N = 40;          // samples per 100 kbps symbol
  localparam int  NSUB = 7;        // 15 MHz with fs = 4 MHz
  localparam int  LAT = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [11:0] vin = '0;
  logic r_n, data, data_valid, tclk, locked, y, z, rate_change, inc, dec;
  rate_t rate;
  logic signed [7:0] i_sum, q_sum;

  psk_demod_top dut (
    .clk, .rst_n, .vin, .mode(MODE_DPSK), .s_t(STR_IN_PSK),
    .r_n_o(r_n), .data_o(data), .data_valid_o(data_valid), .tclk_o(tclk),
    .rate_o(rate), .locked_o(locked), .y_o(y), .z_o(z),
    .i_sum_o(i_sum), .q_sum_o(q_sum),
    .rate_change_o(rate_change), .inc_o(inc), .dec_o(dec)
  );

  always #125 clk = ~clk;

  int checks = 0, failures = 0, k = 0, nsym = 0;
  bit tx [$];
  string pat = "1110100010";

  // Output checker: bit for symbol idx must be tx[idx] XNOR tx[idx-1].
  always @(posedge clk) if (rst_n && data_valid) begin
    int idx;
    idx = (k - LAT + N / 2) / N - 1;
    if (idx >= 6 && idx < tx.size()) begin
      checks++;
      if (data !== ~(tx[idx] ^ tx[idx-1])) begin
        failures++;
        if (failures < 10) $display("FAIL symbol %0d: got %0b", idx, data);
      end
    end
  end

  // Clock period check while locked.
  int last_rise = -1;
  bit tclk_q = 1'b1;
  always @(posedge clk) if (rst_n) begin
    if (tclk && !tclk_q) begin
      if (last_rise >= 0 && k > 10 * N && locked) begin
        checks++;
        if (k - last_rise < N - 1 || k - last_rise > N + 1) begin
          failures++; $display("FAIL T_clk period %0d", k - last_rise);
        end
      end
      last_rise = k;
    end
    tclk_q <= tclk;
  end

  initial begin
    real ph0;
    ph0 = 0.3;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < 4 + 10 * 12; b++)
      tx.push_back(b < 4 ? (b % 2 == 0) : (pat[(b - 4) % 10] == "1"));
    foreach (tx[b]) begin
      for (int s = 0; s < N; s++) begin
        @(negedge clk);
        vin = 12'($rtoi(1000.0 * $cos(PI / 2.0 * real'(((2 * NSUB + 1) * k) % 4) + ph0
                                      + (tx[b] ? 0.0 : PI))));
        k++;
      end
      if (b == 8) begin
        checks += 2;
        if (rate !== RATE_100K) begin failures++; $display("FAIL rate %0d", rate); end
        if (!locked)            begin failures++; $display("FAIL not locked"); end
      end
    end
    checks++;
    if (checks < 100) begin failures++; $display("FAIL too few checks"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
