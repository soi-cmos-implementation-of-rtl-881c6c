// tb_transition_detector: both inputs of the timing circuit.
// PSK input: a 1-bit carrier at fs/4 with 180 degree phase steps every 40
// samples; z must be high for exactly the 2 samples after each step and low
// otherwise. Data input: random NRZ bits; z must be the XOR of the registered
// input and its copy two samples older, i.e. a 2-sample pulse per transition.
`timescale 1ns/1ps
module tb_transition_detector;
  import ddpsk_pkg::*;
  logic clk = 0, rst_n = 0, r_n = 0, j_n = 0;
  str_in_t s_t = STR_IN_PSK;
  logic s_o, s_d_o, z_o;
  int checks = 0, failures = 0, pulses = 0;
  bit hist [$];

  transition_detector #(.TAU(2)) dut (.clk, .rst_n, .s_t, .r_n, .j_n, .s_o, .s_d_o, .z_o);

  always #5 clk = ~clk;

  initial begin
    bit ph, exp_z, prev_z;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // PSK: carrier pattern 1,1,0,0 with phase flips
    ph = 0;
    for (int k = 0; k < 40 * 30; k++) begin
      @(negedge clk);
      if (k % 40 == 0 && $urandom_range(1)) ph = ~ph;
      r_n = ((k % 4) < 2) ^ ph;
      hist.push_back(r_n);
      @(posedge clk); #1;
      // z now compares samples k and k-2 (registered input is sample k)
      if (k >= 4) begin
        exp_z = ~(hist[k] ^ hist[k-2]);
        checks++;
        if (z_o !== exp_z) begin failures++; if (failures < 10) $display("FAIL psk k=%0d", k); end
        // and only right after a symbol boundary
        if (z_o && !((k % 40) < 2)) begin failures++; $display("FAIL psk pulse off boundary k=%0d", k); end
        if (z_o && (k % 40) == 0) pulses++;
      end
    end
    // Data input
    s_t = STR_IN_DATA;
    hist.delete();
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      if (k % 10 == 0) j_n = 1'($urandom_range(1));
      hist.push_back(j_n);
      @(posedge clk); #1;
      if (k >= 4) begin
        checks++;
        if (z_o !== (hist[k] ^ hist[k-2]) || s_o !== hist[k] || s_d_o !== hist[k-2]) begin
          failures++; if (failures < 10) $display("FAIL data k=%0d", k);
        end
      end
    end
    checks++;
    if (pulses == 0) begin failures++; $display("FAIL no PSK transition pulses"); end
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
