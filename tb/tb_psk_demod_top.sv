// tb_psk_demod_top: end-to-end test of the demodulator at its default
// parameters (4 MHz sampling, 40-stage delay, decade decimation).
//
// A transmitter model encodes the transmitted bit stream d_n, whose double
// differential decoding is the information a_n (c_n = d_n XNOR d_{n-1},
// a_n = c_n XNOR c_{n-1}), onto a 1 MHz IF carrier (fs/4), adds a Doppler
// frequency offset, and feeds the amplitude to the 1-bit ADC model. Every
// segment starts with the 1010 preamble. The stream is run-limited to four
// equal symbols, which is what the framing rule with inserted transition bits
// guarantees. The first segment uses the example bit stream
// 1010 10001011 101010001011 ... whose decoded data is 11 11010110
// 101111010110 ...
//
// Segments: 100 kbps DDPSK with +10 kHz Doppler; 10 kbps DDPSK with -10 kHz;
// 100 kbps DPSK without Doppler; 1 kbps and 0.1 kbps DDPSK; 100 kbps DDPSK
// whose timing input switches from the PSK signal to the detected data;
// then a 15 MHz IF (sampling factor n = 7, subsampling) at 100 kbps DPSK and
// 10 kbps DDPSK.
// Each detected bit is matched to the symbol it belongs to by its output time
// and compared with the reference decoding of d_n. The test also checks that
// the recovered rate is right after the preamble, that the loop locks within
// a few symbols, and that every loop mechanism occurred: rate steps up and
// down, prefilter rejection of narrow error pulses, phase increments and
// decrements, both modulation modes and both timing inputs.
`timescale 1ns/1ps
module tb_psk_demod_top;
  import ddpsk_pkg::*;

  localparam real FS   = 4.0e6;
  localparam real PI   = 3.14159265358979;
  localparam int  LAT  = 4;      // cycles from symbol end at vin to data_valid

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [11:0] vin = '0;
  mode_t   mode = MODE_DDPSK;
  str_in_t s_t  = STR_IN_PSK;
  logic r_n, data, data_valid, tclk, locked, y, z, rate_change, inc, dec;
  rate_t rate;
  logic signed [7:0] i_sum, q_sum;

  psk_demod_top dut (
    .clk, .rst_n, .vin, .mode, .s_t,
    .r_n_o(r_n), .data_o(data), .data_valid_o(data_valid), .tclk_o(tclk),
    .rate_o(rate), .locked_o(locked), .y_o(y), .z_o(z),
    .i_sum_o(i_sum), .q_sum_o(q_sum),
    .rate_change_o(rate_change), .inc_o(inc), .dec_o(dec)
  );

  always #125 clk = ~clk;

  int checks = 0, failures = 0;

  // ---- transmitter state shared with the checker ----
  bit   dbits [$];          // transmitted symbols of the current segment
  int   seg_start = 0;      // sample index of the segment's first symbol
  int   seg_n = 40;         // samples per symbol of the current segment
  rate_t seg_rate = RATE_100K;
  mode_t seg_mode = MODE_DDPSK;
  bit   seg_data_check = 0; // checker active
  int   k = 0;              // global sample index

  // ---- mechanism counters ----
  int n_rate_up = 0, n_rate_down = 0, n_narrow = 0, n_inc = 0, n_dec = 0;
  int n_chk_ddpsk = 0, n_chk_dpsk = 0, n_chk_data_in = 0, n_locked = 0, n_chk_sub = 0;

  function automatic bit xnor2(bit a, bit b); return ~(a ^ b); endfunction

  function automatic bit expected_bit(int idx, mode_t md);
    bit c0, c1;
    c0 = xnor2(dbits[idx], dbits[idx-1]);
    if (md == MODE_DPSK) return c0;
    c1 = xnor2(dbits[idx-1], dbits[idx-2]);
    return xnor2(c0, c1);
  endfunction

  // Checker: map each output to its symbol by time.
  always @(posedge clk) if (rst_n && data_valid && seg_data_check) begin
    int rel;
    int idx;
    rel = k - seg_start - LAT;
    idx = int'((rel + seg_n/2) / seg_n) - 1;
    if (idx >= 4 && idx < dbits.size()) begin
      checks++;
      if (data !== expected_bit(idx, seg_mode)) begin
        failures++;
        if (failures < 20)
          $display("MISMATCH k=%0d seg_rate=%0d idx=%0d got=%0d exp=%0d I=%0d Q=%0d",
                   k, seg_rate, idx, data, expected_bit(idx, seg_mode), i_sum, q_sum);
      end
      if (nsub != 0) n_chk_sub++;
      if (s_t == STR_IN_DATA) n_chk_data_in++;
      else if (seg_mode == MODE_DPSK) n_chk_dpsk++;
      else n_chk_ddpsk++;
    end
  end

  // Mechanism monitors.
  rate_t rate_q = RATE_100K;
  int zrun = 0;
  always @(posedge clk) if (rst_n) begin
    if (rate_change) begin
      if (rate < rate_q) n_rate_up++; else n_rate_down++;
    end
    rate_q <= rate;
    if (z) zrun <= zrun + 1;
    else begin
      if (zrun == 1) n_narrow++;
      zrun <= 0;
    end
    if (inc) n_inc++;
    if (dec) n_dec++;
    if (locked) n_locked++;
  end

  // ---- transmitter ----
  real phase_acc = PI / 4.0;

  int nsub = 0;   // sampling factor n: fIF = (2n+1) fs / 4

  task automatic send_symbol(bit d, int n, real doppler_hz);
    for (int s = 0; s < n; s++) begin
      real ph;
      @(negedge clk);
      ph  = PI / 2.0 * real'(((2 * nsub + 1) * k) % 4) + phase_acc + (d ? 0.0 : PI);
      vin = 12'(int'($rtoi(1000.0 * $cos(ph))));
      phase_acc = phase_acc + 2.0 * PI * doppler_hz / FS;
      if (phase_acc > 2.0 * PI) phase_acc = phase_acc - 2.0 * PI;
      if (phase_acc < 0.0)      phase_acc = phase_acc + 2.0 * PI;
      k++;
    end
  endtask

  // Picks the next symbol so that neither d_n nor its decoded data has a run
  // longer than four.
  function automatic bit next_symbol();
    bit cand [2];
    cand[0] = 1'($urandom_range(1));
    cand[1] = ~cand[0];
    foreach (cand[i]) begin
      int n, rd, ra;
      bit ok;
      dbits.push_back(cand[i]);
      n = dbits.size();
      rd = 1;
      while (rd < n && dbits[n-1-rd] == dbits[n-1]) rd++;
      ok = (rd <= 4);
      if (n >= 7) begin
        ra = 1;
        while (ra < n - 3 && expected_bit(n-1-ra, MODE_DDPSK) == expected_bit(n-1, MODE_DDPSK)) ra++;
        ok = ok && (ra <= 4);
      end
      void'(dbits.pop_back());
      if (ok) return cand[i];
    end
    return cand[0];
  endfunction

  task automatic run_segment(rate_t r, mode_t md, int nbits, real doppler_hz,
                             bit paper_pattern, int switch_at);
    string pat, hdr;
    int n;
    n = int'(symbol_len(r));
    dbits.delete();
    seg_data_check = 0;
    @(negedge clk);
    seg_start = k;
    seg_n     = n;
    seg_rate  = r;
    seg_mode  = md;
    mode      = md;
    s_t       = STR_IN_PSK;
    pat = "101010001011";
    hdr = "10001011";
    for (int b = 0; b < nbits; b++) begin
      bit d;
      if (b < 4)             d = (b % 2 == 0);              // preamble 1010
      else if (paper_pattern) d = (b < 12) ? (hdr[b-4] == "1")
                                           : (pat[(b-12) % 12] == "1");
      else                    d = next_symbol();
      dbits.push_back(d);
      if (b == 4) seg_data_check = 1;
      if (b == 4 && rate !== r) begin
        failures++;
        $display("FAIL: rate %0d not recovered after preamble (got %0d)", r, rate);
      end
      if (b == 4) checks++;
      if (b == 6) begin
        checks++;
        if (!locked) begin failures++; $display("FAIL: not locked 6 symbols into rate %0d (segment at sample %0d)", r, seg_start); end
      end
      if (b == switch_at) s_t = STR_IN_DATA;
      send_symbol(d, n, doppler_hz);
    end
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    run_segment(RATE_100K, MODE_DDPSK, 64,  10.0e3, 1'b1, -1);
    run_segment(RATE_10K,  MODE_DDPSK, 30, -10.0e3, 1'b0, -1);
    run_segment(RATE_100K, MODE_DPSK,  40,   0.0,   1'b0, -1);
    run_segment(RATE_1K,   MODE_DDPSK, 14,  10.0e3, 1'b0, -1);
    run_segment(RATE_100,  MODE_DDPSK, 10,   0.0,   1'b0, -1);
    run_segment(RATE_100K, MODE_DDPSK, 80,  10.0e3, 1'b0, 20);
    nsub = 7;    // 15 MHz IF, subsampled
    run_segment(RATE_100K, MODE_DPSK,  40,   0.0,   1'b0, -1);
    run_segment(RATE_10K,  MODE_DDPSK, 20,   5.0e3, 1'b0, -1);
    nsub = 0;
    seg_data_check = 0;

    // Every mechanism must have happened.
    checks += 10;
    if (n_chk_sub < 40)    begin failures++; $display("FAIL: too few subsampled bits checked"); end
    if (n_rate_up == 0)    begin failures++; $display("FAIL: no rate step up"); end
    if (n_rate_down == 0)  begin failures++; $display("FAIL: no rate step down"); end
    if (n_narrow == 0)     begin failures++; $display("FAIL: no narrow error pulse"); end
    if (n_inc == 0)        begin failures++; $display("FAIL: no phase increment"); end
    if (n_dec == 0)        begin failures++; $display("FAIL: no phase decrement"); end
    if (n_chk_ddpsk < 100) begin failures++; $display("FAIL: too few DDPSK bits checked"); end
    if (n_chk_dpsk < 30)   begin failures++; $display("FAIL: too few DPSK bits checked"); end
    if (n_chk_data_in < 40) begin failures++; $display("FAIL: too few bits with data timing input"); end
    if (n_locked == 0)     begin failures++; $display("FAIL: never locked"); end
    $display("mechanisms: rate_up=%0d rate_down=%0d narrow_pulses_rejected=%0d inc=%0d dec=%0d",
             n_rate_up, n_rate_down, n_narrow, n_inc, n_dec);
    $display("bits checked: ddpsk=%0d dpsk=%0d data_timing_input=%0d subsampled_15MHz=%0d",
             n_chk_ddpsk, n_chk_dpsk, n_chk_data_in, n_chk_sub);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog: the whole run is about 0.5 M sampling periods.
  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
