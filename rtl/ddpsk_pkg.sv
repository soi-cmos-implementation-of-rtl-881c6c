// ddpsk_pkg: types and constants shared by the multirate D/DDPSK demodulator.
//
// Every block runs from one clock, the 4 MHz sampling clock fs. The demodulator
// supports four data rates, 100, 10, 1 and 0.1 kbps, which are 40, 400, 4000
// and 40000 samples per symbol: a base of 40 samples (100 kbps) and a decade
// step M = 10 between neighbouring rates. Those numbers, the 40-flip-flop
// constant delay and the modulation select m (0 = DDPSK, 1 = DPSK) follow the
// document. The rate is carried as a 2-bit level, 0 for the fastest rate; that
// encoding is this design's own.
package ddpsk_pkg;

  // Number of selectable data rates (100 k, 10 k, 1 k, 0.1 kbps).
  localparam int unsigned NUM_RATES = 4;
  // Samples per symbol at the highest rate: fs / 100 kbps = 40.
  localparam int unsigned BASE_DIV = 40;
  // Decimation ratio between neighbouring rates.
  localparam int unsigned RATE_STEP = 10;

  typedef enum logic [1:0] {
    RATE_100K = 2'd0,
    RATE_10K  = 2'd1,
    RATE_1K   = 2'd2,
    RATE_100  = 2'd3
  } rate_t;

  // Modulation select m, as in the document: m=0 DDPSK, m=1 DPSK.
  typedef enum logic {
    MODE_DDPSK = 1'b0,
    MODE_DPSK  = 1'b1
  } mode_t;

  // STR input select s_T: 0 = sampled PSK signal r_n, 1 = demodulated data J_n.
  typedef enum logic {
    STR_IN_PSK  = 1'b0,
    STR_IN_DATA = 1'b1
  } str_in_t;

  // Samples per symbol at a given rate level: BASE_DIV * RATE_STEP**level.
  function automatic int unsigned symbol_len(input rate_t lvl);
    int unsigned n;
    n = BASE_DIV;
    for (int i = 0; i < int'(lvl); i++) n = n * RATE_STEP;
    return n;
  endfunction

endpackage
