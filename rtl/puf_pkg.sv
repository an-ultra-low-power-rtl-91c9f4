// puf_pkg: constants and helper functions shared by the configurable RO PUF.
//
// The structural sizes (25 stages per ring, 25-bit challenge, 32 PUF
// instances for a 32-bit response) follow the design description. The
// counter width, the measurement window and the stage delays used by the
// behavioural ring-oscillator model are this design's own choices:
//   * INV_DELAY_PS / BUF_DELAY_PS are fitted to the reported ring frequencies
//     (about 669 MHz with 17 inverting stages, 746 MHz with 21), which give
//     roughly 24 ps per inverting stage and 43 ps per pass-transistor stage.
//   * stage_delay_ps() adds a deterministic per-stage "process variation"
//     derived from a seed, so that every simulated die, ring and stage differs.
package puf_pkg;
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned N_STAGES      = 25;   // 4T cells per ring
  localparam int unsigned CHAL_W        = 25;   // challenge / LFSR width
  localparam int unsigned N_PUF         = 32;   // RO pairs -> response bits
  localparam int unsigned CNT_W         = 16;   // RO edge counter width
  localparam int unsigned WINDOW_CYCLES = 256;  // enable window, system clocks

  // Nominal stage delays of the behavioural model, in femtoseconds.
  localparam int unsigned INV_DELAY_FS  = 23_700;
  localparam int unsigned BUF_DELAY_FS  = 43_000;
  localparam int unsigned AND_DELAY_FS  = 15_000;
  // Peak-to-peak spread of the uniform per-stage variation, in femtoseconds.
  localparam int unsigned VAR_SPAN_FS   = 4_000;

  // 32-bit integer mixing function (xorshift-multiply), used to derive
  // repeatable pseudo-random variation from a seed.
  function automatic int unsigned mix32(input int unsigned x);
    int unsigned h;
    h = x;
    h = h ^ (h >> 16);
    h = h * 32'h7feb_352d;
    h = h ^ (h >> 15);
    h = h * 32'h846c_a68b;
    h = h ^ (h >> 16);
    return h;
  endfunction

  // Delay of one 4T stage in picoseconds. 'inverting' selects the inverter
  // path (M1/M2) or the pass-transistor path (M3/M4); the two paths get
  // independent variation because different transistors conduct.
  function automatic realtime stage_delay_ps(input int unsigned seed,
                                             input int unsigned stage,
                                             input bit inverting);
    int unsigned h;
    int unsigned nominal;
    h = mix32(seed ^ mix32(stage * 2 + (inverting ? 1 : 0) + 32'h9e37_79b9));
    nominal = inverting ? INV_DELAY_FS : BUF_DELAY_FS;
    return realtime'(nominal - VAR_SPAN_FS / 2 + (h % (VAR_SPAN_FS + 1))) / 1000.0;
  endfunction

  // Number of ones in a challenge word.
  function automatic int unsigned popcount(input logic [CHAL_W-1:0] v);
    int unsigned n;
    n = 0;
    for (int i = 0; i < CHAL_W; i++) n += int'(v[i]);
    return n;
  endfunction
endpackage
