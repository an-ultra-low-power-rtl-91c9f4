// ring_ref_pkg: reference arithmetic for the ring-oscillator testbenches.
// A ring with an odd number of inverting stages oscillates with a period of
// twice its loop delay (AND gate plus every stage in its configured mode).
// The per-stage delays are the variation model's inputs from puf_pkg; the
// period and seed arithmetic are computed here independently of the RTL.
package ring_ref_pkg;
  timeunit 1ps; timeprecision 1fs;

  function automatic realtime ring_period_ps(input int unsigned seed,
                                             input logic [63:0] chal,
                                             input int unsigned n);
    realtime loop;
    loop = realtime'(puf_pkg::AND_DELAY_FS) / 1000.0;
    for (int unsigned i = 0; i < n; i++)
      loop += puf_pkg::stage_delay_ps(seed, i, chal[i]);
    return 2.0 * loop;
  endfunction

  // Seeds of the two rings of PUF instance 'index' on die 'die'.
  function automatic int unsigned ring_seed(input int unsigned die,
                                            input int unsigned index,
                                            input bit second);
    return puf_pkg::mix32(die * 32'h0001_0000 + index * 2 + (second ? 1 : 0));
  endfunction

  // A random challenge of n bits with exactly k ones.
  function automatic logic [63:0] chal_with_ones(input int unsigned n, input int unsigned k);
    logic [63:0] v;
    int unsigned cnt;
    v = '0;
    cnt = 0;
    while (cnt < k) begin
      int unsigned p;
      p = $urandom_range(0, n - 1);
      if (!v[p]) begin v[p] = 1'b1; cnt++; end
    end
    return v;
  endfunction
endpackage
