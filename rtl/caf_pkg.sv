// caf_pkg: constants and helper functions shared by the CAF engine.
//
// The default sizes are those of the main configuration: 1000 reference samples
// correlated against a 2000-sample capture, 49 frequency offsets, a 12-bit NCO
// phase, 8-bit oscillator amplitude and 8-bit I/Q signal samples.
//
// half_sine() gives the contents of the oscillator lookup table. The table holds
// one half period of a sine, quantized symmetrically: entry k of a table with
// 2^(pb-1) entries is round((2^(nb-1)-1) * sin(pi*k / 2^(pb-1))). The amplitude is
// 2^(nb-1)-1 rather than 2^(nb-1) so the waveform is symmetric about zero and its
// negation never overflows. The table is computed at elaboration time, so no data
// file is needed.
package caf_pkg;

  localparam int unsigned DEF_N          = 1000; // reference length (integration length)
  localparam int unsigned DEF_NF         = 49;   // number of frequency offsets
  localparam int unsigned DEF_PHASE_BITS = 12;   // NCO phase accumulator width
  localparam int unsigned DEF_N_BITS     = 8;    // NCO output amplitude bits
  localparam int unsigned DEF_SIG_BITS   = 8;    // I and Q width of reference and capture

  localparam real PI = 3.14159265358979323846;

  // Quantized half-sine table entry k for a pb-bit phase and an nb-bit output.
  function automatic int half_sine(int k, int pb, int nb);
    real amp;
    amp = real'((1 << (nb - 1)) - 1);
    return $rtoi(amp * $sin(PI * real'(k) / real'(1 << (pb - 1))) + 0.5);
  endfunction

endpackage
