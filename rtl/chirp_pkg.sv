// Shared constants of the memory-based chirp generator.
//
// The chirp is a linear-FM burst x(t) = A*cos(2*pi*(k*t + f0)*t) with chirp rate
// k = (f1 - f0)/T, stored as unsigned 8-bit samples in a ROM and replayed by a
// binary counter. The figures below are the chirp specification: 0 to 10 MHz,
// 5 us long, 8-bit quantisation, stored as 1000 samples, played at a 24 MHz
// sample clock (6 MHz in the built hardware, limited by the DAC settling time).
// The sample function is shared by the ROM and by anyone who needs the table.
package chirp_pkg;

  // Chirp specification
  localparam int unsigned SAMPLES     = 1000;     // ROM depth, counter runs 0..999
  localparam int unsigned SAMPLE_BITS = 8;        // quantisation
  localparam real         F0_HZ       = 0.0;      // start frequency
  localparam real         F1_HZ       = 10.0e6;   // end frequency
  localparam real         DURATION_S  = 5.0e-6;   // chirp duration T


  // DAC module (DAC0808 + TL081): 0 V to VREF over the 8-bit code
  localparam real         DAC_VREF_V     = 5.0;
  localparam real         DAC_SETTLE_NS  = 150.0;   // settling time of the DAC0808

  // Idle DAC code between chirps: mid-scale, the zero of the bipolar chirp.
  localparam logic [SAMPLE_BITS-1:0] IDLE_CODE = 8'h80;

  localparam real PI = 3.141592653589793;

  // Sample n of a chirp with `depth` samples spread over `duration` seconds.
  // The cosine is offset by one and scaled so that 1+cos in [0,2] maps onto the
  // full unsigned code range 0..2^bits-1, rounded to nearest.
  function automatic int unsigned chirp_sample(int unsigned n, int unsigned depth,
                                               int unsigned bits, real f0, real f1,
                                               real duration);
    real t, k, phase, full;
    t     = duration * real'(n) / real'(depth);
    k     = (f1 - f0) / duration;
    phase = 2.0 * PI * (k * t + f0) * t;
    full  = real'((64'd1 << bits) - 1);
    return int'($floor(full * (1.0 + $cos(phase)) / 2.0 + 0.5));
  endfunction

endpackage
