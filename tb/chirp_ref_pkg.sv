// Reference values for the chirp generator testbenches, worked out from the
// closed form of the default chirp rather than from the RTL's own function:
// with 0..10 MHz over 5 us and 1000 samples, t_n = 5 ns * n and
// k = 2e12 Hz/s, so the phase 2*pi*k*t_n^2 is pi * n^2 / 10000 and
//   code(n) = round(127.5 * (1 + cos(pi * n^2 / 10000))).
package chirp_ref_pkg;
  function automatic real ref_real(int n);
    return 127.5 * (1.0 + $cos(3.141592653589793 * real'(n) * real'(n) / 10000.0));
  endfunction

  function automatic int ref_code(int n);
    return int'($floor(ref_real(n) + 0.5));
  endfunction

  // True when `q` is the expected code; a difference of one is accepted only
  // where the exact value lies within 1e-6 of a rounding boundary.
  function automatic bit code_ok(int q, int n);
    real r, frac;
    r    = ref_real(n);
    frac = r - $floor(r);
    if (q == ref_code(n)) return 1'b1;
    return ((frac > 0.5 - 1e-6) && (frac < 0.5 + 1e-6) &&
            ((q - ref_code(n) == 1) || (ref_code(n) - q == 1)));
  endfunction

  // Voltage of the DAC module for a code (VREF = 5 V, 256 steps).
  function automatic real dac_volts(int code);
    return 5.0 * real'(code) / 256.0;
  endfunction
endpackage
