// tb_sotdc_pkg: reference models shared by the converter testbenches.
//
// lfsr_ref_next / lfsr_decode: an independent model of the 20-bit two-tap LFSR
// counter (polynomial x^20 + x^17 + 1, seed 1), written as a masked parity so it
// does not reuse the design's shift expression. lfsr_decode turns a raw counter
// state into the number of counted events by walking the sequence from the seed.
// ref_offset_ps: the arbiter offset a level is expected to have (evenly spaced
// over +3 .. +16 ps in the order (idx*37 + 11) mod 64).
// gauss, phi_cdf, inv_phi: Gaussian variate, standard normal cdf and its inverse,
// used to generate added timing noise and to check statistical results.
`timescale 1ps / 1fs
package tb_sotdc_pkg;

  localparam logic [19:0] REF_TAP_MASK = 20'h90000;  // bits 19 and 16

  function automatic logic [19:0] lfsr_ref_next(logic [19:0] s);
    return {s[18:0], ^(s & REF_TAP_MASK)};
  endfunction

  // Returns the number of steps from the seed to `state`, or -1 if not found
  // within `limit` steps.
  function automatic int lfsr_decode(logic [19:0] state, int limit);
    logic [19:0] s;
    s = 20'd1;
    for (int n = 0; n <= limit; n++) begin
      if (s == state) return n;
      s = lfsr_ref_next(s);
    end
    return -1;
  endfunction

  function automatic real ref_offset_ps(int idx);
    return 3.0 + 13.0 * real'((idx * 37 + 11) % 64) / 63.0;
  endfunction

  function automatic real gauss();
    real s;
    s = 0.0;
    for (int i = 0; i < 12; i++) s += real'($urandom) / 4294967296.0;
    return s - 6.0;
  endfunction

  // Standard normal cdf (Abramowitz & Stegun 26.2.17, error < 1e-7).
  function automatic real phi_cdf(real x);
    real t, y, ax, pdf;
    ax  = (x < 0.0) ? -x : x;
    t   = 1.0 / (1.0 + 0.2316419 * ax);
    pdf = 0.3989422804014327 * $exp(-0.5 * ax * ax);
    y = 1.0 - pdf * t * (0.319381530 + t * (-0.356563782 + t * (1.781477937
          + t * (-1.821255978 + t * 1.330274429))));
    return (x < 0.0) ? 1.0 - y : y;
  endfunction

  // Inverse of phi_cdf by bisection, for p in (0,1).
  function automatic real inv_phi(real p);
    real lo, hi, mid;
    lo = -8.0;
    hi = 8.0;
    for (int i = 0; i < 60; i++) begin
      mid = 0.5 * (lo + hi);
      if (phi_cdf(mid) < p) lo = mid;
      else hi = mid;
    end
    return 0.5 * (lo + hi);
  endfunction

endpackage
