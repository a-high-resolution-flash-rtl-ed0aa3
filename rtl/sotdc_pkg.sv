// sotdc_pkg: sizes and constants shared by the sampling offset TDC.
//
// The converter has 64 levels built as two identical sections of 32, each level
// ending in a 20-bit counter; these numbers follow the fabricated converter. The
// counter is a two-tap maximal-length LFSR; the tap pair (20,17), i.e. the
// polynomial x^20 + x^17 + 1, and the reset seed are this design's choice.
// The default arbiter offsets spread the levels evenly over +3 ps .. +16 ps, the
// range measured on one section of the fabricated chip, in a scrambled order.
`timescale 1ps / 1fs
package sotdc_pkg;

  localparam int unsigned NUM_SECTIONS       = 2;
  localparam int unsigned LEVELS_PER_SECTION = 32;
  localparam int unsigned NUM_LEVELS         = NUM_SECTIONS * LEVELS_PER_SECTION;
  localparam int unsigned LEVEL_ADDR_W       = $clog2(NUM_LEVELS);
  localparam int unsigned COUNT_W            = 20;
  localparam int unsigned SYNC_STAGES        = 3;

  // Two-tap maximal-length LFSR (Fibonacci form): feedback = s[TAP_A-1] ^ s[TAP_B-1].
  localparam int unsigned LFSR_TAP_A = 20;
  localparam int unsigned LFSR_TAP_B = 17;
  localparam logic [COUNT_W-1:0] LFSR_SEED = COUNT_W'(1);

  // Thermal (temporal) noise of one comparing element, in ps.
  localparam real SIGMA_FF_PS = 0.35;

  // Offset range of the levels, in ps.
  localparam real OFFSET_MIN_PS = 3.0;
  localparam real OFFSET_MAX_PS = 16.0;

  // Default mismatch offset of level `idx` (0 .. NUM_LEVELS-1): a scrambled, evenly
  // spaced grid over [OFFSET_MIN_PS, OFFSET_MAX_PS]. 37 is odd, so idx*37 mod 64
  // is a permutation of 0..63.
  function automatic real level_offset_ps(int unsigned idx);
    int unsigned k;
    k = (idx * 37 + 11) % NUM_LEVELS;
    return OFFSET_MIN_PS + (OFFSET_MAX_PS - OFFSET_MIN_PS) * real'(k) / real'(NUM_LEVELS - 1);
  endfunction

endpackage
