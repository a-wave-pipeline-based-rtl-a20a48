// Shared types and constants of the multipath searcher.
//
// The numbers here are the WCDMA frame figures the searcher is built around
// (2560 chips per slot, 256-chip pilot symbols, 4 samples per chip, a
// 5-slot search period) and the word widths of the wave-pipelined CMAC
// (8-bit sign-magnitude inputs, 16-bit products, 22-bit accumulators).
// dual_rail_t is the signal pair (true and complement rail) carried by every
// net of the pass-logic datapath.
package mps_pkg;

  // A dual-rail bit: t is the value, f its complement.
  typedef struct packed {
    logic t;
    logic f;
  } dual_rail_t;

  localparam int unsigned SLOT_CHIPS = 2560;  // chips per slot
  localparam int unsigned SYM_CHIPS  = 256;   // chips per pilot symbol
  localparam int unsigned CHI        = 4;     // samples per chip
  localparam int unsigned PERIOD_SLOTS = 5;   // slots per search period

  localparam int unsigned IN_W   = 8;   // CMAC input word, sign-magnitude
  localparam int unsigned PROD_W = 16;  // multiplier output, two's complement
  localparam int unsigned ACC_W  = 22;  // accumulator (16 + 6 bits of sign extension)

  localparam int unsigned DELAY_W  = 11;  // signed delay in samples (+-384)
  localparam int unsigned ENERGY_W = 20;  // energy word

  // Mode of the CMAC (Table of the input demultiplexer).
  typedef enum logic {
    MODE_CORR   = 1'b0,  // mode 1: complex correlation
    MODE_ENERGY = 1'b1   // mode 2: two I^2+Q^2 energies in parallel
  } cmac_mode_e;

  // Make a dual-rail pair from a single-rail bit.
  function automatic dual_rail_t dr(input logic b);
    return '{t: b, f: ~b};
  endfunction

  // Complement of a dual-rail signal: the rails swap, no gate needed.
  function automatic dual_rail_t dr_not(input dual_rail_t a);
    return '{t: a.f, f: a.t};
  endfunction

  // Two's complement value to 8-bit sign-magnitude, saturating at +-127.
  function automatic logic [IN_W-1:0] to_sign_mag(input logic signed [31:0] v);
    logic [31:0] mag;
    mag = (v < 0) ? 32'(-v) : 32'(v);
    if (mag > 32'd127) mag = 32'd127;
    return {(v < 0) && (mag != 0), mag[6:0]};
  endfunction

endpackage
