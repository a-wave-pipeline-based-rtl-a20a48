// Offset interleaving of the first dwell.
//
// The first dwell tests 768 offsets: +-1..+-96 chips at each of the four
// sample phases of a chip. In each of the first 8 pilot symbols of a slot
// it makes 24 tests, 8 chips apart: tests 0..11 cover the positive window
// (chips p, p+8, ..., p+88 for symbol p = 1..8) and tests 12..23 the
// negative window (chips -(p+88), ..., -p). Symbols 9 and 10 stay unused
// so a 512-chip correlation never runs into the next slot. Slot k of a
// search window uses sample phase k-1, so the four slots of a window
// together cover every quarter chip; the second window repeats the pattern
// one slot later.
// The positive window correlates against the code starting at its own
// symbol, the negative window against the code starting at the next
// symbol (the sequence is shared with the next symbol's positive window).
//
// Outputs, combinational:
//   delay      signed delay in samples: +-(4*chip) + phase
//   code_start first code chip of the correlation, from the period start
//   samp_start first received sample: 4*code_start + delay
// The interleaving pattern, window split and code alignment are the
// published ones.
module dwell1_offsets
  import mps_pkg::*;
(
  input  logic       win,        // 0: slots 1-4, 1: slots 2-5
  input  logic [1:0] slot,       // slot within the window (0..3) = sample phase
  input  logic [2:0] sym,        // pilot symbol 0..7
  input  logic [4:0] test,       // test 0..23
  output logic signed [DELAY_W-1:0] delay,
  output logic [13:0] code_start,
  output logic [15:0] samp_start
);

  logic [6:0]  chip;        // 1..96
  logic        neg;
  logic [2:0]  abs_slot;
  logic [3:0]  code_sym;    // pilot symbol of the code start, 0..8
  int          d;

  always_comb begin
    neg      = (test >= 5'd12);
    if (!neg) chip = 7'(sym) + 7'd1 + 7'd8 * 7'(test);
    else      chip = 7'(sym) + 7'd1 + 7'd8 * (7'd23 - 7'(test));
    abs_slot = 3'(win) + 3'(slot);
    code_sym = 4'(sym) + (neg ? 4'd1 : 4'd0);
    code_start = 14'(SLOT_CHIPS * abs_slot + SYM_CHIPS * code_sym);
    d = neg ? -(int'(CHI) * int'(chip)) + int'(slot)
            :  (int'(CHI) * int'(chip)) + int'(slot);
    delay      = DELAY_W'(d);
    samp_start = 16'(int'(CHI) * int'(code_start) + d);
  end

endmodule
