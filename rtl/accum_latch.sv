// One bit of the CMAC accumulation latch.
//
// In the wave-pipelined CMAC the bits of the accumulator adder settle at
// different times, so each bit has its own latch that returns the adder
// output to the adder exactly one clock later. Three D flip-flops do this
// with a three-phase clocking scheme: the first samples DATA_in on the late
// copy of CLK (so a fast wave cannot race through within one period), the
// second on not CLK (second half of the period), the third on CLK, which
// re-enters the value into the adder in the next cycle. The output passes
// through an AND with not RESET, so asserting RESET makes the adder start a
// new accumulation from zero. The flip-flop chain, the three clocks and the
// output gating are those of the published cell; no flip-flop is reset,
// as there; the gated output hides their contents.
//
// Ports: clk (CLK), clk_late (CLK delayed by a buffer), clk_n (not CLK),
// reset_n (not RESET), data_in, data_out.
// Timing: clk_late is CLK delayed by less than half a period. data_in
// sampled at the late edge of cycle k appears on data_out from the rising
// CLK edge that starts cycle k+1: one clock around the accumulation loop.
module accum_latch (
  input  logic clk,
  input  logic clk_late,
  input  logic clk_n,
  input  logic reset_n,
  input  logic data_in,
  output logic data_out
);

  logic q1, q2, q3;

  always_ff @(posedge clk_late) q1 <= data_in;
  always_ff @(posedge clk_n)    q2 <= q1;
  always_ff @(posedge clk)      q3 <= q2;

  assign data_out = q3 & reset_n;

endmodule
