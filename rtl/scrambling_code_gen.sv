// Local pilot scrambling code generator (downlink Gold code).
//
// Two 18-bit shift registers, x and y, shift one place toward bit 0 per
// chip. The new bit 17 of x is x0 ^ x7 and the new bit 17 of y is
// y0 ^ y5 ^ y7 ^ y10. The in-phase chip is x0 ^ y0; the quadrature chip is
// x4 ^ x6 ^ x15 ^ y5 ^ y6 ^ y8 ^ ... ^ y15. A chip bit of 1 stands for -1.
// The code is cut to a frame of FRAME_CHIPS chips: after the last chip of
// a frame both registers reload their initial state.
//
// Interface: en advances one chip; ci/cq are the current chip. restart
// reloads the initial state (chip 0 of a frame). Registers only, so the
// chip changes on the clock edge that sees en.
//
// Published: the register length, the feedback and output taps and the
// 38400-chip code period. This design's choices: the initial states
// (x = 1 in bit 0, y = all ones, i.e. scrambling code number 0) and the
// restart input.
module scrambling_code_gen #(
  parameter int unsigned FRAME_CHIPS = 38400
) (
  input  logic clk,
  input  logic rst_n,
  input  logic restart,
  input  logic en,
  output logic ci,
  output logic cq
);

  localparam logic [17:0] X_INIT = 18'h00001;
  localparam logic [17:0] Y_INIT = 18'h3FFFF;
  localparam int unsigned NW = $clog2(FRAME_CHIPS);

  logic [17:0]   x, y;
  logic [NW-1:0] n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= X_INIT;
      y <= Y_INIT;
      n <= '0;
    end else if (restart || (en && n == NW'(FRAME_CHIPS - 1))) begin
      x <= X_INIT;
      y <= Y_INIT;
      n <= '0;
    end else if (en) begin
      x <= {x[0] ^ x[7], x[17:1]};
      y <= {y[0] ^ y[5] ^ y[7] ^ y[10], y[17:1]};
      n <= n + 1'b1;
    end
  end

  assign ci = x[0] ^ y[0];
  assign cq = x[4] ^ x[6] ^ x[15] ^ y[5] ^ y[6] ^ (^y[15:8]);

endmodule
