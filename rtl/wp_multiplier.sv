// Wave-pipelined 8x8 sign-magnitude multiplier.
//
// The operands are 8-bit sign-magnitude words. Only the 7-bit magnitudes
// enter the unsigned carry-save array: row 0 forms X0*Y, and each further
// row i adds X_i*Y to the partial sums U and partial carries V of the row
// above through csa_pe cells. A ripple-carry adder merges the last row's
// sums and carries into the upper half of the 14-bit magnitude (the low
// bits leave the array one per row). The sign is the XOR of the operand
// signs. A negative result is one's-complemented (XOR of every magnitude
// bit with the sign) and a second ripple-carry adder adds the sign, giving
// a 15-bit two's-complement product, then sign-extended to 16 bits so
// that two products can be added without overflow.
//
// Interface: x, y (sign-magnitude) in, p (two's complement) out.
// Timing: combinational. In the wave pipeline it is one block of logic that
// several operand sets travel through at once; the delay-equalising
// buffers of the physical design have no logic function and are absent.
// The array, the two adders and the widths follow the published design;
// the exact row wiring of the array is the textbook carry-save (Braun)
// arrangement.
module wp_multiplier
  import mps_pkg::*;
#(
  parameter int unsigned W = 8   // word length including the sign bit
) (
  input  logic [W-1:0]     x,
  input  logic [W-1:0]     y,
  output logic [2*W-1:0]   p
);

  localparam int unsigned N = W - 1;  // magnitude bits

  logic [N-1:0] xm, ym;
  logic         sign;
  logic [N-1:0] u [N];   // partial sums per row
  logic [N-1:0] v [N];   // partial carries per row
  logic [2*N-1:0] mag;   // unsigned product of the magnitudes

  assign xm = x[N-1:0];
  assign ym = y[N-1:0];

  // Sign from an XOR cell.
  dual_rail_t sign_dr;
  npcpl_cell u_sign (.ai(dr(x[W-1])), .aj(dr_not(dr(x[W-1]))), .bi(dr_not(dr(y[W-1]))), .q(sign_dr));
  assign sign = sign_dr.t;

  // Carry-save array.
  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      logic a_in, b_in;
      if (i == 0) begin : g_first
        assign a_in = 1'b0;
        assign b_in = 1'b0;
      end else begin : g_next
        assign a_in = (j < N - 1) ? u[i-1][(j+1) % N] : 1'b0;
        assign b_in = v[i-1][j];
      end
      csa_pe u_pe (.x(xm[i]), .y(ym[j]), .a(a_in), .b(b_in), .u(u[i][j]), .v(v[i][j]));
    end
    assign mag[i] = u[i][0];
  end

  // Final carry-propagate adder of the array (upper N bits of the magnitude).
  logic [N-1:0] fa, fb;
  logic         fco;
  for (genvar j = 0; j < N; j++) begin : g_final
    assign fa[j] = (j < N - 1) ? u[N-1][(j+1) % N] : 1'b0;
    assign fb[j] = v[N-1][j];
  end
  pl_rca #(.W(N)) u_rca1 (.a(fa), .b(fb), .ci(1'b0), .s(mag[2*N-1:N]), .co(fco));

  // One's complement of a negative result, then add the sign (second adder).
  logic [2*N:0] ones, twos;
  logic         sco;
  assign ones = {sign, mag ^ {(2*N){sign}}};
  pl_rca #(.W(2*N+1)) u_rca2 (.a(ones), .b('0), .ci(sign), .s(twos), .co(sco));

  // First sign extension: 15 -> 16 bits.
  assign p = {twos[2*N], twos};

endmodule
