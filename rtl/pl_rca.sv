// Ripple-carry adder of W bits built from pass-logic full adders.
//
// Ripple carry suits a wave pipeline whose operand bits already arrive
// skewed, low bits first. Single-rail interface; combinational.
module pl_rca
  import mps_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         ci,
  output logic [W-1:0] s,
  output logic         co
);

  dual_rail_t [W:0] c;
  dual_rail_t [W-1:0] sd;

  assign c[0] = dr(ci);

  for (genvar i = 0; i < W; i++) begin : g_bit
    pl_full_adder u_fa (.a(dr(a[i])), .b(dr(b[i])), .c(c[i]), .s(sd[i]), .co(c[i+1]));
    assign s[i] = sd[i].t;
  end

  assign co = c[W].t;

endmodule
