// Processing element of the carry-save multiplier array.
//
// An AND cell multiplies multiplier bit X by multiplicand bit Y; a full
// adder adds that partial-product bit to the partial sum A and the partial
// carry B coming from the row above, giving the new sum U and carry V.
// All from universal pass-logic cells. The delay buffers the physical cell
// carries on Y and A only equalise arrival times and are not modelled.
// Interface is single-rail; the dual rails are formed inside.
// Combinational.
module csa_pe
  import mps_pkg::*;
(
  input  logic x,
  input  logic y,
  input  logic a,
  input  logic b,
  output logic u,
  output logic v
);

  dual_rail_t pp, s, co;

  // AND: ai = X, aj = Y, bi = Y
  npcpl_cell u_and (.ai(dr(x)), .aj(dr(y)), .bi(dr(y)), .q(pp));

  pl_full_adder u_fa (.a(dr(a)), .b(dr(b)), .c(pp), .s(s), .co(co));

  assign u = s.t;
  assign v = co.t;

endmodule
