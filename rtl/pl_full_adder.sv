// Full adder made of three universal pass-logic cells.
//
// An XOR cell forms A^B, a SUM cell selects C or not C under the complement
// rail of A^B, and a CARRY cell selects C when A^B is 1 and B otherwise.
// Inputs and outputs are dual-rail. Purely combinational; used by the
// carry-save array, the ripple-carry adders and the CMAC adders.
module pl_full_adder
  import mps_pkg::*;
(
  input  dual_rail_t a,
  input  dual_rail_t b,
  input  dual_rail_t c,
  output dual_rail_t s,
  output dual_rail_t co
);

  dual_rail_t axb;

  npcpl_cell u_xor   (.ai(a), .aj(dr_not(a)), .bi(dr_not(b)),   .q(axb));
  npcpl_cell u_sum   (.ai(c), .aj(dr_not(c)), .bi(dr_not(axb)), .q(s));
  npcpl_cell u_carry (.ai(c), .aj(b),         .bi(axb),         .q(co));

endmodule
