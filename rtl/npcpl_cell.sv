// Universal dual-rail pass-logic cell (NPCPL).
//
// Every gate of the wave-pipelined arithmetic is this one cell. Two pass
// networks, one per rail, connect either A_i or A_j to an internal node:
// B_i switches on the A_i path (and the complement A_i path on the other
// rail), not B_i the A_j path. Level-restoring inverters then drive Q and
// not Q. Logically the cell is a 2:1 multiplexer on both rails:
//   q = bi ? ai : aj   (true and complement rails alike)
// Which function it performs depends only on how its inputs are wired:
//   AND   ai=A      aj=B      bi=B       -> A&B
//   OR    ai=A      aj=B      bi=not B   -> A|B
//   XOR   ai=A      aj=not A  bi=not B   -> A^B
//   CARRY ai=C      aj=B      bi=A^B     -> carry(A,B,C)
//   SUM   ai=C      aj=not C  bi=not(A^B) -> A^B^C
//   BUFF  ai=B      aj=B      bi=B       -> B one cell delay later
// The connection list and the two-rail structure follow the cell's
// published description; the SUM row selects on the complement rail of
// A^B, which is what makes the multiplexer give the sum. Electrical
// properties (pass-transistor sizing, level restoring, delay equalisation)
// have no RTL counterpart: here the cell is purely combinational.
module npcpl_cell
  import mps_pkg::*;
(
  input  dual_rail_t ai,
  input  dual_rail_t aj,
  input  dual_rail_t bi,
  output dual_rail_t q
);

  always_comb begin
    q.t = bi.t ? ai.t : aj.t;
    q.f = bi.t ? ai.f : aj.f;
  end

endmodule
