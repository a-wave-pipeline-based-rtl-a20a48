// Testbench for npcpl_cell, the dual-rail pass-logic cell.
//
// Applies every combination of the three dual-rail inputs and checks both
// output rails (q = B ? A_i : A_j on the true rail, its complement on the
// other). It then wires the cell as AND, OR and XOR gates in the way the
// adder cells of the multiplier use it and checks their truth tables.
// Purely combinational: each check follows a 1 ns settle delay.
module tb_npcpl_cell;
  import mps_pkg::*;

  dual_rail_t ai, aj, bi, q;
  int checks = 0, failures = 0;

  npcpl_cell dut (.ai, .aj, .bi, .q);

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $display("watchdog expired");
    $finish;
  end

  initial begin
    ai = dr(1'b0); aj = dr(1'b0); bi = dr(1'b0);
    for (int k = 0; k < 8; k++) begin
      ai = dr(k[0]); aj = dr(k[1]); bi = dr(k[2]);
      #1;
      check(q.t, k[2] ? k[0] : k[1], $sformatf("mux true rail k=%0d", k));
      check(q.f, ~(k[2] ? k[0] : k[1]), $sformatf("mux complement rail k=%0d", k));
    end
    for (int k = 0; k < 4; k++) begin
      // AND: pass A when B, else 0 (B itself)
      ai = dr(k[0]); aj = dr(k[1]); bi = dr(k[1]);
      #1 check(q.t, k[0] & k[1], "AND");
      // OR: pass B (=1) when B, else A
      ai = dr(k[1]); aj = dr(k[0]); bi = dr(k[1]);
      #1 check(q.t, k[0] | k[1], "OR");
      // XOR: not A when B, else A
      ai = dr_not(dr(k[0])); aj = dr(k[0]); bi = dr(k[1]);
      #1 check(q.t, k[0] ^ k[1], "XOR");
      check(q.f, ~(k[0] ^ k[1]), "XNOR rail");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
