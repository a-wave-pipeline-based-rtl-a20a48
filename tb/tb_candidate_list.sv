// Testbench for candidate_list, the sorted 36-entry candidate vector.
//
// Random delays and energies are inserted (up to 80 per round, so the list
// overflows) and after each insertion the whole list is read back and
// compared with a reference: the 36 strongest so far, in descending energy
// order, a newcomer placed after entries of equal energy. count and
// overflowed are checked every time; an insertion is visible on the next
// clock. clear empties the list.
module tb_candidate_list;
  import mps_pkg::*;
  localparam int MAX = 36;

  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  logic signed [DELAY_W-1:0] in_delay = 0, rd_delay;
  logic [ENERGY_W-1:0] in_energy = 0, rd_energy;
  logic [5:0] count, rd_idx = 0;
  logic overflowed;
  int checks = 0, failures = 0;

  candidate_list dut (.clk, .rst_n, .clear, .in_valid, .in_delay, .in_energy, .count, .overflowed,
                      .rd_idx, .rd_delay, .rd_energy);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #10000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  int md [$], me [$];
  bit ovf;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int round = 0; round < 6; round++) begin
      int n;
      @(negedge clk) clear = 1;
      @(negedge clk) clear = 0;
      md.delete(); me.delete(); ovf = 0;
      chk(count == 0 && !overflowed, "empty after clear");
      n = (round % 2) ? 80 : 20 + round;
      for (int k = 0; k < n; k++) begin
        int dl, en, pos;
        dl = int'($urandom % 769) - 384;
        en = (round == 4) ? 500 + int'($urandom % 4) : int'($urandom % 100000);
        @(negedge clk);
        in_valid = 1; in_delay = DELAY_W'(dl); in_energy = ENERGY_W'(en);
        @(negedge clk) in_valid = 0;
        // reference
        if (me.size() == MAX) ovf = 1;
        pos = 0;
        while (pos < me.size() && me[pos] >= en) pos++;
        if (pos < MAX) begin
          me.insert(pos, en); md.insert(pos, dl);
          if (me.size() > MAX) begin void'(me.pop_back()); void'(md.pop_back()); end
        end
        chk(int'(count) == me.size(), $sformatf("count %0d expected %0d", count, me.size()));
        chk(overflowed == ovf, "overflowed flag");
        for (int i = 0; i < me.size(); i++) begin
          rd_idx = 6'(i);
          #1;
          chk(int'(rd_energy) == me[i] && int'(rd_delay) == md[i],
              $sformatf("round %0d entry %0d: (%0d,%0d) expected (%0d,%0d)", round, i, rd_delay, rd_energy, md[i], me[i]));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
