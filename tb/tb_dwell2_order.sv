// Testbench for dwell2_order, the interleaved test order of the 2nd dwell.
//
// For every candidate count 1..36 the sequence is collected with next
// held high. It must be a permutation of 0..psi-1, visit the candidates in
// groups (one group per pilot symbol) with stride ceil(psi/ceil(psi/6)),
// use at most 6 groups (symbols 7-10 stay free), put at most ceil(psi/6)
// candidates in each group, and end with a single done pulse one clock
// after the last index. For 36 candidates the order is checked literally:
// 0, 6, 12, ..., 30, 1, 7, ... A count of 0 gives no index at all.
module tb_dwell2_order;
  logic clk = 0, rst_n = 0, start = 0, next = 0;
  logic [5:0] psi = 0;
  logic valid, done;
  logic [5:0] idx;
  logic [2:0] group;
  int checks = 0, failures = 0;

  dwell2_order dut (.clk, .rst_n, .start, .psi, .next, .valid, .idx, .group, .done);

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

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n <= 36; n++) begin
      int seq [$], grp [$], gcount [8], gsize, step, dones;
      bit seen [36];
      seq.delete(); grp.delete();
      gsize = (n + 5) / 6;
      step = (gsize == 0) ? 0 : (n + gsize - 1) / gsize;
      @(negedge clk) start = 1; psi = 6'(n);
      @(negedge clk) start = 0; next = 1;
      dones = 0;
      for (int c = 0; c < 60; c++) begin
        if (valid) begin
          seq.push_back(int'(idx)); grp.push_back(int'(group));
        end
        @(posedge clk); #1;
        if (done) dones++;
        chk(!(done && valid), "done and valid together");
        @(negedge clk);
      end
      next = 0;
      if (seq.size() != n) foreach (seq[k]) $display("  psi %0d seq[%0d] = %0d", n, k, seq[k]);
      chk(seq.size() == n, $sformatf("psi %0d: %0d indices", n, seq.size()));
      chk(dones == (n != 0), $sformatf("psi %0d: %0d done pulses", n, dones));
      foreach (gcount[g]) gcount[g] = 0;
      foreach (seen[i]) seen[i] = 0;
      foreach (seq[k]) begin
        chk(seq[k] < n && !seen[seq[k]], $sformatf("psi %0d: index %0d", n, seq[k]));
        if (seq[k] < 36) seen[seq[k]] = 1;
        chk(grp[k] < 6, "group within the first 6 symbols");
        chk(seq[k] % step == grp[k], $sformatf("psi %0d: index %0d in group %0d", n, seq[k], grp[k]));
        if (k > 0) chk(grp[k] >= grp[k-1], "groups in order");
        gcount[grp[k]]++;
      end
      foreach (gcount[g]) chk(gcount[g] <= gsize, $sformatf("psi %0d: group %0d holds %0d", n, g, gcount[g]));
      if (n == 36)
        foreach (seq[k]) chk(seq[k] == (k % 6) * 6 + k / 6, $sformatf("36: position %0d is %0d", k, seq[k]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
