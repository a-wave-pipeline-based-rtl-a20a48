// Testbench for verification_logic.
//
// Directed case: the example profile with candidates at offsets 0..12,
// real paths at 3 and 9 and a false local maximum at 7. Only 3 and 9 may
// survive. Random cases: up to 36 distinct delays packed into a narrow
// range (so peaks cluster) with random energies, compared with a
// reference written from the published rules:
//   a local maximum has more energy than each immediate neighbour present;
//   weaker peaks within +-2 of a local maximum go, and within +-3 on a
//   side where no other local maximum lies within 8 samples;
//   of two survivors less than 3 samples apart the weaker goes.
// done must come exactly 5 clock edges after the edge that takes start.
module tb_verification_logic;
  import mps_pkg::*;
  localparam int N = 36;

  logic clk = 0, rst_n = 0, start = 0;
  logic [5:0] count = 0;
  logic signed [N-1:0][DELAY_W-1:0] delay = '0;
  logic [N-1:0][ENERGY_W-1:0] energy = '0;
  logic done;
  logic [N-1:0] keep;
  int checks = 0, failures = 0;

  verification_logic dut (.clk, .rst_n, .start, .count, .delay, .energy, .done, .keep);

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

  function automatic logic [N-1:0] model(input int n, input int d [N], input int e [N]);
    bit lm [N], gone [N], nl, nr;
    int w;
    logic [N-1:0] k;
    for (int x = 0; x < n; x++) begin
      lm[x] = 1;
      for (int y = 0; y < n; y++)
        if ((d[y] == d[x] + 1 || d[y] == d[x] - 1) && e[y] >= e[x]) lm[x] = 0;
    end
    for (int x = 0; x < n; x++) gone[x] = 0;
    for (int m = 0; m < n; m++) begin
      if (!lm[m]) continue;
      nl = 0; nr = 0;
      for (int y = 0; y < n; y++) begin
        if (y == m || !lm[y]) continue;
        if (d[m] - d[y] > 0 && d[m] - d[y] < 8) nl = 1;
        if (d[y] - d[m] > 0 && d[y] - d[m] < 8) nr = 1;
      end
      for (int y = 0; y < n; y++) begin
        if (y == m || e[y] >= e[m]) continue;
        w = (d[y] < d[m]) ? (nl ? 2 : 3) : (nr ? 2 : 3);
        if (d[y] != d[m] && (d[y] - d[m] <= w) && (d[m] - d[y] <= w)) gone[y] = 1;
      end
    end
    k = '0;
    for (int y = 0; y < n; y++) begin
      k[y] = !gone[y];
      for (int z = 0; z < n; z++)
        if (z != y && !gone[z] && !gone[y] && d[z] - d[y] <= 2 && d[y] - d[z] <= 2 && e[z] > e[y]) k[y] = 0;
    end
    return k;
  endfunction

  task automatic run(input int n, input int d [N], input int e [N], input string name);
    logic [N-1:0] exp;
    int edges;
    for (int i = 0; i < N; i++) begin
      delay[i]  = DELAY_W'(i < n ? d[i] : 0);
      energy[i] = ENERGY_W'(i < n ? e[i] : 0);
    end
    count = 6'(n);
    exp = model(n, d, e);
    @(negedge clk) start = 1;
    @(posedge clk);
    @(negedge clk) start = 0;
    edges = 1;
    while (!done && edges < 20) begin
      @(posedge clk); #1;
      edges++;
    end
    chk(edges == 5, $sformatf("%s: done after %0d edges", name, edges));
    chk(keep == exp, $sformatf("%s: keep %h expected %h", name, keep, exp));
  endtask

  initial begin
    int d [N], e [N];
    int ex_e [13] = '{3, 5, 7, 12, 7, 5, 6, 9, 8, 11, 6, 4, 3};
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // directed: the example profile
    foreach (d[i]) begin d[i] = 0; e[i] = 0; end
    for (int i = 0; i < 13; i++) begin d[i] = 100 + i; e[i] = ex_e[i]; end
    run(13, d, e, "example");
    chk(keep[12:0] == 13'b0_0010_0000_1000, $sformatf("example keeps offsets 3 and 9 only: %b", keep[12:0]));
    // random
    for (int t = 0; t < 400; t++) begin
      int n, span, used [int];
      n = int'($urandom % 37);
      span = n + int'($urandom % 40) + 1;
      used.delete();
      for (int i = 0; i < N; i++) begin
        int v;
        if (i < n) begin
          do v = int'($urandom % span) - 200; while (used.exists(v));
          used[v] = 1;
          d[i] = v;
          e[i] = int'($urandom % 64);
        end else begin
          d[i] = 0; e[i] = 0;
        end
      end
      run(n, d, e, $sformatf("random %0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
