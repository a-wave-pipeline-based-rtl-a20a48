// End-to-end testbench of mp_searcher at full size (no parameter changes).
//
// Channel: 9 paths at fixed delays (in samples, 4 per chip) with gains and
// a quarter-turn phase each, plus uniform noise. Between chip centres the
// waveform is interpolated linearly (a band-limited chip shape), so the
// correlation peak of a path is a triangle with its top at the path delay. The
// transmitted code is the same Gold code as the searcher's local one
// (rebuilt here from its recurrences), so a path at delay d must be
// reported at d. One path is present only in the first search period
// (a path that dies) and one appears from the second period on (a path
// that is born).
// Clocks: control clock 8 ns, CMAC clock 10 ns (and its copy 2 ns later),
// so the CMAC is the bottleneck and the operand FIFOs fill up. The first
// period is fed at one sample per 3 clocks, the next ones at one sample per
// 24 clocks, a rate at which each period is processed before the next is
// complete. The SNR input is unknown for the first two periods and 6 dB
// afterwards.
// Expected: after the third period is complete the verified paths of the
// first period's candidates (tested again on the second period) come out,
// after the fourth those of the second period. Both lists must contain
// every live path within 1 sample and nothing else.
// Checked counts: CMAC words per period (first dwell 1536 correlations of
// 512 chips and 384 x 2 energy words; second dwell psi x 5 x 1024 plus
// 5 x ceil(psi/2) energy words, 184,410 for 36 candidates), no overrun,
// and that every mechanism happened at least once: bank swap, both CMAC
// modes, FIFO back-pressure, both TH1 rules, candidate-list overflow,
// second-dwell pass and rejection, verification deletion, path output.
module tb_mp_searcher;
  import mps_pkg::*;

  localparam int FRAME = 38400;
  localparam int NP = 9;
  localparam int PERIOD = PERIOD_SLOTS * SLOT_CHIPS * CHI;

  logic clk = 0, clk_cmac = 0, clk_cmac_late = 0, rst_n = 0;
  logic in_valid = 0;
  logic signed [7:0] in_i = 0, in_q = 0;
  logic signed [6:0] snr_db = 0;
  logic snr_known = 0;
  logic [4:0] energy_shift = 5'd8;
  logic path_valid, paths_done, busy, overrun;
  logic signed [DELAY_W-1:0] path_delay;
  logic [ENERGY_W-1:0] path_energy;
  int checks = 0, failures = 0;

  mp_searcher dut (.clk, .clk_cmac, .clk_cmac_late, .rst_n, .in_valid, .in_i, .in_q,
                   .snr_db, .snr_known, .energy_shift,
                   .path_valid, .path_delay, .path_energy, .paths_done, .busy, .overrun);

  always #4 clk = ~clk;
  always #5 clk_cmac = ~clk_cmac;
  always @(clk_cmac) clk_cmac_late <= #2 clk_cmac;

  // channel
  int p_delay [NP] = '{41, -97, 150, -250, 300, 222, -30, 100, -180};
  int p_gain  [NP] = '{22, 16, 12, 10, 9, 10, 9, 9, 8};
  int p_rot   [NP] = '{0, 1, 2, 3, 0, 1, 2, 3, 1};
  int p_first [NP] = '{0, 0, 0, 0, 0, 1, 0, 0, 0};   // first period the path exists
  int p_last  [NP] = '{9, 9, 9, 9, 0, 9, 9, 9, 9};   // last period the path exists

  bit code_i [FRAME], code_q [FRAME];

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #60000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // ------------------------------------------------------------ mechanism counters
  int swaps = 0, words_m1 = 0, words_m2 = 0, backpressure = 0, th_15 = 0, th_175 = 0;
  int overflows = 0, d2_pass = 0, d2_reject = 0, ver_deleted = 0, paths_out = 0;
  int per_m1 [8], per_m2 [8], per_psi [8], period_no = -1;

  always @(posedge clk) if (rst_n) begin
    if (dut.buf_swap) begin
      swaps++;
      period_no++;
      if (period_no < 8) begin per_m1[period_no] = 0; per_m2[period_no] = 0; per_psi[period_no] = int'(dut.c2_cnt); end
    end
    if (dut.f_afull[0] && dut.is_active) backpressure++;
    if (dut.th_done) begin
      if (dut.th1 == dut.noise_floor + (dut.noise_floor >> 1)) th_15++;
      else if (dut.th1 == dut.noise_floor + (dut.noise_floor >> 1) + (dut.noise_floor >> 2)) th_175++;
      else chk(0, $sformatf("TH1 %0d is no published multiple of NF %0d", dut.th1, dut.noise_floor));
    end
    if (dut.th_clear && dut.state != dut.S_IDLE) begin
      // first-dwell start: the second dwell of this period is complete
      d2_pass += int'(dut.dd_cnt);
      d2_reject += int'(dut.c2_cnt) - int'(dut.dd_cnt);
    end
    if (dut.cl_valid && dut.cl_count == 6'd36) overflows++;
    if (dut.vl_done)
      for (int i = 0; i < int'(dut.dd_cnt); i++) if (!dut.vl_keep[i]) ver_deleted++;
  end

  always @(posedge clk_cmac) if (rst_n) begin
    if (dut.c_re && period_no >= 0 && period_no < 8) begin
      if (dut.c_mode == MODE_CORR) begin words_m1++; per_m1[period_no]++; end
      else begin words_m2++; per_m2[period_no]++; end
    end
  end

  // ------------------------------------------------------------ path lists
  int list_no = 0;
  int got [$];

  function automatic bit alive(input int p, input int per);
    return per >= p_first[p] && per <= p_last[p];
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (path_valid) begin
      got.push_back(int'(path_delay));
      paths_out++;
      $display("  list %0d: path at %0d samples, energy %0d", list_no, path_delay, path_energy);
    end
    if (paths_done) begin
      // list k: candidates of period k, second dwell on period k+1
      for (int p = 0; p < NP; p++) begin
        bit found;
        found = 0;
        foreach (got[i]) if (got[i] >= p_delay[p] - 1 && got[i] <= p_delay[p] + 1) found = 1;
        if (alive(p, list_no) && alive(p, list_no + 1))
          chk(found, $sformatf("list %0d: path at %0d missing", list_no, p_delay[p]));
        else
          chk(!found, $sformatf("list %0d: path at %0d reported but absent", list_no, p_delay[p]));
      end
      foreach (got[i]) begin
        bit ok;
        ok = 0;
        for (int p = 0; p < NP; p++) if (got[i] >= p_delay[p] - 1 && got[i] <= p_delay[p] + 1) ok = 1;
        chk(ok, $sformatf("list %0d: false path at %0d", list_no, got[i]));
      end
      got.delete();
      list_no++;
    end
  end

  // ------------------------------------------------------------ stimulus
  function automatic int chip_val(input bit b);
    return b ? -1 : 1;
  endfunction

  task automatic send_sample(input longint m, input int per);
    int si, sq;
    si = int'($urandom % 25) - 12;
    sq = int'($urandom % 25) - 12;
    for (int p = 0; p < NP; p++) begin
      longint k, k1;
      int ci, cq, ri, rq, f;
      if (!alive(p, per)) continue;
      k  = (m - p_delay[p]) >>> 2;
      f  = int'((m - p_delay[p]) & 3);
      k  = ((k % FRAME) + FRAME) % FRAME;
      k1 = (k + 1) % FRAME;
      // linear interpolation between chip k and chip k+1, in quarters
      ci = ((4 - f) * chip_val(code_i[k]) + f * chip_val(code_i[k1])) * p_gain[p] / 4;
      cq = ((4 - f) * chip_val(code_q[k]) + f * chip_val(code_q[k1])) * p_gain[p] / 4;
      case (p_rot[p])
        0: begin ri = ci;  rq = cq;  end
        1: begin ri = -cq; rq = ci;  end
        2: begin ri = -ci; rq = -cq; end
        default: begin ri = cq; rq = -ci; end
      endcase
      si += ri; sq += rq;
    end
    in_valid = 1; in_i = 8'(si); in_q = 8'(sq);
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    bit xs [FRAME + 18], ys [FRAME + 18];
    for (int i = 0; i < 18; i++) begin xs[i] = (i == 0); ys[i] = 1; end
    for (int i = 0; i < FRAME; i++) begin
      xs[i+18] = xs[i+7] ^ xs[i];
      ys[i+18] = ys[i+10] ^ ys[i+7] ^ ys[i+5] ^ ys[i];
    end
    for (int i = 0; i < FRAME; i++) begin
      code_i[i] = xs[i] ^ ys[i];
      code_q[i] = xs[i+4] ^ xs[i+6] ^ xs[i+15] ^ ys[i+5] ^ ys[i+6];
      for (int k = 8; k <= 15; k++) code_q[i] ^= ys[i+k];
    end
    foreach (per_m1[i]) begin per_m1[i] = 0; per_m2[i] = 0; per_psi[i] = 0; end

    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int per = 0; per < 4; per++) begin
      if (per >= 2) begin snr_known = 1; snr_db = 7'sd6; end
      for (int n = 0; n < PERIOD; n++) begin
        send_sample(longint'(per) * PERIOD + n, per);
        repeat ((per == 0) ? 2 : 23) @(negedge clk);
      end
      $display("period %0d sent at %0t", per, $time);
    end
    // the second list comes out at the start of the fourth period's processing
    while (list_no < 2) @(negedge clk);

    // ---- per-period CMAC word counts (periods 0..2 are complete)
    for (int per = 0; per < 3; per++) begin
      int psi, e1, e2;
      psi = per_psi[per];
      e1 = 1536 * 512 + psi * 5 * 1024;
      e2 = 768 + 5 * ((psi + 1) / 2);
      $display("period %0d: psi %0d, mode-1 words %0d, mode-2 words %0d", per, psi, per_m1[per], per_m2[per]);
      chk(per_m1[per] == e1, $sformatf("period %0d: %0d mode-1 words, expected %0d", per, per_m1[per], e1));
      chk(per_m2[per] == e2, $sformatf("period %0d: %0d mode-2 words, expected %0d", per, per_m2[per], e2));
      if (psi == 36)
        chk(psi * 5 * 1024 + 5 * ((psi + 1) / 2) == 184410, "second dwell of 36 candidates takes 184,410 CMAC cycles");
    end
    chk(!overrun, "no overrun");
    $display("swaps %0d m1 %0d m2 %0d backpressure %0d th1.5 %0d th1.75 %0d overflow %0d d2pass %0d d2reject %0d verdel %0d paths %0d",
             swaps, words_m1, words_m2, backpressure, th_15, th_175, overflows, d2_pass, d2_reject, ver_deleted, paths_out);
    chk(swaps >= 4, "bank swap");
    chk(words_m1 > 0, "CMAC mode 1 (correlation)");
    chk(words_m2 > 0, "CMAC mode 2 (energy)");
    chk(backpressure > 0, "operand FIFO back-pressure");
    chk(th_15 > 0, "TH1 = 1.5 NF (SNR up to 4 dB or unknown)");
    chk(th_175 > 0, "TH1 = 1.75 NF (SNR above 4 dB)");
    chk(overflows > 0, "candidate list overflow");
    chk(d2_pass > 0, "second dwell pass");
    chk(d2_reject > 0, "second dwell rejection");
    chk(ver_deleted > 0, "verification deletion");
    chk(paths_out > 0, "path output");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
