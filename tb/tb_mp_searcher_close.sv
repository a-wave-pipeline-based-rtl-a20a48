// Workload testbench of mp_searcher at full size: closely spaced paths.
//
// Channel: four paths one chip (4 samples) apart, at 40, 44, 48 and 52
// samples, with relative powers of about 0, -3, -6 and -9 dB (amplitudes
// 24, 17, 12 and 8) and a quarter-turn phase step from one path to the
// next, plus uniform noise. This is the delay profile of the fading test
// channel the searcher was specified for (paths at 0, 1, 2 and 3 chips),
// moved 10 chips into the search window. Gains are held fixed: fading
// itself is not modelled. Between chip centres the waveform is
// interpolated linearly, so each path gives a triangular correlation peak
// whose side lobes overlap those of its neighbours; this is the case the
// verification rules exist for.
// Clocks as in the main end-to-end test: control clock 8 ns, CMAC clock
// 10 ns and its copy 2 ns later. The first period is fed at one sample per
// 3 clocks, the next two at one sample per 24 clocks. The SNR is unknown.
// Expected: after the third period is complete, the list of the first
// period's candidates (tested again on the second period) comes out. It
// must hold each of the four paths exactly once, within 1 sample, and
// nothing else; the verification stage must have deleted side-lobe
// detections, and no period may be dropped.
module tb_mp_searcher_close;
  import mps_pkg::*;

  localparam int FRAME = 38400;
  localparam int NP = 4;
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

  int p_delay [NP] = '{40, 44, 48, 52};
  int p_gain  [NP] = '{24, 17, 12, 8};
  int p_rot   [NP] = '{0, 1, 2, 3};

  bit code_i [FRAME], code_q [FRAME];

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #45000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // ------------------------------------------------------------ path list
  int list_no = 0, ver_deleted = 0, detected = 0;
  int got [$];

  always @(posedge clk) if (rst_n) begin
    if (dut.vl_done && list_no == 0) begin
      detected = int'(dut.dd_cnt);
      for (int i = 0; i < int'(dut.dd_cnt); i++) if (!dut.vl_keep[i]) ver_deleted++;
    end
    if (path_valid) begin
      got.push_back(int'(path_delay));
      $display("  list %0d: path at %0d samples, energy %0d", list_no, path_delay, path_energy);
    end
    if (paths_done) begin
      if (list_no == 0) begin
        for (int p = 0; p < NP; p++) begin
          int n;
          n = 0;
          foreach (got[i]) if (got[i] >= p_delay[p] - 1 && got[i] <= p_delay[p] + 1) n++;
          chk(n == 1, $sformatf("path at %0d reported %0d times", p_delay[p], n));
        end
        chk(got.size() == NP, $sformatf("%0d paths reported, expected %0d", got.size(), NP));
      end
      got.delete();
      list_no++;
    end
  end

  // ------------------------------------------------------------ stimulus
  function automatic int chip_val(input bit b);
    return b ? -1 : 1;
  endfunction

  task automatic send_sample(input longint m);
    int si, sq;
    si = int'($urandom % 25) - 12;
    sq = int'($urandom % 25) - 12;
    for (int p = 0; p < NP; p++) begin
      longint k, k1;
      int ci, cq, ri, rq, f;
      k  = (m - p_delay[p]) >>> 2;
      f  = int'((m - p_delay[p]) & 3);
      k  = ((k % FRAME) + FRAME) % FRAME;
      k1 = (k + 1) % FRAME;
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

    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int per = 0; per < 3; per++) begin
      for (int n = 0; n < PERIOD; n++) begin
        send_sample(longint'(per) * PERIOD + n);
        repeat ((per == 0) ? 2 : 23) @(negedge clk);
      end
      $display("period %0d sent at %0t", per, $time);
    end
    while (list_no < 1) @(negedge clk);

    $display("second-dwell detections %0d, deleted by verification %0d", detected, ver_deleted);
    chk(ver_deleted > 0, "verification deleted side-lobe detections");
    chk(!overrun, "no overrun");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
