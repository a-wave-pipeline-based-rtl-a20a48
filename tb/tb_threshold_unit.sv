// Testbench for threshold_unit: noise floor and the two thresholds.
//
// Each run feeds 768 random energies (with random gaps) and compares the
// result with the mean of the energies and the published multipliers:
// TH1 = 1.5 NF (SNR <= 4 dB) or 1.75 NF (above); TH2 = 1, 1.5, 1.75 or
// 2.25 NF for SNR below 4, 4-7.99, 8-11.99 and 12 dB and up. An unknown
// SNR counts as 4 dB. Products may be one LSB below the exact value
// (truncated partial terms). done must pulse exactly one clock after the
// edge that took in the 768th energy. clear must discard a partial sum.
module tb_threshold_unit;
  localparam int N = 768, EW = 20;

  logic clk = 0, rst_n = 0, clear = 0, e_valid = 0, snr_known = 0;
  logic [EW-1:0] e = 0, noise_floor, th1, th2;
  logic signed [6:0] snr_db = 0;
  logic done;
  int checks = 0, failures = 0;

  threshold_unit dut (.clk, .rst_n, .clear, .e_valid, .e, .snr_db, .snr_known, .done, .noise_floor, .th1, .th2);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic bit near(input longint got, input longint exact);
    return got <= exact && got + 1 >= exact;
  endfunction

  initial begin
    #10000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int snrs [8] = '{-3, 2, 4, 5, 8, 11, 12, 20};
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // a partial sum, then clear
    for (int k = 0; k < 100; k++) begin
      @(negedge clk) e_valid = 1; e = 20'hFFFFF;
    end
    @(negedge clk) e_valid = 0; clear = 1;
    @(negedge clk) clear = 0;
    for (int run = 0; run < 9; run++) begin
      longint sum, nf, s4;
      int snr, maxe;
      bit known;
      known = (run < 8);
      snr = known ? snrs[run] : 4;
      snr_known = known; snr_db = 7'(known ? snrs[run] : 30);
      maxe = (run % 3 == 0) ? 1000 : (run % 3 == 1) ? 60000 : 1000000;
      sum = 0;
      for (int k = 0; k < N; k++) begin
        @(negedge clk);
        while ($urandom % 4 == 0) begin
          e_valid = 0;
          @(negedge clk);
        end
        e_valid = 1; e = EW'($urandom % maxe);
        sum += e;
        @(posedge clk);
        #1;
        if (k < N - 1) chk(!done, "no done before the last energy");
      end
      @(negedge clk) e_valid = 0;
      // done one edge after the 768th energy was taken
      chk(done, $sformatf("run %0d: done one clock after the last energy", run));
      nf = sum / N;
      chk(noise_floor == EW'(nf), $sformatf("run %0d: NF %0d expected %0d", run, noise_floor, nf));
      s4 = (snr <= 4) ? nf * 6 : nf * 7;
      chk(near(th1, s4 / 4), $sformatf("run %0d snr %0d: TH1 %0d expected %0d", run, snr, th1, s4 / 4));
      s4 = (snr < 4) ? nf * 4 : (snr < 8) ? nf * 6 : (snr < 12) ? nf * 7 : nf * 9;
      chk(near(th2, s4 / 4), $sformatf("run %0d snr %0d: TH2 %0d expected %0d", run, snr, th2, s4 / 4));
      @(posedge clk); #1;
      chk(!done, "done is one pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
