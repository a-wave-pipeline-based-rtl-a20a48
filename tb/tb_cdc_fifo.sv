// Testbench for cdc_fifo, the two-clock FIFO.
//
// Write clock 10 ns, read clock 7 ns (unrelated ratio). Phase 1 fills the
// FIFO without reading: full and afull must come up, and exactly DEPTH
// words must be accepted. Phase 2 writes and reads at random while the
// writer honours afull; every word must come out once, in order, and
// full must never be hit. Words cross in at most 4 read-clock cycles
// after empty would allow (two-flop pointer synchroniser).
module tb_cdc_fifo;
  localparam int W = 8, DEPTH = 16, MARGIN = 2;

  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic we = 0, re = 0;
  logic [W-1:0] wdata = 0, rdata;
  logic full, afull, empty;
  int checks = 0, failures = 0;

  cdc_fifo #(.W(W), .DEPTH(DEPTH), .AFULL_MARGIN(MARGIN)) dut (
    .wclk, .wrst_n, .we, .wdata, .full, .afull, .rclk, .rrst_n, .re, .rdata, .empty);

  always #5 wclk = ~wclk;
  always #3.5 rclk = ~rclk;

  logic [W-1:0] model [$];
  int written = 0, got = 0;
  bit reading = 0, phase2 = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #2000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // writer
  always @(posedge wclk) begin
    if (we && !full) begin
      model.push_back(wdata);
      written++;
    end
    if (phase2) chk(!(we && full), "write while full in flow-controlled phase");
  end

  // reader
  always @(posedge rclk) begin
    if (re && !empty) begin
      chk(model.size() > 0, "read with no word written");
      if (model.size() > 0) chk(rdata == model.pop_front(), $sformatf("data order at word %0d", got));
      got++;
    end
  end
  always @(negedge rclk) re <= reading && ($urandom % 3 != 0);

  initial begin
    repeat (3) @(posedge wclk);
    wrst_n = 1; rrst_n = 1;
    @(posedge rclk);
    chk(empty, "empty after reset");
    // phase 1: fill
    repeat (DEPTH + 4) begin
      @(negedge wclk);
      we = 1; wdata = W'($urandom);
    end
    @(negedge wclk) we = 0;
    chk(full, "full after DEPTH writes");
    chk(afull, "afull when full");
    chk(written == DEPTH, $sformatf("accepted %0d words", written));
    // drain
    reading = 1;
    wait (model.size() == 0);
    repeat (4) @(posedge rclk);
    #1 chk(empty, "empty after draining");
    repeat (4) @(posedge wclk);
    #1 chk(!afull && !full, "afull and full cleared after draining");
    // phase 2: random traffic with afull flow control
    phase2 = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge wclk);
      we = !afull && ($urandom % 4 != 0);
      wdata = W'($urandom);
    end
    @(negedge wclk) we = 0;
    wait (model.size() == 0);
    repeat (6) @(posedge rclk);
    chk(empty, "empty at end");
    chk(got == written, $sformatf("read %0d of %0d", got, written));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
