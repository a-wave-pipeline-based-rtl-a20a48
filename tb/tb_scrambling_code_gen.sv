// Testbench for scrambling_code_gen.
//
// A reference keeps the x and y sequences as bit lists and extends them
// with the recurrences x(i+18) = x(i+7) + x(i) and
// y(i+18) = y(i+10) + y(i+7) + y(i+5) + y(i) (mod 2), starting from the
// same initial states. For two full frames plus a restart the I and Q chips
// of the generator must match the reference chip by chip:
// I = x(i) + y(i), Q = x(i+4) + x(i+6) + x(i+15) + y(i+5) + y(i+6) +
// y(i+8) + ... + y(i+15). The chip count per frame (38400) is checked by
// the return to chip 0. Then en is held low for a while: the chip must not
// move. One chip per clock with en high.
module tb_scrambling_code_gen;
  localparam int FRAME = 38400;

  logic clk = 0, rst_n = 0, restart = 0, en = 0;
  logic ci, cq;
  int checks = 0, failures = 0;

  scrambling_code_gen dut (.clk, .rst_n, .restart, .en, .ci, .cq);

  always #5 clk = ~clk;

  bit xs [FRAME + 18];
  bit ys [FRAME + 18];

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic bit ref_i(input int i);
    return xs[i] ^ ys[i];
  endfunction
  function automatic bit ref_q(input int i);
    bit q;
    q = xs[i+4] ^ xs[i+6] ^ xs[i+15] ^ ys[i+5] ^ ys[i+6];
    for (int k = 8; k <= 15; k++) q ^= ys[i+k];
    return q;
  endfunction

  initial begin
    #10000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int i = 0; i < 18; i++) begin
      xs[i] = (i == 0);
      ys[i] = 1;
    end
    for (int i = 0; i < FRAME; i++) begin
      xs[i+18] = xs[i+7] ^ xs[i];
      ys[i+18] = ys[i+10] ^ ys[i+7] ^ ys[i+5] ^ ys[i];
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int f = 0; f < 2; f++)
      for (int i = 0; i < FRAME; i++) begin
        @(negedge clk);
        chk(ci == ref_i(i) && cq == ref_q(i), $sformatf("frame %0d chip %0d: %0b%0b", f, i, ci, cq));
        en = 1;
      end
    // 1000 chips in, then restart
    for (int i = 0; i < 1000; i++) @(negedge clk);
    en = 0; restart = 1;
    @(negedge clk) restart = 0;
    for (int i = 0; i < 200; i++) begin
      chk(ci == ref_i(i) && cq == ref_q(i), $sformatf("after restart chip %0d", i));
      en = 1;
      @(negedge clk);
    end
    // hold
    en = 0;
    @(negedge clk);
    for (int i = 0; i < 50; i++) begin
      chk(ci == ref_i(200) && cq == ref_q(200), "chip held while en is low");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
