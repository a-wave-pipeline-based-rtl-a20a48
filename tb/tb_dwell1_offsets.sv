// Testbench for dwell1_offsets, the first-dwell offset interleaving.
//
// Exhaustive over window, slot, pilot symbol and test (1536 settings):
//  - within one window the 768 delays are all different and are exactly
//    the set +-4*chip + phase for chips 1..96 and phases 0..3;
//  - the second window repeats the first one's delays one slot later;
//  - the 2nd pilot symbol of the 1st slot tests chips 2..90 and -90..-2;
//  - code_start is the symbol start (the next symbol for negative
//    offsets) in slot win+slot, the 512-chip correlation never passes the
//    8th-9th symbol boundary of its slot, and samp_start = 4*code_start +
//    delay. Combinational, 1 ns settle per setting.
module tb_dwell1_offsets;
  import mps_pkg::*;

  logic       win = 0;
  logic [1:0] slot = 0;
  logic [2:0] sym = 0;
  logic [4:0] test = 0;
  logic signed [DELAY_W-1:0] delay;
  logic [13:0] code_start;
  logic [15:0] samp_start;
  int checks = 0, failures = 0;

  dwell1_offsets dut (.win, .slot, .sym, .test, .delay, .code_start, .samp_start);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  int seen [int];
  int dly0 [int];

  initial begin
    for (int w = 0; w < 2; w++) begin
      seen.delete();
      for (int s = 0; s < 4; s++)
        for (int p = 0; p < 8; p++)
          for (int t = 0; t < 24; t++) begin
            int key, sym_start, mx, lo, hi;
            win = 1'(w); slot = 2'(s); sym = 3'(p); test = 5'(t);
            #1;
            key = int'(delay);
            chk(!seen.exists(key), $sformatf("delay %0d twice in window %0d", key, w));
            seen[key] = 1;
            chk(((key % 4) + 4) % 4 == s, $sformatf("phase of delay %0d in slot %0d", key, s));
            lo = (key - s);
            chk(lo != 0 && lo >= -384 && lo <= 384, $sformatf("chip range of delay %0d", key));
            sym_start = (w + s) * 2560 + 256 * (p + (key < 0 ? 1 : 0));
            chk(int'(code_start) == sym_start, $sformatf("code start %0d expected %0d", code_start, sym_start));
            chk(int'(code_start) + 512 <= (w + s) * 2560 + 2560, "correlation stays in its slot");
            chk(int'(samp_start) == 4 * int'(code_start) + key, "sample start");
            if (w == 0) dly0[(s * 8 + p) * 24 + t] = key;
            else chk(dly0[(s * 8 + p) * 24 + t] == key, "second window repeats the first");
            if (w == 0 && s == 0 && p == 1) begin
              mx = key / 4;
              chk((t < 12) ? (mx == 2 + 8 * t) : (mx == -(2 + 8 * (23 - t))),
                  $sformatf("2nd symbol test %0d: %0d chips", t, mx));
            end
          end
      chk(seen.num() == 768, $sformatf("%0d offsets in window %0d", seen.num(), w));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
