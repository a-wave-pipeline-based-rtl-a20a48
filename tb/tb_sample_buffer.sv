// Testbench for sample_buffer, the two-bank period store.
//
// Full size (51200 samples, 12800 code chips per bank). Round r writes a
// pattern that depends on r and the address into the write bank; s_full
// and c_full must rise after exactly one period and extra writes must be
// ignored. After swap the round is read back from the other bank (data one
// clock after the address) while round r+1 is being written, so the test
// also checks that writing never disturbs the bank being read. Three
// rounds cover both banks and a return to the first.
module tb_sample_buffer;
  localparam int SAMPLES = 51200, CHIPS = 12800;

  logic clk = 0, rst_n = 0;
  logic s_we = 0, c_we = 0, swap = 0;
  logic [15:0] s_wdata = 0, s_rdata;
  logic [1:0]  c_wdata = 0, c_rdata;
  logic s_full, c_full, rd_bank;
  logic [15:0] s_raddr = 0;
  logic [13:0] c_raddr = 0;
  int checks = 0, failures = 0;

  sample_buffer dut (.clk, .rst_n, .s_we, .s_wdata, .c_we, .c_wdata, .swap, .s_full, .c_full, .rd_bank,
                     .s_raddr, .s_rdata, .c_raddr, .c_rdata);

  always #5 clk = ~clk;

  function automatic logic [15:0] spat(input int r, input int a);
    return 16'(a * 7 + r * 12345) ^ 16'(a >> 3);
  endfunction
  function automatic logic [1:0] cpat(input int r, input int a);
    return 2'((a ^ (a >> 2)) + r);
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #20000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // one period written from round r, with a few extra words past the end
  task automatic write_round(input int r);
    for (int a = 0; a < SAMPLES + 3; a++) begin
      @(negedge clk);
      s_we = 1; s_wdata = (a < SAMPLES) ? spat(r, a) : 16'hDEAD;
      c_we = (a % 4 == 0);
      c_wdata = (a / 4 < CHIPS) ? cpat(r, a / 4) : 2'b11;
      if (a == SAMPLES - 1) begin
        @(posedge clk); #1;
        chk(s_full && c_full, "full after one period");
      end
    end
    @(negedge clk) s_we = 0; c_we = 0;
    // the extra words at the end overwrote nothing: checked on read-back
  endtask

  // read round r back from the read bank; runs alongside write_round
  task automatic read_round(input int r);
    for (int a = 0; a < SAMPLES; a++) begin
      @(negedge clk);
      s_raddr = 16'(a); c_raddr = 14'(a % CHIPS);
      @(posedge clk); #1;
      chk(s_rdata == spat(r, a), $sformatf("round %0d sample %0d: %h", r, a, s_rdata));
      if (a < CHIPS) chk(c_rdata == cpat(r, a), $sformatf("round %0d chip %0d", r, a));
    end
  endtask

  task automatic do_swap(input logic exp_bank);
    @(negedge clk) swap = 1;
    @(negedge clk) swap = 0;
    chk(!s_full && !c_full, "not full after swap");
    chk(rd_bank == exp_bank, "read bank after swap");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    chk(!s_full && !c_full, "empty after reset");
    write_round(0);
    do_swap(1'b0);
    for (int r = 1; r < 3; r++) begin
      fork
        write_round(r);
        read_round(r - 1);
      join
      do_swap(1'(r % 2));
    end
    read_round(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
