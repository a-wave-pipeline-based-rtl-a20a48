// Testbench for accum_latch, one bit of the CMAC accumulation latch.
//
// Clocks: CLK with a 10 ns period, the late clock 2 ns after CLK, and not
// CLK. Random data is applied 1 ns after each rising CLK edge. Expected
// timing: the bit present at the late edge of cycle k is on the output
// from the rising CLK edge that starts cycle k+1 for the whole cycle, and
// the output is 0 whenever RESET is active (reset_n low).
module tb_accum_latch;
  logic clk = 0, clk_late = 0, clk_n;
  logic reset_n = 1, data_in = 0, data_out;
  int checks = 0, failures = 0;

  accum_latch dut (.clk, .clk_late, .clk_n, .reset_n, .data_in, .data_out);

  assign clk_n = ~clk;
  always #5 clk = ~clk;
  always @(clk) clk_late <= #2 clk;

  initial begin
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic prev, have;
    prev = 0; have = 0;
    repeat (2) @(posedge clk);
    for (int n = 0; n < 400; n++) begin
      @(posedge clk);
      #1;
      data_in = 1'($urandom);
      reset_n = ($urandom % 8) != 0;
      #1;
      if (have) begin
        // last cycle's bit, one cycle later, gated by this cycle's reset
        checks++;
        if (data_out !== (prev & reset_n)) begin
          failures++;
          $display("FAIL cycle %0d: out %0b expected %0b", n, data_out, prev & reset_n);
        end
        #6;
        checks++;
        if (data_out !== (prev & reset_n)) begin
          failures++;
          $display("FAIL cycle %0d late: out %0b expected %0b", n, data_out, prev & reset_n);
        end
      end
      prev = data_in;
      have = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
