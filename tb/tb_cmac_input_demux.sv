// Testbench for cmac_input_demux.
//
// For random FIFO words in both modes the eight CMAC inputs must follow
// the routing table: mode 1 (correlation) A..H = FIFO 1,3,5,4,1,4,2,3 and
// mode 2 (energy) A..H = FIFO 1,1,2,2,3,3,4,4. Combinational, 1 ns settle.
module tb_cmac_input_demux;
  import mps_pkg::*;

  cmac_mode_e           mode;
  logic [4:0][IN_W-1:0] fifo;
  logic [IN_W-1:0]      a, b, c, d, e, f, g, h;
  int checks = 0, failures = 0;

  localparam int M1 [8] = '{1, 3, 5, 4, 1, 4, 2, 3};
  localparam int M2 [8] = '{1, 1, 2, 2, 3, 3, 4, 4};

  cmac_input_demux dut (.mode, .fifo, .a, .b, .c, .d, .e, .f, .g, .h);

  initial begin
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic [IN_W-1:0] got [8];
    mode = MODE_CORR; fifo = '0;
    for (int n = 0; n < 200; n++) begin
      mode = (n % 2) ? MODE_ENERGY : MODE_CORR;
      for (int k = 0; k < 5; k++) fifo[k] = 8'($urandom);
      #1;
      got = '{a, b, c, d, e, f, g, h};
      for (int k = 0; k < 8; k++) begin
        checks++;
        if (got[k] !== fifo[(mode == MODE_CORR ? M1[k] : M2[k]) - 1]) begin
          failures++;
          $display("FAIL mode %0d input %0d: %h", mode, k, got[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
