// Testbench for wp_multiplier, the 8x8 sign-magnitude multiplier.
//
// Exhaustive: all 65536 pairs of 8-bit sign-magnitude operands (including
// both zeros) are applied and the 16-bit two's complement product is
// compared with the product of the decoded operand values. The multiplier
// is combinational; each check follows a 1 ns settle delay.
module tb_wp_multiplier;
  logic [7:0]  x, y;
  logic [15:0] p;
  int checks = 0, failures = 0;

  wp_multiplier dut (.x, .y, .p);

  function automatic int smval(input logic [7:0] v);
    return v[7] ? -int'(v[6:0]) : int'(v[6:0]);
  endfunction

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    x = '0; y = '0;
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        x = 8'(i); y = 8'(j);
        #1;
        checks++;
        if (p !== 16'(smval(x) * smval(y))) begin
          failures++;
          if (failures < 10) $display("FAIL %h x %h -> %h, expected %h", x, y, p, 16'(smval(x) * smval(y)));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
