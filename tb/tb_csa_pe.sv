// Testbench for csa_pe, the processing element of the carry-save array.
//
// All 16 combinations of multiplier bit X, multiplicand bit Y, partial sum
// A and partial carry B are applied; the outputs must satisfy
// 2*V + U = X*Y + A + B. Combinational, 1 ns settle per check.
module tb_csa_pe;
  logic x, y, a, b, u, v;
  int checks = 0, failures = 0;

  csa_pe dut (.x, .y, .a, .b, .u, .v);

  initial begin
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    {x, y, a, b} = '0;
    for (int k = 0; k < 16; k++) begin
      {x, y, a, b} = 4'(k);
      #1;
      checks++;
      if ({v, u} !== 2'((x & y) + a + b)) begin
        failures++;
        $display("FAIL x=%0b y=%0b a=%0b b=%0b -> v=%0b u=%0b", x, y, a, b, v, u);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
