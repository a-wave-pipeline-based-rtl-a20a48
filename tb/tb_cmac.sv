// Testbench for cmac, the wave-pipelined complex multiplier-accumulator.
//
// Clocks: CLK with a 10 ns period and the late clock 2 ns after it. Each
// cycle a random operand set A..H (8-bit sign-magnitude) is applied with
// random in_valid, RESET and SAMPLE. A reference model accumulates
// A*B + C*D (real) and E*F + G*H (imaginary) in 22-bit wrap-around
// arithmetic, restarting on RESET and queueing the sum on SAMPLE. Every
// result must match in value and order, and must come out exactly WAVES
// clock edges after the edge that took in its last operand set.
// A second phase uses full-scale operands over long accumulations to
// exercise the sign extension.
module tb_cmac;
  import mps_pkg::*;

  localparam int WAVES = 4;

  logic clk = 0, clk_late = 0, rst_n = 0;
  logic in_valid = 0, reset = 0, sample = 0;
  logic [7:0] a = 0, b = 0, c = 0, d = 0, e = 0, f = 0, g = 0, h = 0;
  logic out_valid;
  logic signed [ACC_W-1:0] re, im;
  int checks = 0, failures = 0;

  cmac #(.WAVES(WAVES)) dut (.clk, .clk_late, .rst_n, .in_valid, .a, .b, .c, .d, .e, .f, .g, .h,
                             .reset, .sample, .out_valid, .re, .im);

  always #5 clk = ~clk;
  always @(clk) clk_late <= #2 clk;

  function automatic int smval(input logic [7:0] v);
    return v[7] ? -int'(v[6:0]) : int'(v[6:0]);
  endfunction

  logic signed [ACC_W-1:0] acc_re = 0, acc_im = 0;
  logic signed [ACC_W-1:0] q_re [$], q_im [$];
  int q_cyc [$];
  int cyc = 0;
  int results = 0;

  initial begin
    #200000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // reference model at the edge that takes in an operand set; output check
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && in_valid) begin
      logic signed [ACC_W-1:0] pr, pi;
      pr = ACC_W'(smval(a) * smval(b) + smval(c) * smval(d));
      pi = ACC_W'(smval(e) * smval(f) + smval(g) * smval(h));
      if (reset) begin acc_re = pr; acc_im = pi; end
      else begin acc_re = acc_re + pr; acc_im = acc_im + pi; end
      if (sample) begin
        q_re.push_back(acc_re); q_im.push_back(acc_im); q_cyc.push_back(cyc);
      end
    end
  end

  always @(posedge clk) begin
    #1;
    if (out_valid) begin
      results++;
      checks += 2;
      if (q_re.size() == 0) begin
        failures++;
        $display("FAIL unexpected result");
      end else begin
        int c0;
        logic signed [ACC_W-1:0] er, ei;
        er = q_re.pop_front(); ei = q_im.pop_front(); c0 = q_cyc.pop_front();
        if (re !== er || im !== ei) begin
          failures++;
          $display("FAIL result %0d: (%0d, %0d) expected (%0d, %0d)", results, re, im, er, ei);
        end
        if (cyc - 1 - c0 != WAVES) begin
          failures++;
          $display("FAIL latency %0d edges, expected %0d", cyc - 1 - c0, WAVES);
        end
      end
    end
  end

  task automatic drive(input logic v, input logic rs, input logic sm, input logic big);
    @(posedge clk);
    #1;
    in_valid = v; reset = rs; sample = sm;
    if (big) begin
      {a, b, c, d, e, f, g, h} = {8{($urandom % 2) ? 8'hFF : 8'h7F}};
      c = 8'h7F; d = 8'h7F;
    end else begin
      {a, b, c, d} = $urandom; {e, f, g, h} = $urandom;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    drive(1, 1, 0, 0);
    for (int n = 0; n < 3000; n++)
      drive($urandom % 4 != 0, $urandom % 5 == 0, $urandom % 5 == 0, 0);
    // long accumulations at full scale: sums up to 63 * 2 * 16129
    for (int blk = 0; blk < 4; blk++)
      for (int n = 0; n < 63; n++)
        drive(1, n == 0, n == 62, 1);
    drive(0, 0, 0, 0);
    repeat (WAVES + 3) @(posedge clk);
    checks++;
    if (q_re.size() != 0) begin
      failures++;
      $display("FAIL %0d results never came out", q_re.size());
    end
    checks++;
    if (results < 300) begin
      failures++;
      $display("FAIL only %0d results", results);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
