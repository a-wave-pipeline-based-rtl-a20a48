// Complex multiplier-accumulator (CMAC), the single arithmetic engine of
// the searcher.
//
// Four wp_multiplier instances take the eight 8-bit sign-magnitude inputs
// A..H. A first row of two 16-bit ripple-carry adders forms
//   re_p = A*B + C*D      im_p = E*F + G*H
// and both sums are sign-extended by six bits to 22 bits before the
// accumulators, which is enough to accumulate 1024-chip correlations
// without wrap-around. Each accumulator is a 22-bit ripple-carry adder
// whose output goes through a row of accum_latch bits and back into the
// adder. RESET, travelling with its data, forces the fed-back value to zero
// so the accumulation restarts with that input; SAMPLE, also travelling with
// its data, copies the adder output (the accumulation ending with that input)
// into the output register. RESET and SAMPLE together give an accumulation
// of length 1, as the energy mode uses.
//
// Wave pipelining: in silicon the multipliers and adders form one
// combinational block that holds WAVES operand sets at once (4 in the
// NPCPL version), with the clock and SAMPLE delayed to stay in phase with
// the data. Here that latency is a delay line of WAVES-1 register stages
// after the input register, carrying data and controls alike, so the RTL
// is clock-for-clock equivalent to the wave pipeline. The accumulation
// latches use three clock phases: clk, ~clk (made here by an inverter) and
// clk_late, the clock delayed by a buffer. clk_late must rise after clk,
// once the accumulator adder has settled, and before clk falls; it is a
// port because its delay is a physical quantity.
//
// Interface: one operand set per clock when in_valid is 1; inputs with
// in_valid 0 add nothing. out_valid pulses with re/im when a SAMPLE input
// reaches the accumulator.
// Timing: inputs present at clock edge k produce their sampled result on
// re/im with out_valid 1 after edge k+WAVES.
// Widths, adder structure, sign extension, latch cell and the RESET/SAMPLE
// roles are the published design; the valid qualifier is this design's.
module cmac
  import mps_pkg::*;
#(
  parameter int unsigned ACC_BITS = ACC_W,  // accumulator width
  parameter int unsigned WAVES    = 4       // operand sets in flight
) (
  input  logic                 clk,
  input  logic                 clk_late, // clk delayed, rises before clk falls
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [IN_W-1:0]      a, b, c, d, e, f, g, h,
  input  logic                 reset,    // start a new accumulation with this input
  input  logic                 sample,   // output the accumulation ending with this input
  output logic                 out_valid,
  output logic signed [ACC_BITS-1:0] re,
  output logic signed [ACC_BITS-1:0] im
);

  // ---------------------------------------------------------------- input register
  logic [IN_W-1:0] ra, rb, rc, rd, re_i, rf, rg, rh;
  logic            r_valid, r_reset, r_sample;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {ra, rb, rc, rd, re_i, rf, rg, rh} <= '0;
      {r_valid, r_reset, r_sample} <= '0;
    end else begin
      {ra, rb, rc, rd, re_i, rf, rg, rh} <= {a, b, c, d, e, f, g, h};
      {r_valid, r_reset, r_sample} <= {in_valid, reset, sample};
    end
  end

  // ---------------------------------------------------------------- wave-pipelined logic
  logic [PROD_W-1:0] p_ab, p_cd, p_ef, p_gh;
  logic [PROD_W-1:0] s_re, s_im;
  logic              co_re, co_im;

  wp_multiplier #(.W(IN_W)) u_m1 (.x(ra),   .y(rb), .p(p_ab));
  wp_multiplier #(.W(IN_W)) u_m2 (.x(rc),   .y(rd), .p(p_cd));
  wp_multiplier #(.W(IN_W)) u_m3 (.x(re_i), .y(rf), .p(p_ef));
  wp_multiplier #(.W(IN_W)) u_m4 (.x(rg),   .y(rh), .p(p_gh));

  pl_rca #(.W(PROD_W)) u_add_re (.a(p_ab), .b(p_cd), .ci(1'b0), .s(s_re), .co(co_re));
  pl_rca #(.W(PROD_W)) u_add_im (.a(p_ef), .b(p_gh), .ci(1'b0), .s(s_im), .co(co_im));

  typedef struct packed {
    logic                valid;
    logic                reset;
    logic                sample;
    logic [ACC_BITS-1:0] re;
    logic [ACC_BITS-1:0] im;
  } wave_t;

  wave_t w0;
  assign w0.valid  = r_valid;
  assign w0.reset  = r_reset;
  assign w0.sample = r_sample;
  // Second sign extension; an idle slot contributes zero.
  assign w0.re = r_valid ? ACC_BITS'(signed'(s_re)) : '0;
  assign w0.im = r_valid ? ACC_BITS'(signed'(s_im)) : '0;

  // Latency of the waves in flight beyond the first.
  wave_t wq [WAVES];
  assign wq[0] = w0;
  for (genvar k = 1; k < WAVES; k++) begin : g_wave
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) wq[k] <= '0;
      else        wq[k] <= wq[k-1];
    end
  end

  wave_t wa;
  assign wa = wq[WAVES-1];

  // ---------------------------------------------------------------- accumulators
  logic                clk_n;
  logic [ACC_BITS-1:0] fb_re, fb_im, acc_re, acc_im;
  logic                aco_re, aco_im;
  logic                clr_n;

  assign clk_n = ~clk;
  assign clr_n = ~(wa.reset & wa.valid);

  pl_rca #(.W(ACC_BITS)) u_acc_re (.a(wa.re), .b(fb_re), .ci(1'b0), .s(acc_re), .co(aco_re));
  pl_rca #(.W(ACC_BITS)) u_acc_im (.a(wa.im), .b(fb_im), .ci(1'b0), .s(acc_im), .co(aco_im));

  for (genvar i = 0; i < ACC_BITS; i++) begin : g_latch
    accum_latch u_lr (.clk(clk), .clk_late(clk_late), .clk_n(clk_n), .reset_n(clr_n),
                      .data_in(acc_re[i]), .data_out(fb_re[i]));
    accum_latch u_li (.clk(clk), .clk_late(clk_late), .clk_n(clk_n), .reset_n(clr_n),
                      .data_in(acc_im[i]), .data_out(fb_im[i]));
  end

  // ---------------------------------------------------------------- output register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      re        <= '0;
      im        <= '0;
    end else begin
      out_valid <= wa.valid & wa.sample;
      if (wa.valid & wa.sample) begin
        re <= acc_re;
        im <= acc_im;
      end
    end
  end

endmodule
