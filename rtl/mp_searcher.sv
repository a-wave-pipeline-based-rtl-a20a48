// WCDMA multipath searcher built around one fast CMAC.
//
// The searcher finds the delays of the multipath components of the
// received signal by correlating it with shifted copies of the pilot
// scrambling code. It works in search periods of 5 slots. The samples
// (4 per chip) and the pilot code chips of one period are stored in a
// two-bank buffer; when a bank is full the banks swap and the stored
// period is processed while the next one is being written. Processing a
// period runs three pipelined stages, each on the results of the previous
// stage from the period before:
//   1. Verification logic on the detected delays D_d of the previous
//      period's second dwell; surviving paths are streamed out.
//   2. Second dwell on the previous period's candidates C_d: each
//      candidate is correlated over 1024 chips in 5 successive slots
//      (interleaved order from dwell2_order, one group per pilot symbol),
//      the 5 energies are summed and the mean compared with TH2.
//   3. First dwell: 768 offsets (+-96 chips, quarter-chip steps), each
//      correlated over 512 chips in two windows one slot apart
//      (dwell1_offsets), energies |R[n]|^2 + |R[n']|^2, noise floor = mean,
//      TH1 from the SNR, offsets above TH1 into the 36-entry candidate list.
// All arithmetic runs on a single cmac. Mode 1 computes a correlation
// (conj(code) x samples, accumulated over the correlation length), mode 2
// two energies per clock, accumulated over 2 inputs (first dwell: both
// windows) or 5 inputs (second dwell: the five verifications). Operands
// reach the CMAC through five clock-domain-crossing FIFOs (code real,
// conjugated code imaginary, sample real, sample imaginary, negated FIFO-2
// word) and cmac_input_demux; FIFO 1 also carries the word's mode and the
// CMAC's RESET and SAMPLE. Results return through a sixth FIFO.
//
// Clocks: clk for the control logic and buffers, clk_cmac (and its delayed
// copy clk_cmac_late, see cmac) for the CMAC side. rst_n is asynchronous
// and must be released synchronously to both clocks.
// Input: in_valid/in_i/in_q one sample each (two's complement), 4 samples
// per chip. The pilot code reference comes from scrambling_code_gen inside
// the searcher, which starts at chip 0 with the first sample after reset;
// delays are measured against this local code.
// Output: after each period's verification, path_valid strobes once per
// verified path with its delay (samples, signed) and its second-dwell
// energy sum; paths_done marks the end of the list. overrun is set if a
// full period arrives while the previous one is still being processed.
//
// Published: the stage structure, all sizes (5-slot period, 768 offsets,
// 512/1024-chip correlations, 2 and 5 repetitions, 36 candidates),
// thresholds, interleaving, the single CMAC with five FIFOs and the
// demultiplexer table. This design's choices: the two-bank buffer, the
// result FIFO, the control tag in FIFO 1, scaling of correlations to 8-bit
// CMAC inputs by energy_shift (one more bit for 1024-chip correlations,
// with the TH2 comparison scaled to match), and the order of the stages
// inside a period.
module mp_searcher
  import mps_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned WAVES      = 4
) (
  input  logic                      clk,
  input  logic                      clk_cmac,
  input  logic                      clk_cmac_late,
  input  logic                      rst_n,

  input  logic                      in_valid,
  input  logic signed [7:0]         in_i,
  input  logic signed [7:0]         in_q,

  input  logic signed [6:0]         snr_db,
  input  logic                      snr_known,
  input  logic [4:0]                energy_shift,

  output logic                      path_valid,
  output logic signed [DELAY_W-1:0] path_delay,
  output logic [ENERGY_W-1:0]       path_energy,
  output logic                      paths_done,
  output logic                      busy,
  output logic                      overrun
);

  localparam int unsigned N1      = 512;    // first-dwell correlation length
  localparam int unsigned N2      = 1024;   // second-dwell correlation length
  localparam int unsigned N_UNC   = 768;    // offsets of the first dwell
  localparam int unsigned NCAND   = 36;     // candidate vector size
  localparam int unsigned REP1    = 2;      // first-dwell repetitions
  localparam int unsigned REP2    = 5;      // second-dwell repetitions
  localparam int unsigned SAMPLES = PERIOD_SLOTS * SLOT_CHIPS * CHI;
  localparam int unsigned CHIPS   = PERIOD_SLOTS * SLOT_CHIPS;
  localparam int unsigned CW      = $clog2(NCAND + 1);
  localparam int unsigned IW      = $clog2(NCAND);
  localparam int unsigned TAG_W   = 3;      // {mode, reset, sample}
  localparam int unsigned RES_W   = 2 * ACC_W;

  // ================================================================ local code
  // One pilot code chip per 4 input samples, stored with the first sample
  // of its chip. The generator runs on every input sample, stored or not,
  // so the code stays aligned with the input stream.
  logic [1:0] phase4;
  logic       gen_ci, gen_cq, code_we;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        phase4 <= '0;
    else if (in_valid) phase4 <= phase4 + 1'b1;
  end

  scrambling_code_gen u_code (
    .clk, .rst_n, .restart(1'b0), .en(in_valid && phase4 == 2'd3), .ci(gen_ci), .cq(gen_cq)
  );

  assign code_we = in_valid && phase4 == 2'd0;

  // ================================================================ storage
  logic        buf_swap, s_full, c_full, rd_bank;
  logic [15:0] s_raddr;
  logic [13:0] c_raddr;
  logic [15:0] s_rdata;
  logic [1:0]  c_rdata;

  sample_buffer #(.SAMPLES(SAMPLES), .CHIPS(CHIPS)) u_buf (
    .clk, .rst_n,
    .s_we(in_valid), .s_wdata({in_i, in_q}),
    .c_we(code_we), .c_wdata({gen_ci, gen_cq}),
    .swap(buf_swap), .s_full, .c_full, .rd_bank,
    .s_raddr, .s_rdata, .c_raddr, .c_rdata
  );

  // ================================================================ operand FIFOs
  logic              f_we;
  logic [TAG_W-1:0]  f_tag;
  logic [IN_W-1:0]   f_w [5];
  logic [4:0]        f_full, f_afull, f_empty;
  logic              c_re;
  logic [TAG_W+IN_W-1:0] f1_rdata;
  logic [IN_W-1:0]   f_r [5];

  cdc_fifo #(.W(TAG_W + IN_W), .DEPTH(FIFO_DEPTH), .AFULL_MARGIN(2)) u_fifo1 (
    .wclk(clk), .wrst_n(rst_n), .we(f_we), .wdata({f_tag, f_w[0]}), .full(f_full[0]), .afull(f_afull[0]),
    .rclk(clk_cmac), .rrst_n(rst_n), .re(c_re), .rdata(f1_rdata), .empty(f_empty[0])
  );
  assign f_r[0] = f1_rdata[IN_W-1:0];

  for (genvar k = 1; k < 5; k++) begin : g_fifo
    cdc_fifo #(.W(IN_W), .DEPTH(FIFO_DEPTH), .AFULL_MARGIN(2)) u_fifo (
      .wclk(clk), .wrst_n(rst_n), .we(f_we), .wdata(f_w[k]), .full(f_full[k]), .afull(f_afull[k]),
      .rclk(clk_cmac), .rrst_n(rst_n), .re(c_re), .rdata(f_r[k]), .empty(f_empty[k])
    );
  end

  // ================================================================ CMAC side
  logic              res_afull, res_full, res_empty, res_re;
  logic [RES_W-1:0]  res_rdata;
  logic              m_valid;
  logic signed [ACC_W-1:0] m_re, m_im;
  logic [IN_W-1:0]   ca, cb, cc, cd, ce, cf, cg, ch;
  cmac_mode_e        c_mode;

  assign c_re   = ~|f_empty & ~res_afull;
  assign c_mode = cmac_mode_e'(f1_rdata[TAG_W+IN_W-1]);

  cmac_input_demux u_demux (
    .mode(c_mode), .fifo({f_r[4], f_r[3], f_r[2], f_r[1], f_r[0]}),
    .a(ca), .b(cb), .c(cc), .d(cd), .e(ce), .f(cf), .g(cg), .h(ch)
  );

  cmac #(.ACC_BITS(ACC_W), .WAVES(WAVES)) u_cmac (
    .clk(clk_cmac), .clk_late(clk_cmac_late), .rst_n,
    .in_valid(c_re),
    .a(ca), .b(cb), .c(cc), .d(cd), .e(ce), .f(cf), .g(cg), .h(ch),
    .reset(f1_rdata[TAG_W+IN_W-2]), .sample(f1_rdata[TAG_W+IN_W-3]),
    .out_valid(m_valid), .re(m_re), .im(m_im)
  );

  cdc_fifo #(.W(RES_W), .DEPTH(FIFO_DEPTH), .AFULL_MARGIN(WAVES + 4)) u_res_fifo (
    .wclk(clk_cmac), .wrst_n(rst_n), .we(m_valid), .wdata({m_re, m_im}), .full(res_full), .afull(res_afull),
    .rclk(clk), .rrst_n(rst_n), .re(res_re), .rdata(res_rdata), .empty(res_empty)
  );

  logic signed [ACC_W-1:0] r_re, r_im;
  assign r_re = res_rdata[RES_W-1:ACC_W];
  assign r_im = res_rdata[ACC_W-1:0];

  // ================================================================ helpers
  function automatic logic [IN_W-1:0] code_sm(input logic neg);
    return neg ? 8'h81 : 8'h01;   // +-1 in sign-magnitude
  endfunction

  function automatic logic [IN_W-1:0] quant(input logic signed [ACC_W-1:0] v, input logic [5:0] sh);
    return to_sign_mag(32'(v >>> sh));
  endfunction

  function automatic logic [ENERGY_W-1:0] esat(input logic signed [ACC_W-1:0] v);
    if (v < 0) return '0;
    return (v >= ACC_W'(1 << ENERGY_W)) ? '1 : ENERGY_W'(v);
  endfunction

  // ================================================================ first-dwell offsets
  logic        o_win;
  logic [1:0]  o_slot;
  logic [2:0]  o_sym;
  logic [4:0]  o_test;
  logic signed [DELAY_W-1:0] o_delay;
  logic [13:0] o_cstart;
  logic [15:0] o_sstart;

  dwell1_offsets u_off (
    .win(o_win), .slot(o_slot), .sym(o_sym), .test(o_test),
    .delay(o_delay), .code_start(o_cstart), .samp_start(o_sstart)
  );

  // second instance for the candidate scan (delay of offset o)
  logic [1:0]  s_slot;
  logic [2:0]  s_sym;
  logic [4:0]  s_test;
  logic signed [DELAY_W-1:0] s_delay;
  logic [13:0] s_cstart_unused;
  logic [15:0] s_sstart_unused;

  dwell1_offsets u_off_scan (
    .win(1'b0), .slot(s_slot), .sym(s_sym), .test(s_test),
    .delay(s_delay), .code_start(s_cstart_unused), .samp_start(s_sstart_unused)
  );

  // ================================================================ thresholds, candidates
  logic                th_clear, th_valid, th_done;
  logic [ENERGY_W-1:0] th_e, noise_floor, th1, th2;

  threshold_unit #(.N_UNC(N_UNC), .EW(ENERGY_W)) u_th (
    .clk, .rst_n, .clear(th_clear), .e_valid(th_valid), .e(th_e),
    .snr_db, .snr_known, .done(th_done), .noise_floor, .th1, .th2
  );

  logic                      cl_clear, cl_valid, cl_overflowed;
  logic signed [DELAY_W-1:0] cl_delay, cl_rd_delay;
  logic [ENERGY_W-1:0]       cl_energy, cl_rd_energy;
  logic [CW-1:0]             cl_count;
  logic [IW-1:0]             cl_rd_idx;

  candidate_list #(.MAX_CAND(NCAND)) u_cand (
    .clk, .rst_n, .clear(cl_clear), .in_valid(cl_valid), .in_delay(cl_delay), .in_energy(cl_energy),
    .count(cl_count), .overflowed(cl_overflowed), .rd_idx(cl_rd_idx), .rd_delay(cl_rd_delay), .rd_energy(cl_rd_energy)
  );

  logic          od_start, od_next, od_valid, od_done;
  logic [IW-1:0] od_idx;
  logic [2:0]    od_group;
  logic [CW-1:0] c2_cnt;

  dwell2_order #(.MAX_CAND(NCAND)) u_order (
    .clk, .rst_n, .start(od_start), .psi(c2_cnt), .next(od_next),
    .valid(od_valid), .idx(od_idx), .group(od_group), .done(od_done)
  );

  logic                                    vl_start, vl_done;
  logic [NCAND-1:0]                        vl_keep;
  logic signed [NCAND-1:0][DELAY_W-1:0]    dd_delay;
  logic [NCAND-1:0][ENERGY_W-1:0]          dd_energy;
  logic [CW-1:0]                           dd_cnt;

  verification_logic #(.MAX_CAND(NCAND)) u_ver (
    .clk, .rst_n, .start(vl_start), .count(dd_cnt), .delay(dd_delay), .energy(dd_energy),
    .done(vl_done), .keep(vl_keep)
  );

  // ================================================================ working memories
  logic [2*IN_W-1:0]        rq   [REP1][N_UNC];   // first-dwell correlations, 8-bit {re, im}
  logic [ENERGY_W-1:0]      emem [N_UNC];         // first-dwell energies
  logic [2*IN_W-1:0]        rv   [NCAND][REP2];   // second-dwell correlations
  logic signed [DELAY_W-1:0] c2_delay [NCAND];    // candidates under second dwell
  logic [IW-1:0]            ord  [NCAND];         // test order of one slot

  // ================================================================ correlation issuer
  // Streams one correlation (len chips) from the read bank into the FIFOs.
  logic        is_load, is_active, is_ready;
  logic [15:0] is_saddr;
  logic [13:0] is_caddr;
  logic [10:0] is_left;
  logic        is_first;
  logic        p_valid, p_first, p_last;   // read pipeline stage
  logic [15:0] ld_s;                       // next correlation to load
  logic [13:0] ld_c;
  logic [10:0] ld_len;

  assign is_ready = ~is_active | (is_left == 11'd1 && !f_afull[0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      is_active <= 1'b0; is_saddr <= '0; is_caddr <= '0; is_left <= '0; is_first <= 1'b0;
      p_valid <= 1'b0; p_first <= 1'b0; p_last <= 1'b0;
    end else begin
      p_valid <= 1'b0;
      if (is_active && !f_afull[0]) begin
        p_valid  <= 1'b1;
        p_first  <= is_first;
        p_last   <= (is_left == 11'd1);
        is_first <= 1'b0;
        is_saddr <= is_saddr + 16'(CHI);
        is_caddr <= is_caddr + 1'b1;
        is_left  <= is_left - 1'b1;
        if (is_left == 11'd1) is_active <= 1'b0;
      end
      if (is_load) begin
        is_active <= 1'b1;
        is_first  <= 1'b1;
        is_saddr  <= ld_s;
        is_caddr  <= ld_c;
        is_left   <= ld_len;
      end
    end
  end

  // ================================================================ main sequencer
  typedef enum logic [4:0] {
    S_IDLE, S_VER_WAIT, S_VER_OUT,
    S_D2_INIT, S_D2_ISSUE, S_D2_CWAIT, S_D2_EISSUE, S_D2_EWAIT,
    S_D1_INIT, S_D1_ISSUE, S_D1_CWAIT, S_D1_EISSUE, S_D1_EWAIT, S_D1_SCAN, S_D1_COPY
  } state_e;

  state_e state;

  logic [2:0]   d2_slot;        // verification 0..4
  logic [IW:0]  d2_j;           // position in the order (slot 0 records it)
  logic [IW:0]  e_pair;         // energy pair counter (second dwell)
  logic [2:0]   e_rep;          // repetition inside a pair
  logic [9:0]   e1_pair;        // energy pair counter (first dwell)
  logic         e1_win;
  logic [9:0]   scan_o;
  logic [IW:0]  copy_i;
  logic [IW:0]  out_i;
  logic [5:0]   sh1, sh2;

  // energy-phase FIFO push
  logic             e_push;
  logic [IN_W-1:0]  e_w [4];
  logic [TAG_W-1:0] e_tag;

  // result consumer bookkeeping
  logic [10:0]  rc_k;           // results consumed in this phase
  logic         rc_half;        // second word of a two-word result
  logic [0:0]   rc_w;
  logic [9:0]   rc_o;
  logic [2:0]   rc_s;
  logic [IW:0]  rc_j;
  logic [10:0]  rc_expect;

  assign sh1 = 6'(energy_shift);
  assign sh2 = 6'(energy_shift) + 6'd1;

  // Sample and code words to the FIFO words (mode 1 operands).
  logic [IN_W-1:0] smp_r, smp_i;
  assign smp_r = to_sign_mag(32'(signed'(s_rdata[15:8])));
  assign smp_i = to_sign_mag(32'(signed'(s_rdata[7:0])));

  always_comb begin
    f_we  = p_valid | e_push;
    if (p_valid) begin
      f_tag  = {MODE_CORR, p_first, p_last};
      f_w[0] = code_sm(c_rdata[1]);          // code real
      f_w[1] = code_sm(~c_rdata[0]);         // conjugated code imaginary
      f_w[2] = smp_r;                        // sample real
      f_w[3] = smp_i;                        // sample imaginary
      f_w[4] = code_sm(c_rdata[0]);          // negated FIFO-2 word
    end else begin
      f_tag  = e_tag;
      f_w[0] = e_w[0];
      f_w[1] = e_w[1];
      f_w[2] = e_w[2];
      f_w[3] = e_w[3];
      f_w[4] = '0;
    end
  end

  assign s_raddr = is_saddr;
  assign c_raddr = is_caddr;

  // second-dwell test geometry
  logic signed [DELAY_W-1:0] t2_delay;
  logic [13:0]               t2_cstart;
  logic [15:0]               t2_sstart;
  always_comb begin
    t2_delay  = c2_delay[od_idx];
    t2_cstart = 14'(SLOT_CHIPS * d2_slot + SYM_CHIPS * (32'(od_group) + (t2_delay < 0 ? 1 : 0)));
    t2_sstart = 16'(int'(CHI) * int'(t2_cstart) + int'(t2_delay));
  end

  // scan counters -> offset index
  assign s_slot = 2'(scan_o / 10'd192);
  assign s_sym  = 3'((scan_o / 10'd24) % 10'd8);
  assign s_test = 5'(scan_o % 10'd24);


  logic [IN_W-1:0] zero8;
  assign zero8 = '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      busy <= 1'b0; overrun <= 1'b0;
      buf_swap <= 1'b0; vl_start <= 1'b0; od_start <= 1'b0;
      th_clear <= 1'b0; cl_clear <= 1'b0;
      path_valid <= 1'b0; path_delay <= '0; path_energy <= '0; paths_done <= 1'b0;
      d2_slot <= '0; e_pair <= '0; e_rep <= '0; e1_pair <= '0; e1_win <= 1'b0;
      scan_o <= '0; copy_i <= '0; out_i <= '0; c2_cnt <= '0; rc_expect <= '0;
      {o_win, o_slot, o_sym, o_test} <= '0;
      for (int i = 0; i < int'(NCAND); i++) c2_delay[i] <= '0;
    end else begin
      buf_swap <= 1'b0; vl_start <= 1'b0; od_start <= 1'b0;
      th_clear <= 1'b0; cl_clear <= 1'b0;
      path_valid <= 1'b0; paths_done <= 1'b0;

      if (s_full && c_full && state != S_IDLE && in_valid) overrun <= 1'b1;

      unique case (state)
        // ---------------------------------------------------------- wait for a period
        S_IDLE: begin
          busy <= 1'b0;
          if (s_full && c_full) begin
            buf_swap <= 1'b1;
            busy     <= 1'b1;
            if (dd_cnt != '0) begin
              vl_start <= 1'b1;
              state    <= S_VER_WAIT;
            end else begin
              state <= S_D2_INIT;
            end
          end
        end

        // ---------------------------------------------------------- stage 3: verification
        S_VER_WAIT: if (vl_done) begin
          out_i <= '0;
          state <= S_VER_OUT;
        end
        S_VER_OUT: begin
          if (out_i == (IW+1)'(dd_cnt)) begin
            paths_done <= 1'b1;
            state      <= S_D2_INIT;
          end else begin
            if (vl_keep[out_i[IW-1:0]]) begin
              path_valid  <= 1'b1;
              path_delay  <= dd_delay[out_i[IW-1:0]];
              path_energy <= dd_energy[out_i[IW-1:0]];
            end
            out_i <= out_i + 1'b1;
          end
        end

        // ---------------------------------------------------------- stage 2: second dwell
        S_D2_INIT: begin
          if (c2_cnt == '0) begin
            state <= S_D1_INIT;
          end else begin
            od_start  <= 1'b1;
            d2_slot   <= '0;
            rc_expect <= 11'(REP2 * c2_cnt);
            state     <= S_D2_ISSUE;
          end
        end
        S_D2_ISSUE: begin
          if (od_done) begin
            if (d2_slot == 3'(REP2 - 1)) begin
              state <= S_D2_CWAIT;
            end else begin
              d2_slot  <= d2_slot + 1'b1;
              od_start <= 1'b1;
            end
          end
        end
        S_D2_CWAIT: if (rc_k == rc_expect) begin
          e_pair    <= '0;
          e_rep     <= '0;
          rc_expect <= 11'((32'(c2_cnt) + 1) / 2);
          state     <= S_D2_EISSUE;
        end
        S_D2_EISSUE: if (!f_afull[0]) begin
          if (e_rep == 3'(REP2 - 1)) begin
            e_rep <= '0;
            if (e_pair + 2 >= (IW+1)'(c2_cnt)) state <= S_D2_EWAIT;
            else e_pair <= e_pair + (IW+1)'(2);
          end else begin
            e_rep <= e_rep + 1'b1;
          end
        end
        S_D2_EWAIT: if (rc_k == rc_expect && !rc_half) state <= S_D1_INIT;

        // ---------------------------------------------------------- stage 1: first dwell
        S_D1_INIT: begin
          th_clear  <= 1'b1;
          cl_clear  <= 1'b1;
          {o_win, o_slot, o_sym, o_test} <= '0;
          rc_expect <= 11'(REP1 * N_UNC);
          state     <= S_D1_ISSUE;
        end
        S_D1_ISSUE: if (is_ready) begin
          if (o_test != 5'd23) o_test <= o_test + 1'b1;
          else begin
            o_test <= '0;
            if (o_sym != 3'd7) o_sym <= o_sym + 1'b1;
            else begin
              o_sym <= '0;
              if (o_slot != 2'd3) o_slot <= o_slot + 1'b1;
              else begin
                o_slot <= '0;
                if (!o_win) o_win <= 1'b1;
                else state <= S_D1_CWAIT;
              end
            end
          end
        end
        S_D1_CWAIT: if (rc_k == rc_expect) begin
          e1_pair   <= '0;
          e1_win    <= 1'b0;
          rc_expect <= 11'(N_UNC / 2);
          state     <= S_D1_EISSUE;
        end
        S_D1_EISSUE: if (!f_afull[0]) begin
          e1_win <= ~e1_win;
          if (e1_win) begin
            if (e1_pair == 10'(N_UNC - 2)) state <= S_D1_EWAIT;
            else e1_pair <= e1_pair + 10'd2;
          end
        end
        S_D1_EWAIT: if (th_done) begin
          scan_o <= '0;
          state  <= S_D1_SCAN;
        end
        S_D1_SCAN: begin
          if (scan_o == 10'(N_UNC - 1)) begin
            copy_i <= '0;
            state  <= S_D1_COPY;
          end
          scan_o <= scan_o + 1'b1;
        end
        S_D1_COPY: begin
          // one cycle after the last scan entry the list is complete
          if (copy_i == (IW+1)'(NCAND)) begin
            c2_cnt <= cl_count;
            state  <= S_IDLE;
          end else begin
            c2_delay[copy_i[IW-1:0]] <= cl_rd_delay;
            copy_i <= copy_i + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign cl_rd_idx = copy_i[IW-1:0];
  assign cl_valid  = (state == S_D1_SCAN) && (emem[scan_o] > th1);
  assign cl_delay  = s_delay;
  assign cl_energy = emem[scan_o];

  // issuer loading and the order advance
  always_comb begin
    is_load = 1'b0;
    od_next = 1'b0;
    ld_s    = o_sstart;
    ld_c    = o_cstart;
    ld_len  = 11'(N1);
    if (state == S_D1_ISSUE && is_ready) begin
      is_load = 1'b1;
    end else if (state == S_D2_ISSUE && od_valid && is_ready) begin
      is_load = 1'b1;
      od_next = 1'b1;
      ld_s    = t2_sstart;
      ld_c    = t2_cstart;
      ld_len  = 11'(N2);
    end
  end

  // record the second-dwell order during the first verification slot
  always_ff @(posedge clk) begin
    if (state == S_D2_ISSUE && od_valid && is_ready && d2_slot == '0)
      ord[d2_j[IW-1:0]] <= od_idx;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) d2_j <= '0;
    else if (state == S_D2_INIT) d2_j <= '0;
    else if (state == S_D2_ISSUE && od_valid && is_ready && d2_slot == '0) d2_j <= d2_j + 1'b1;
  end

  // energy-phase operands
  always_comb begin
    e_push = 1'b0;
    e_tag  = {MODE_ENERGY, 1'b0, 1'b0};
    for (int k = 0; k < 4; k++) e_w[k] = zero8;
    if (state == S_D2_EISSUE && !f_afull[0]) begin
      e_push = 1'b1;
      e_tag  = {MODE_ENERGY, e_rep == '0, e_rep == 3'(REP2 - 1)};
      e_w[0] = rv[e_pair[IW-1:0]][e_rep][15:8];
      e_w[1] = rv[e_pair[IW-1:0]][e_rep][7:0];
      if (e_pair + 1 < (IW+1)'(c2_cnt)) begin
        e_w[2] = rv[IW'(e_pair + 1)][e_rep][15:8];
        e_w[3] = rv[IW'(e_pair + 1)][e_rep][7:0];
      end
    end else if (state == S_D1_EISSUE && !f_afull[0]) begin
      e_push = 1'b1;
      e_tag  = {MODE_ENERGY, ~e1_win, e1_win};
      e_w[0] = rq[e1_win][e1_pair][15:8];
      e_w[1] = rq[e1_win][e1_pair][7:0];
      e_w[2] = rq[e1_win][e1_pair + 1][15:8];
      e_w[3] = rq[e1_win][e1_pair + 1][7:0];
    end
  end

  // ================================================================ result consumer
  logic [ENERGY_W-1:0] cur_e;
  logic [IW:0]         cur_c;
  logic                res_take;

  always_comb begin
    res_take = 1'b0;
    th_valid = 1'b0;
    th_e     = '0;
    cur_e    = rc_half ? esat(r_im) : esat(r_re);
    cur_c    = rc_o[IW:0] + (IW+1)'(rc_half);
    if (!res_empty) begin
      unique case (state)
        S_D1_ISSUE, S_D1_CWAIT, S_D2_ISSUE, S_D2_CWAIT: res_take = 1'b1;
        S_D1_EISSUE, S_D1_EWAIT: begin
          th_valid = 1'b1;
          th_e     = cur_e;
          res_take = rc_half;
        end
        S_D2_EISSUE, S_D2_EWAIT: res_take = rc_half || (cur_c + 1 >= (IW+1)'(c2_cnt));
        default: res_take = 1'b0;
      endcase
    end
  end
  assign res_re = res_take;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rc_k <= '0; rc_half <= 1'b0; rc_w <= '0; rc_o <= '0; rc_s <= '0; rc_j <= '0;
      dd_cnt <= '0;
      for (int i = 0; i < int'(NCAND); i++) begin
        dd_delay[i]  <= '0;
        dd_energy[i] <= '0;
      end
    end else begin
      if (state == S_D1_INIT || state == S_D2_INIT || state == S_D1_CWAIT || state == S_D2_CWAIT) begin
        if (state == S_D1_CWAIT || state == S_D2_CWAIT) begin
          if (rc_k == rc_expect) begin
            rc_k <= '0; rc_half <= 1'b0; rc_w <= '0; rc_o <= '0; rc_s <= '0; rc_j <= '0;
          end
        end else begin
          rc_k <= '0; rc_half <= 1'b0; rc_w <= '0; rc_o <= '0; rc_s <= '0; rc_j <= '0;
        end
        if (state == S_D2_INIT) dd_cnt <= '0;
      end
      if (!res_empty) begin
        unique case (state)
          // first-dwell correlations, in issue order: window, then offset
          S_D1_ISSUE, S_D1_CWAIT: begin
            rq[rc_w][rc_o] <= {quant(r_re, sh1), quant(r_im, sh1)};
            rc_k <= rc_k + 1'b1;
            if (rc_o == 10'(N_UNC - 1)) begin
              rc_o <= '0;
              rc_w <= rc_w + 1'b1;
            end else begin
              rc_o <= rc_o + 1'b1;
            end
          end
          // second-dwell correlations: slot outer, recorded order inner
          S_D2_ISSUE, S_D2_CWAIT: begin
            rv[ord[rc_j[IW-1:0]]][rc_s] <= {quant(r_re, sh2), quant(r_im, sh2)};
            rc_k <= rc_k + 1'b1;
            if (rc_j + 1 == (IW+1)'(c2_cnt)) begin
              rc_j <= '0;
              rc_s <= rc_s + 1'b1;
            end else begin
              rc_j <= rc_j + 1'b1;
            end
          end
          // first-dwell energies: two per result
          S_D1_EISSUE, S_D1_EWAIT: begin
            emem[rc_o] <= cur_e;
            rc_o <= rc_o + 1'b1;
            rc_half <= ~rc_half;
            if (rc_half) rc_k <= rc_k + 1'b1;
          end
          // second-dwell energy sums: compare mean with TH2
          S_D2_EISSUE, S_D2_EWAIT: begin
            // sum of 5 energies of 1024-chip correlations taken one bit
            // smaller: mean > TH2  <=>  4 * sum > 5 * TH2
            if ((32'(cur_e) << 2) > 32'(th2) * 32'(REP2)) begin
              dd_delay[dd_cnt[IW-1:0]]  <= c2_delay[cur_c[IW-1:0]];
              dd_energy[dd_cnt[IW-1:0]] <= cur_e;
              dd_cnt <= dd_cnt + 1'b1;
            end
            if (res_take) begin
              rc_half <= 1'b0;
              rc_o    <= rc_o + 10'd2;
              rc_k    <= rc_k + 1'b1;
            end else begin
              rc_half <= 1'b1;
            end
          end
          default: ;
        endcase
      end
    end
  end

endmodule
