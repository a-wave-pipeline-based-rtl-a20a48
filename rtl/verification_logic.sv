// Verification logic: removes false paths made by energy lobes.
//
// The matched filter and 4x oversampling spread each path's energy over
// several neighbouring samples, and two close paths can add up to a false
// peak between them. Starting from the detected delays D_d with their
// energies, three steps are applied, all entries in parallel:
//  1. Local maxima: an entry is a local maximum if every entry one sample
//     away (if any) has less energy.
//  2. Around each local maximum m, every weaker entry within 2 samples is
//     deleted, and within 3 samples on a side where no other local maximum
//     lies closer than 8 samples.
//  3. Post-processing: among the entries step 2 left, whenever two lie
//     less than 3 samples apart the weaker is deleted. Entries deleted in
//     step 2 delete nothing here.
// Interface: start latches count/delay/energy; keep (one bit per entry) is
// valid when done pulses, the fifth clock edge after start (inputs
// latched, local maxima, neighbour flags, step 2, step 3).
// The three rules are the published ones. Where the description reads
// "more than 8 samples" in one place and "less than 8" in another, a
// distance of exactly 8 counts as far. Equal energies delete nothing;
// step 3 uses only the step-2 result, so the outcome does not depend on the
// order of the list.
module verification_logic
  import mps_pkg::*;
#(
  parameter int unsigned MAX_CAND = 36
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              start,
  input  logic [$clog2(MAX_CAND+1)-1:0]     count,
  input  logic signed [MAX_CAND-1:0][DELAY_W-1:0] delay,
  input  logic [MAX_CAND-1:0][ENERGY_W-1:0] energy,
  output logic                              done,
  output logic [MAX_CAND-1:0]               keep
);

  localparam int unsigned N = MAX_CAND;

  logic signed [DELAY_W-1:0] d [N];
  logic [ENERGY_W-1:0]       e [N];
  logic [N-1:0]              v;
  logic [N-1:0]              lm, near_l, near_r, del2;
  logic [N-1:0]              lm_c, near_l_c, near_r_c, del2_c, keep_c;
  logic [3:0]                phase;

  // signed separation a - b
  function automatic int sep(input logic signed [DELAY_W-1:0] a, input logic signed [DELAY_W-1:0] b);
    return int'(a) - int'(b);
  endfunction

  // Step 1: local maxima and whether another local maximum is near on each side.
  always_comb begin
    for (int x = 0; x < int'(N); x++) begin
      lm_c[x] = v[x];
      for (int y = 0; y < int'(N); y++)
        if (y != x && v[y] && (sep(d[y], d[x]) == 1 || sep(d[y], d[x]) == -1) && !(e[x] > e[y]))
          lm_c[x] = 1'b0;
    end
  end

  always_comb begin
    for (int m = 0; m < int'(N); m++) begin
      near_l_c[m] = 1'b0;
      near_r_c[m] = 1'b0;
      for (int y = 0; y < int'(N); y++) begin
        if (y != m && lm[y] && sep(d[m], d[y]) > 0 && sep(d[m], d[y]) < 8) near_l_c[m] = 1'b1;
        if (y != m && lm[y] && sep(d[y], d[m]) > 0 && sep(d[y], d[m]) < 8) near_r_c[m] = 1'b1;
      end
    end
  end

  // Step 2: weaker entries inside the window of a local maximum.
  always_comb begin
    for (int y = 0; y < int'(N); y++) begin
      del2_c[y] = 1'b0;
      for (int m = 0; m < int'(N); m++) begin
        if (m != y && lm[m] && v[y] && e[y] < e[m]) begin
          if (sep(d[m], d[y]) > 0 && sep(d[m], d[y]) <= (near_l[m] ? 2 : 3)) del2_c[y] = 1'b1;
          if (sep(d[y], d[m]) > 0 && sep(d[y], d[m]) <= (near_r[m] ? 2 : 3)) del2_c[y] = 1'b1;
        end
      end
    end
  end

  // Step 3: survivors closer than 3 samples, the weaker goes.
  always_comb begin
    for (int y = 0; y < int'(N); y++) begin
      keep_c[y] = v[y] & ~del2[y];
      for (int z = 0; z < int'(N); z++)
        if (z != y && v[z] && !del2[z] && sep(d[z], d[y]) <= 2 && sep(d[z], d[y]) >= -2 && e[z] > e[y])
          keep_c[y] = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= '0; done <= 1'b0; v <= '0;
      lm <= '0; near_l <= '0; near_r <= '0; del2 <= '0; keep <= '0;
      for (int i = 0; i < int'(N); i++) begin
        d[i] <= '0;
        e[i] <= '0;
      end
    end else begin
      phase <= {phase[2:0], start};
      done  <= phase[3];
      if (start) begin
        for (int i = 0; i < int'(N); i++) begin
          d[i] <= delay[i];
          e[i] <= energy[i];
          v[i] <= (32'(i) < 32'(count));
        end
      end
      if (phase[0]) lm <= lm_c;
      if (phase[1]) begin
        near_l <= near_l_c;
        near_r <= near_r_c;
      end
      if (phase[2]) del2 <= del2_c;
      if (phase[3]) keep <= keep_c;
    end
  end

endmodule
