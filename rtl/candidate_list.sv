// Candidate vector C_d of the first dwell.
//
// Offsets whose energy exceeds TH1 are offered one per clock as
// {delay, energy}. The vector holds at most MAX_CAND of them. It is kept in
// decreasing order of energy: a new candidate is compared with every entry
// from the strongest down, takes the place of the first weaker one and
// pushes the rest one place right; when the vector is full the weakest
// entry falls off the end, and a candidate weaker than all MAX_CAND
// entries is dropped. overflowed records that more than MAX_CAND
// candidates were offered.
// The 36-entry limit and the replacement rule are the published ones; the
// published rule sorts only once a 37th candidate appears, while here the
// order is maintained from the first entry, which gives the same vector
// once it overflows. Equal energies keep arrival order.
// Ports: clear empties it; rd_idx reads an entry combinationally.
module candidate_list
  import mps_pkg::*;
#(
  parameter int unsigned MAX_CAND = 36
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         clear,
  input  logic                         in_valid,
  input  logic signed [DELAY_W-1:0]    in_delay,
  input  logic [ENERGY_W-1:0]          in_energy,
  output logic [$clog2(MAX_CAND+1)-1:0] count,
  output logic                         overflowed,
  input  logic [$clog2(MAX_CAND)-1:0]  rd_idx,
  output logic signed [DELAY_W-1:0]    rd_delay,
  output logic [ENERGY_W-1:0]          rd_energy
);

  localparam int unsigned CW = $clog2(MAX_CAND+1);

  logic signed [DELAY_W-1:0] dly [MAX_CAND];
  logic [ENERGY_W-1:0]       eng [MAX_CAND];

  // Position of the new entry: number of entries at least as strong.
  logic [CW-1:0] pos;
  always_comb begin
    pos = '0;
    for (int i = 0; i < int'(MAX_CAND); i++)
      if ((CW'(i) < count) && (eng[i] >= in_energy)) pos = pos + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count      <= '0;
      overflowed <= 1'b0;
      for (int i = 0; i < int'(MAX_CAND); i++) begin
        dly[i] <= '0;
        eng[i] <= '0;
      end
    end else if (clear) begin
      count      <= '0;
      overflowed <= 1'b0;
    end else if (in_valid) begin
      if (count == CW'(MAX_CAND)) overflowed <= 1'b1;
      if (pos < CW'(MAX_CAND)) begin
        if (pos == '0) begin
          dly[0] <= in_delay;
          eng[0] <= in_energy;
        end
        for (int i = 1; i < int'(MAX_CAND); i++) begin
          if (CW'(i) == pos) begin
            dly[i] <= in_delay;
            eng[i] <= in_energy;
          end else if (CW'(i) > pos) begin
            dly[i] <= dly[i-1];
            eng[i] <= eng[i-1];
          end
        end
        if (count < CW'(MAX_CAND)) count <= count + 1'b1;
      end
    end
  end

  assign rd_delay  = dly[rd_idx];
  assign rd_energy = eng[rd_idx];

endmodule
