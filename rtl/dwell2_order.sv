// Test order of the second dwell (candidate interleaving).
//
// Adjacent candidates are usually one sample apart, so they are not tested
// back to back. With psi candidates the vector is split into groups of
//   G = ceil(psi / 6)
// candidates, one group per pilot symbol, and the interleaving step is
//   S = ceil(psi / G).
// Starting at index 0 the order is 0, S, 2S, ... while below psi, then the
// start moves up by one: 1, 1+S, ... and so on until every candidate has
// been visited. Each run from one starting point is one group, tested in
// pilot symbol number `group` (the start index, 0..5). For psi = 36 this
// gives 0,6,...,30 | 1,7,...,31 | ... | 5,11,...,35.
// Interface: start loads psi (1..MAX_CAND); idx/group are valid while valid
// is 1; next advances; done pulses after the last index has been taken.
// Group size, step and order are the published rule.
module dwell2_order #(
  parameter int unsigned MAX_CAND = 36
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  logic [$clog2(MAX_CAND+1)-1:0] psi,
  input  logic                         next,
  output logic                         valid,
  output logic [$clog2(MAX_CAND)-1:0]  idx,
  output logic [2:0]                   group,
  output logic                         done
);

  localparam int unsigned CW = $clog2(MAX_CAND+1);

  logic [CW-1:0] n, step, cur, first;
  logic [CW-1:0] gsize;

  // ceil divisions on small numbers
  always_comb begin
    gsize = CW'((32'(n) + 32'd5) / 32'd6);
    if (gsize == '0) step = '0;
    else             step = CW'((32'(n) + 32'(gsize) - 32'd1) / 32'(gsize));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= 1'b0; done <= 1'b0;
      n <= '0; cur <= '0; first <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        n     <= psi;
        cur   <= '0;
        first <= '0;
        valid <= (psi != '0);
      end else if (valid && next) begin
        if (32'(cur) + 32'(step) < 32'(n)) begin
          cur <= cur + step;
        end else if (32'(first) + 1 < 32'(step) && 32'(first) + 1 < 32'(n)) begin
          first <= first + 1'b1;
          cur   <= first + 1'b1;
        end else begin
          valid <= 1'b0;
          done  <= 1'b1;
        end
      end
    end
  end

  assign idx   = ($clog2(MAX_CAND))'(cur);
  assign group = 3'(first);

endmodule
