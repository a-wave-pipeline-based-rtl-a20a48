// Noise floor and the two detection thresholds.
//
// The noise floor is the mean of the first dwell's 768 energies: energies
// are summed as they arrive and the sum divided by N_UNC. The thresholds
// scale it according to the SNR (from an external estimator; 4 dB is used
// until an estimate is available):
//   TH1 = 1.5  x NF for SNR <= 4 dB,   1.75 x NF above
//   TH2 = 1    x NF for SNR <  4 dB,   1.5 x NF for 4..7.99 dB,
//         1.75 x NF for 8..11.99 dB,   2.25 x NF from 12 dB
// The scalings are shifts and adds. th1/th2/noise_floor are registered and
// update on the clock after the N_UNC-th energy (done pulses then); the
// SNR is read at that moment. snr_db is in whole dB, so 4..7.99 dB means
// 4..7. Factors and SNR bands follow the published rules; the integer dB
// input and the running-sum implementation are this design's choices.
module threshold_unit
  import mps_pkg::*;
#(
  parameter int unsigned N_UNC = 768,
  parameter int unsigned EW    = ENERGY_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 e_valid,
  input  logic [EW-1:0]        e,
  input  logic signed [6:0]    snr_db,
  input  logic                 snr_known,
  output logic                 done,
  output logic [EW-1:0]        noise_floor,
  output logic [EW-1:0]        th1,
  output logic [EW-1:0]        th2
);

  localparam int unsigned SW = EW + $clog2(N_UNC) + 1;

  logic [SW-1:0]              sum;
  logic [$clog2(N_UNC+1)-1:0] n;
  logic [SW-1:0]              sum_next;
  logic [EW+1:0]              nf, t1, t2;
  logic signed [6:0]          snr;

  assign sum_next = sum + SW'(e);

  always_comb begin
    snr = snr_known ? snr_db : 7'sd4;
    nf  = (EW+2)'(sum_next / SW'(N_UNC));
    t1  = (snr <= 7'sd4) ? nf + (nf >> 1) : nf + (nf >> 1) + (nf >> 2);
    if (snr < 7'sd4)       t2 = nf;
    else if (snr < 7'sd8)  t2 = nf + (nf >> 1);
    else if (snr < 7'sd12) t2 = nf + (nf >> 1) + (nf >> 2);
    else                   t2 = (nf << 1) + (nf >> 2);
  end

  function automatic logic [EW-1:0] sat(input logic [EW+1:0] v);
    return (v[EW+1:EW] != 2'b00) ? '1 : v[EW-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum <= '0; n <= '0; done <= 1'b0;
      noise_floor <= '0; th1 <= '0; th2 <= '0;
    end else begin
      done <= 1'b0;
      if (clear) begin
        sum <= '0;
        n   <= '0;
      end else if (e_valid) begin
        if (n == ($clog2(N_UNC+1))'(N_UNC - 1)) begin
          noise_floor <= sat(nf);
          th1         <= sat(t1);
          th2         <= sat(t2);
          done        <= 1'b1;
          sum <= '0;
          n   <= '0;
        end else begin
          sum <= sum_next;
          n   <= n + 1'b1;
        end
      end
    end
  end

endmodule
