// Input demultiplexer of the CMAC.
//
// Five FIFOs feed the CMAC's eight multiplier inputs A..H. In mode 1
// (correlation) the FIFOs hold code real part, code imaginary part,
// received real part, received imaginary part and the negated code
// imaginary part, and the inputs are wired so that the CMAC forms
// re = code_r*r_r + (-code_i)*r_i and im = code_r*r_i + code_i*r_r.
// The searcher loads the conjugate of the code (FIFO 2 holds -code_i,
// FIFO 5 code_i), so the CMAC correlates: conj(code) * r.
// In mode 2 (energy) FIFOs 1..4 hold R_r[n], R_i[n], R_r[n+1], R_i[n+1]
// and each is sent to both inputs of one multiplier, so the two halves of
// the CMAC compute two I^2+Q^2 energies side by side.
//   output  A B C D E F G H
//   mode 1  1 3 5 4 1 4 2 3
//   mode 2  1 1 2 2 3 3 4 4
// Output A takes FIFO 1 in both modes, so it is a plain wire.
// The routing table is the published one. Combinational.
module cmac_input_demux
  import mps_pkg::*;
(
  input  cmac_mode_e            mode,
  input  logic [4:0][IN_W-1:0]  fifo,   // fifo[0] is FIFO 1
  output logic [IN_W-1:0]       a, b, c, d, e, f, g, h
);

  always_comb begin
    unique case (mode)
      MODE_CORR: begin
        a = fifo[0]; b = fifo[2]; c = fifo[4]; d = fifo[3];
        e = fifo[0]; f = fifo[3]; g = fifo[1]; h = fifo[2];
      end
      MODE_ENERGY: begin
        a = fifo[0]; b = fifo[0]; c = fifo[1]; d = fifo[1];
        e = fifo[2]; f = fifo[2]; g = fifo[3]; h = fifo[3];
      end
      default: begin
        a = '0; b = '0; c = '0; d = '0; e = '0; f = '0; g = '0; h = '0;
      end
    endcase
  end

endmodule
