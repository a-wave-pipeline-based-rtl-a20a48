// Circular FIFO between two clock domains.
//
// The control logic writes operands at its own clock and the CMAC reads
// them at its (usually faster) clock. The queue is a circular buffer of
// DEPTH words with binary pointers in each domain; each pointer crosses to
// the other domain as a Gray code through two flip-flops, so full and empty
// are always safe (conservative by at most the synchroniser delay).
// rdata shows the oldest word whenever empty is 0 (first-word fall-through);
// re pops it. afull is 1 when AFULL_MARGIN or fewer words are free, so a
// writer with that many words in flight can stop in time.
// DEPTH must be a power of two. Depth, margin and the Gray-code scheme are
// this design's choices: the searcher description only calls for circular
// FIFOs between the two clock domains.
module cdc_fifo #(
  parameter int unsigned W            = 8,
  parameter int unsigned DEPTH        = 16,
  parameter int unsigned AFULL_MARGIN = 2
) (
  input  logic         wclk,
  input  logic         wrst_n,
  input  logic         we,
  input  logic [W-1:0] wdata,
  output logic         full,
  output logic         afull,

  input  logic         rclk,
  input  logic         rrst_n,
  input  logic         re,
  output logic [W-1:0] rdata,
  output logic         empty
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];

  logic [AW:0] wbin, rbin;                 // binary pointers, one extra wrap bit
  logic [AW:0] wgray, rgray;               // Gray copies, registered
  logic [AW:0] rgray_w1, rgray_w2;         // read pointer in the write domain
  logic [AW:0] wgray_r1, wgray_r2;         // write pointer in the read domain

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ------------------------------------------------------------ write domain
  logic [AW:0] wused;
  assign wused = wbin - gray2bin(rgray_w2);
  assign full  = (wused == (AW+1)'(DEPTH));
  assign afull = (wused >= (AW+1)'(DEPTH - AFULL_MARGIN));

  always_ff @(posedge wclk) begin
    if (we && !full) mem[wbin[AW-1:0]] <= wdata;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (we && !full) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  // ------------------------------------------------------------ read domain
  assign empty = (rgray == wgray_r2);
  assign rdata = mem[rbin[AW-1:0]];

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (re && !empty) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end

endmodule
