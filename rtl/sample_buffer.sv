// Search-period memory: received samples and pilot code chips.
//
// The CMAC works much faster than the chip rate, so one whole search period
// (5 slots = 12 800 chips = 51 200 samples at 4 samples per chip) is stored
// before it is processed. The buffer has two banks: incoming samples and
// code chips fill the write bank at consecutive addresses while the
// searcher reads the other bank at random addresses. swap exchanges the
// banks and restarts the write addresses at zero; s_full/c_full say the
// write bank holds a full period.
// Samples are 16-bit words {I, Q}, code chips 2-bit words {I, Q}.
// Reads are synchronous: data appear one clock after the address.
// Storing a full period before processing is the published scheme; the
// two-bank (ping-pong) organisation is this design's choice.
module sample_buffer #(
  parameter int unsigned SAMPLES = 51200,
  parameter int unsigned CHIPS   = 12800
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        s_we,
  input  logic [15:0] s_wdata,
  input  logic        c_we,
  input  logic [1:0]  c_wdata,
  input  logic        swap,
  output logic        s_full,
  output logic        c_full,
  output logic        rd_bank,       // bank being read

  input  logic [$clog2(SAMPLES)-1:0] s_raddr,
  output logic [15:0]                s_rdata,
  input  logic [$clog2(CHIPS)-1:0]   c_raddr,
  output logic [1:0]                 c_rdata
);

  localparam int unsigned SAW = $clog2(SAMPLES);
  localparam int unsigned CAW = $clog2(CHIPS);

  logic [15:0] smem [2*SAMPLES];
  logic [1:0]  cmem [2*CHIPS];

  logic           wbank;
  logic [SAW:0]   s_wptr;
  logic [CAW:0]   c_wptr;

  assign rd_bank = ~wbank;
  assign s_full  = (s_wptr == (SAW+1)'(SAMPLES));
  assign c_full  = (c_wptr == (CAW+1)'(CHIPS));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wbank  <= 1'b0;
      s_wptr <= '0;
      c_wptr <= '0;
    end else if (swap) begin
      wbank  <= ~wbank;
      s_wptr <= '0;
      c_wptr <= '0;
    end else begin
      if (s_we && !s_full) s_wptr <= s_wptr + 1'b1;
      if (c_we && !c_full) c_wptr <= c_wptr + 1'b1;
    end
  end

  // Memories: written from the write bank, read from the other one.
  always_ff @(posedge clk) begin
    if (s_we && !s_full && !swap)
      smem[(SAW+1)'(s_wptr) + (wbank ? (SAW+1)'(SAMPLES) : (SAW+1)'(0))] <= s_wdata;
    s_rdata <= smem[(SAW+1)'(s_raddr) + (wbank ? (SAW+1)'(0) : (SAW+1)'(SAMPLES))];
  end

  always_ff @(posedge clk) begin
    if (c_we && !c_full && !swap)
      cmem[(CAW+1)'(c_wptr) + (wbank ? (CAW+1)'(CHIPS) : (CAW+1)'(0))] <= c_wdata;
    c_rdata <= cmem[(CAW+1)'(c_raddr) + (wbank ? (CAW+1)'(0) : (CAW+1)'(CHIPS))];
  end

endmodule
