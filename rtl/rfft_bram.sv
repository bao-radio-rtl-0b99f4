// rfft_bram: the block RAM of the real-FFT post-processor, N/4 words of 16 bits.
//
// During step 1 it is written with the first N/4 complex FFT outputs of a frame (8-bit real,
// 8-bit imaginary); during step 2 it is read to pair each stored value with a later output.
// Simple dual port: one write port, one read port with a registered output (one clock of read
// latency), as an FPGA block RAM in write mode. Reading an address in the cycle it is written
// returns the old word (this design's choice).
module rfft_bram #(
  parameter int DEPTH = 2048,        // N/4
  parameter int W     = 16
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [W-1:0]             wdata,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [W-1:0]             rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
