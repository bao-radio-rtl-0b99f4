// onchip_ram: true dual-port on-chip RAM, 64-bit words, used as the descriptor RAM of a
// scatter-gather DMA channel (4 KiB = 512 words, the size of the on-chip memory in the
// board's address map).
//
// Port A serves the host (through the PCIe BAR master), port B serves the DMA controller's
// descriptor read and write masters, which never access at the same time. Each port reads
// with one clock of latency; a write and a read of the same address in one clock on
// different ports return the old word. Simultaneous writes to one address: port B wins.
module onchip_ram #(
  parameter int DEPTH = 512,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] a_addr,
  input  logic          a_we,
  input  logic [63:0]   a_wdata,
  output logic [63:0]   a_rdata,
  input  logic [AW-1:0] b_addr,
  input  logic          b_we,
  input  logic [63:0]   b_wdata,
  output logic [63:0]   b_rdata
);
  logic [63:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_we && !(b_we && b_addr == a_addr)) mem[a_addr] <= a_wdata;
    if (b_we) mem[b_addr] <= b_wdata;
    a_rdata <= mem[a_addr];
    b_rdata <= mem[b_addr];
  end
endmodule
