// pcie_fpga: the acquisition FPGA of the PCIe board, which receives the data of the ADC boards
// over fibres and writes it into the memory of the host PC.
//
// Each of the NCH channels (one per fibre) is a chain
//   link / pattern select -> input FIFO (32 KiB) -> frame filter -> flow control
//   -> frame FIFO (64 KiB) -> scatter-gather DMA (+ descriptor RAM, 4 KiB)
// and the channels' DMA write masters share the endpoint's write port through a round-robin
// arbiter. The host reaches the descriptor RAMs, the DMA registers and the channel registers
// through host_decoder. The chain, the FIFO sizes and the two-channel structure follow the
// source material; the PCIe x4 endpoint itself (vendor hard IP with its SERDES) is outside
// this module: its BAR master comes in on h_*, and its write slave is driven on txm_*.
// All logic runs on the one clock of the endpoint's application side (125.6 MHz on the board);
// the fibre receivers are assumed to deliver their words already in this clock domain.
module pcie_fpga
  import bao_pkg::*;
#(
  parameter int NCH        = 2,
  parameter int IN_DEPTH   = 4096,   // 32 KiB of 64-bit words
  parameter int FR_DEPTH   = 8192,   // 64 KiB of 64-bit words
  parameter int DESC_DEPTH = 512,    // 4 KiB
  parameter int MAXFRAME   = 2050,   // header + N/4+1 words, N = 8192
  parameter int PAT_WORDS  = 2049,
  parameter int PAT_GAP    = 16
) (
  input  logic                  clk,
  input  logic                  rst,
  // fibre receivers
  input  logic [NCH-1:0]        rx_valid,
  input  logic [NCH-1:0]        rx_sop,
  input  logic [NCH-1:0]        rx_eop,
  input  logic [NCH-1:0][63:0]  rx_data,
  // host BAR master
  input  logic [15:0]           h_addr,
  input  logic                  h_write,
  input  logic [63:0]           h_wdata,
  input  logic                  h_read,
  output logic [63:0]           h_rdata,
  output logic                  h_rdvalid,
  // write port of the PCIe endpoint (toward host memory)
  output logic                  txm_write,
  output logic [31:0]           txm_address,
  output logic [63:0]           txm_writedata,
  input  logic                  txm_waitrequest,
  output logic [NCH-1:0]        irq
);
  localparam int DAW = $clog2(DESC_DEPTH);
  localparam int FLW = $clog2(FR_DEPTH);

  logic [NCH-1:0][DAW-1:0] ram_addr;
  logic [NCH-1:0]          ram_we;
  logic [63:0]             ram_wdata;
  logic [NCH-1:0][63:0]    ram_rdata;
  logic [1:0]              csr_addr;
  logic [NCH-1:0]          csr_write, csr_read;
  logic [31:0]             csr_wdata;
  logic [NCH-1:0][31:0]    csr_rdata;
  logic [NCH-1:0]          pattern_sel;
  logic [NCH-1:0][15:0]    keep_every;
  logic [NCH-1:0][63:0]    chan_status;

  logic [NCH-1:0]          dm_write, dm_wait;
  logic [NCH-1:0][31:0]    dm_address;
  logic [NCH-1:0][63:0]    dm_writedata;

  host_decoder #(.NCH(NCH), .DAW(DAW)) u_dec (
    .clk, .rst, .h_addr, .h_write, .h_wdata, .h_read, .h_rdata, .h_rdvalid,
    .ram_addr, .ram_we, .ram_wdata, .ram_rdata,
    .csr_addr, .csr_write, .csr_read, .csr_wdata, .csr_rdata,
    .pattern_sel, .keep_every, .chan_status);

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    // source select
    logic        s_valid, s_sop, s_eop, s_cur;
    logic [63:0] s_data;
    pattern_source #(.NWORDS(PAT_WORDS), .GAP(PAT_GAP)) u_src (
      .clk, .rst, .sel(pattern_sel[c]),
      .link_valid(rx_valid[c]), .link_sop(rx_sop[c]), .link_eop(rx_eop[c]), .link_data(rx_data[c]),
      .out_valid(s_valid), .out_sop(s_sop), .out_eop(s_eop), .out_data(s_data), .cur_sel(s_cur));

    // input FIFO: never stalls its source; overflows are flagged
    st_beat_t    i_out;
    logic        i_valid, i_in_ready, i_ovf;
    logic [$clog2(IN_DEPTH):0] i_level;
    sync_fifo #(.W(ST_W), .DEPTH(IN_DEPTH)) u_in_fifo (
      .clk, .rst, .in_valid(s_valid), .in_ready(i_in_ready), .in_data({s_sop, s_eop, s_data}),
      .out_valid(i_valid), .out_ready(1'b1), .out_data(i_out), .level(i_level), .overflow(i_ovf));

    // frame filter
    logic        f_valid, f_sop, f_eop;
    logic [63:0] f_data;
    logic [31:0] f_bad, f_skipped;
    frame_filter u_filt (
      .clk, .rst, .keep_every(keep_every[c]),
      .in_valid(i_valid), .in_sop(i_out.sop), .in_eop(i_out.eop), .in_data(i_out.data),
      .out_valid(f_valid), .out_sop(f_sop), .out_eop(f_eop), .out_data(f_data),
      .bad_words(f_bad), .skipped(f_skipped));

    // flow control in front of the frame FIFO
    logic        c_valid, c_sop, c_eop;
    logic [63:0] c_data;
    logic [31:0] c_adm, c_drop;
    logic [FLW:0] fr_level;
    flow_control #(.MAXFRAME(MAXFRAME), .LW(FLW + 1)) u_flow (
      .clk, .rst, .in_valid(f_valid), .in_sop(f_sop), .in_eop(f_eop), .in_data(f_data),
      .free_words((FLW+1)'(FR_DEPTH) - fr_level),
      .out_valid(c_valid), .out_sop(c_sop), .out_eop(c_eop), .out_data(c_data),
      .admitted(c_adm), .dropped(c_drop));

    // frame FIFO
    st_beat_t    q_out;
    logic        q_valid, q_ready, q_in_ready, q_ovf;
    sync_fifo #(.W(ST_W), .DEPTH(FR_DEPTH)) u_fr_fifo (
      .clk, .rst, .in_valid(c_valid), .in_ready(q_in_ready), .in_data({c_sop, c_eop, c_data}),
      .out_valid(q_valid), .out_ready(q_ready), .out_data(q_out), .level(fr_level), .overflow(q_ovf));

    // descriptor RAM and DMA
    logic [DAW-1:0] d_addr;
    logic           d_we;
    logic [63:0]    d_wdata, d_rdata;
    onchip_ram #(.DEPTH(DESC_DEPTH)) u_desc (
      .clk, .a_addr(ram_addr[c]), .a_we(ram_we[c]), .a_wdata(ram_wdata), .a_rdata(ram_rdata[c]),
      .b_addr(d_addr), .b_we(d_we), .b_wdata(d_wdata), .b_rdata(d_rdata));

    sg_dma #(.DAW(DAW)) u_dma (
      .clk, .rst,
      .in_valid(q_valid), .in_ready(q_ready), .in_sop(q_out.sop), .in_eop(q_out.eop), .in_data(q_out.data),
      .csr_addr, .csr_write(csr_write[c]), .csr_writedata(csr_wdata), .csr_read(csr_read[c]),
      .csr_readdata(csr_rdata[c]),
      .d_addr, .d_we, .d_wdata, .d_rdata,
      .m_write(dm_write[c]), .m_address(dm_address[c]), .m_writedata(dm_writedata[c]),
      .m_waitrequest(dm_wait[c]), .irq(irq[c]));

    assign chan_status[c] = {c_drop[15:0], f_bad[15:0], 16'(fr_level), 14'd0, i_ovf, q_ovf};
  end

  logic [$clog2(NCH > 1 ? NCH : 2)-1:0] txm_master;
  write_arbiter #(.NM(NCH)) u_arb (
    .clk, .rst, .m_write(dm_write), .m_address(dm_address), .m_writedata(dm_writedata),
    .m_waitrequest(dm_wait), .s_write(txm_write), .s_address(txm_address),
    .s_writedata(txm_writedata), .s_master(txm_master), .s_waitrequest(txm_waitrequest));
endmodule
