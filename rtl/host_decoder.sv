// host_decoder: address decoder for host accesses arriving from the PCIe endpoint's BAR
// master, plus the per-channel control/status registers.
//
// Byte address map (16-bit offset inside the BAR; the RAM and DMA bases follow the board's
// address map, the second DMA's and the channel registers' placement is this design's):
//   0x4000-0x4FFF  descriptor RAM of channel 0 (64-bit words)
//   0x6000-0x6FFF  descriptor RAM of channel 1
//   0x5000-0x501F  DMA registers of channel 0 (4 x 8 bytes)
//   0x5020-0x503F  DMA registers of channel 1
//   0x5400 + 16*c  channel c control: {keep_every[31:16], pattern_sel[0]}   (read/write)
//   0x5408 + 16*c  channel c status:  {flow drops[63:48], frame-filter bad words[47:32],
//                  frame FIFO level[31:16], input FIFO overflow[1], frame FIFO overflow[0]}
// Reads return h_rdata with h_rdvalid one clock after h_read; writes complete at once.
module host_decoder #(
  parameter int NCH = 2,
  parameter int DAW = 9
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [15:0]              h_addr,
  input  logic                     h_write,
  input  logic [63:0]              h_wdata,
  input  logic                     h_read,
  output logic [63:0]              h_rdata,
  output logic                     h_rdvalid,
  // descriptor RAM port A per channel
  output logic [NCH-1:0][DAW-1:0]  ram_addr,
  output logic [NCH-1:0]           ram_we,
  output logic [63:0]              ram_wdata,
  input  logic [NCH-1:0][63:0]     ram_rdata,
  // DMA register slave per channel
  output logic [1:0]               csr_addr,
  output logic [NCH-1:0]           csr_write,
  output logic [NCH-1:0]           csr_read,
  output logic [31:0]              csr_wdata,
  input  logic [NCH-1:0][31:0]     csr_rdata,
  // channel registers
  output logic [NCH-1:0]           pattern_sel,
  output logic [NCH-1:0][15:0]     keep_every,
  input  logic [NCH-1:0][63:0]     chan_status
);
  // decode: which target and which channel
  typedef enum logic [1:0] {T_NONE, T_RAM, T_DMA, T_CHAN} target_e;
  target_e tgt, rd_tgt;
  int      ch;
  logic [$clog2(NCH+1)-1:0] rd_ch;

  always_comb begin
    tgt = T_NONE;
    ch  = 0;
    if (h_addr[15:12] == 4'h4)      begin tgt = T_RAM;  ch = 0; end
    else if (h_addr[15:12] == 4'h6) begin tgt = T_RAM;  ch = 1; end
    else if (h_addr[15:8] == 8'h50 && int'(h_addr[7:5]) < NCH) begin tgt = T_DMA; ch = int'(h_addr[7:5]); end
    else if (h_addr[15:8] == 8'h54 && int'(h_addr[7:4]) < NCH) begin tgt = T_CHAN; ch = int'(h_addr[7:4]); end
    if (ch >= NCH) tgt = T_NONE;
  end

  assign ram_wdata = h_wdata;
  assign csr_addr  = h_addr[4:3];
  assign csr_wdata = h_wdata[31:0];

  always_comb begin
    for (int c = 0; c < NCH; c++) begin
      ram_addr[c]  = h_addr[DAW+2:3];
      ram_we[c]    = h_write && tgt == T_RAM  && ch == c;
      csr_write[c] = h_write && tgt == T_DMA  && ch == c;
      csr_read[c]  = h_read  && tgt == T_DMA  && ch == c;
    end
  end

  logic [63:0] chan_q;
  always_ff @(posedge clk) begin
    if (rst) begin
      pattern_sel <= '0;
      for (int c = 0; c < NCH; c++) keep_every[c] <= 16'd1;
      h_rdvalid <= 1'b0;
      rd_tgt    <= T_NONE;
      rd_ch     <= '0;
      chan_q    <= '0;
    end else begin
      if (h_write && tgt == T_CHAN && !h_addr[3]) begin
        pattern_sel[ch] <= h_wdata[0];
        keep_every[ch]  <= h_wdata[31:16];
      end
      h_rdvalid <= h_read;
      rd_tgt    <= h_read ? tgt : T_NONE;
      rd_ch     <= ($clog2(NCH+1))'(ch);
      chan_q    <= h_addr[3] ? chan_status[ch]
                             : {32'd0, keep_every[ch], 15'd0, pattern_sel[ch]};
    end
  end

  always_comb begin
    unique case (rd_tgt)
      T_RAM:   h_rdata = ram_rdata[rd_ch];
      T_DMA:   h_rdata = {32'd0, csr_rdata[rd_ch]};
      T_CHAN:  h_rdata = chan_q;
      default: h_rdata = '0;
    endcase
  end
endmodule
