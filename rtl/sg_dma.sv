// sg_dma: scatter-gather DMA controller of one PCIe-board channel.
//
// It moves the frame stream out of the frame FIFO into host memory, through the write port of
// the PCIe endpoint, following a chain of descriptors held in the channel's descriptor RAM.
// Each descriptor (two 64-bit words, layout in bao_pkg) gives a destination address, a buffer
// length in 64-bit words, the index of the next descriptor and an OWNED_BY_HW flag. For each
// owned descriptor the controller writes stream words to consecutive addresses until the
// buffer is full or a word with end-of-packet has been written, then writes back the
// descriptor's second word with OWNED_BY_HW cleared, the number of words written and whether
// the frame ended, raises the interrupt (if enabled) and follows the next index. It stops at
// the first descriptor that is not owned, so the host hands buffers over by setting the flag.
// The descriptor read, descriptor write and data write masters, the stream sink and the
// control/status slave are the ones of the scatter-gather DMA in the source material; the
// descriptor layout and register map are this design's own.
// Registers (64-bit bus, index = csr_addr): 0 control {irq_en[1], run[0]};
// 1 first descriptor index; 2 status {chain_end[2], irq[1], busy[0]} (write 1 to bit 1 to
// clear the interrupt); 3 number of descriptors completed. Reads return data one clock later.
// Unused bits of the descriptor status word and of the registers read as zero, so some
// output bits are constant by design.
// Timing: 3 clocks to fetch a descriptor, then one word per clock while the endpoint does
// not assert waitrequest, then 1 clock of write-back.
module sg_dma
  import bao_pkg::*;
#(
  parameter int DAW = 9              // descriptor RAM address bits (64-bit words)
) (
  input  logic           clk,
  input  logic           rst,
  // frame stream in
  input  logic           in_valid,
  output logic           in_ready,
  input  logic           in_sop,
  input  logic           in_eop,
  input  logic [63:0]    in_data,
  // control / status slave
  input  logic [1:0]     csr_addr,
  input  logic           csr_write,
  input  logic [31:0]    csr_writedata,
  input  logic           csr_read,
  output logic [31:0]    csr_readdata,
  // descriptor RAM port (read latency 1)
  output logic [DAW-1:0] d_addr,
  output logic           d_we,
  output logic [63:0]    d_wdata,
  input  logic [63:0]    d_rdata,
  // data write master toward the PCIe endpoint
  output logic           m_write,
  output logic [31:0]    m_address,
  output logic [63:0]    m_writedata,
  input  logic           m_waitrequest,
  output logic           irq
);
  typedef enum logic [2:0] {S_IDLE, S_RD0, S_RD1, S_CHK, S_XFER, S_WB} state_e;
  state_e state;

  logic        run, irq_en, irq_pend, chain_end;
  logic [31:0] first_ptr, done_cnt;
  logic [DAW-2:0] ptr;
  logic [63:0] w0;
  logic [15:0] len, cnt;
  logic        eop_seen;

  wire taken_all = (cnt == len) || eop_seen;
  wire pend_done = m_write && !m_waitrequest;

  assign in_ready = (state == S_XFER) && !taken_all && (!m_write || !m_waitrequest);
  assign irq      = irq_pend && irq_en;

  always_comb begin
    d_we    = 1'b0;
    d_wdata = desc_word1(1'b0, eop_seen, cnt, len);
    unique case (state)
      S_RD0:   d_addr = {ptr, 1'b0};
      S_WB:    begin d_addr = {ptr, 1'b1}; d_we = 1'b1; end
      default: d_addr = {ptr, 1'b1};
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE; run <= 1'b0; irq_en <= 1'b0; irq_pend <= 1'b0; chain_end <= 1'b0;
      first_ptr <= '0; done_cnt <= '0; ptr <= '0; w0 <= '0; len <= '0; cnt <= '0;
      eop_seen <= 1'b0; m_write <= 1'b0; m_address <= '0; m_writedata <= '0;
      csr_readdata <= '0;
    end else begin
      // register slave
      if (csr_write) begin
        unique case (csr_addr)
          2'd0: begin
            run    <= csr_writedata[0];
            irq_en <= csr_writedata[1];
            if (csr_writedata[0]) chain_end <= 1'b0;
          end
          2'd1: first_ptr <= csr_writedata;
          2'd2: if (csr_writedata[1]) irq_pend <= 1'b0;
          default: ;
        endcase
      end
      if (csr_read) begin
        unique case (csr_addr)
          2'd0: csr_readdata <= {30'd0, irq_en, run};
          2'd1: csr_readdata <= first_ptr;
          2'd2: csr_readdata <= {29'd0, chain_end, irq_pend, state != S_IDLE};
          default: csr_readdata <= done_cnt;
        endcase
      end

      if (pend_done) m_write <= 1'b0;

      unique case (state)
        S_IDLE: if (run && !(csr_write && csr_addr == 2'd0)) begin
                  ptr   <= first_ptr[DAW-2:0];
                  state <= S_RD0;
                end
        S_RD0:  state <= S_RD1;
        S_RD1:  begin w0 <= d_rdata; state <= S_CHK; end
        S_CHK:  begin
                  len      <= d_rdata[15:0];
                  cnt      <= '0;
                  eop_seen <= 1'b0;
                  if (d_rdata[D_OWNED]) state <= S_XFER;
                  else begin chain_end <= 1'b1; run <= 1'b0; state <= S_IDLE; end
                end
        S_XFER: begin
                  if (in_valid && in_ready) begin
                    m_write     <= 1'b1;
                    m_address   <= w0[31:0] + {13'd0, cnt, 3'd0};
                    m_writedata <= in_data;
                    cnt         <= cnt + 1'b1;
                    if (in_eop) eop_seen <= 1'b1;
                  end else if (taken_all && (!m_write || pend_done)) begin
                    state <= S_WB;
                  end
                end
        S_WB:   begin
                  ptr      <= w0[32 +: DAW-1];
                  done_cnt <= done_cnt + 1;
                  irq_pend <= 1'b1;
                  state    <= run ? S_RD0 : S_IDLE;
                end
        default: state <= S_IDLE;
      endcase
    end
  end

  // the stream must not advance on a word the controller did not take
  a_write_hold: assert property (@(posedge clk) disable iff (rst)
      (m_write && m_waitrequest) |=> (m_write && $stable(m_address) && $stable(m_writedata)))
    else $error("write master changed a pending write");
endmodule
