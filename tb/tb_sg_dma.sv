// tb_sg_dma: a chain of three owned descriptors and one that is not owned is written into a
// descriptor RAM model; frames of 10 words (eop on the last) stream in. Buffer 0 (16 words)
// must end at the frame's eop, buffer 1 (6 words) must fill up mid-frame, buffer 2 takes the
// rest of that frame. Checked: every word lands at its address in a host memory model behind
// random waitrequest, descriptors are written back with OWNED cleared, the right count and EOP
// flag, the interrupt rises, the chain stops at the unowned descriptor, and the registers read
// back.
`include "tb_util.svh"
module tb_sg_dma;
  import bao_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  `TB_WATCHDOG(clk, 5000)

  logic in_valid = 0, in_ready, in_sop = 0, in_eop = 0;
  logic [63:0] in_data = 0;
  logic [1:0] csr_addr = 0;
  logic csr_write = 0, csr_read = 0;
  logic [31:0] csr_writedata = 0, csr_readdata;
  logic [8:0] d_addr;
  logic d_we;
  logic [63:0] d_wdata, d_rdata;
  logic m_write, m_waitrequest = 0, irq;
  logic [31:0] m_address;
  logic [63:0] m_writedata;
  sg_dma dut (.*);

  // descriptor RAM model (read latency 1)
  logic [63:0] dram [512];
  always @(posedge clk) begin
    if (d_we) dram[d_addr] <= d_wdata;
    d_rdata <= dram[d_addr];
  end
  // host memory model
  logic [63:0] host [int];
  always @(posedge clk) begin
    m_waitrequest <= ($urandom_range(3) == 0);
    if (m_write && !m_waitrequest) host[int'(m_address)] = m_writedata;
  end

  task automatic csr_wr(int a, int v);
    csr_addr <= 2'(a); csr_writedata <= 32'(v); csr_write <= 1; @(posedge clk);
    csr_write <= 0; @(posedge clk);
  endtask
  task automatic csr_rd(int a, output int v);
    csr_addr <= 2'(a); csr_read <= 1; @(posedge clk); csr_read <= 0; @(posedge clk);
    v = int'(csr_readdata);
  endtask

  // source: frames of 10 words, word value = 100*frame + index
  int src_f = 0, src_j = 0;
  always @(posedge clk) if (!rst) begin
    if (in_valid && in_ready) begin
      if (src_j == 9) begin src_j = 0; src_f++; end else src_j++;
    end
    in_valid <= (src_f < 2);
    in_sop   <= (src_j == 0);
    in_eop   <= (src_j == 9);
    in_data  <= 64'(100 * src_f + src_j);
  end
  // keep valid/data consistent with what was accepted: recompute after an acceptance
  // (the source above presents the word for (src_f, src_j) computed at the previous edge)

  int v, irq_seen = 0;
  always @(posedge clk) if (irq) irq_seen++;

  initial begin
    foreach (dram[i]) dram[i] = '0;
    // descriptors at indices 3 -> 7 -> 1 -> 5 (5 not owned)
    dram[6]  = desc_word0(7, 32'h1000);  dram[7]  = desc_word1(1, 0, 0, 16);
    dram[14] = desc_word0(1, 32'h2000);  dram[15] = desc_word1(1, 0, 0, 6);
    dram[2]  = desc_word0(5, 32'h3000);  dram[3]  = desc_word1(1, 0, 0, 16);
    dram[10] = desc_word0(0, 32'h4000);  dram[11] = desc_word1(0, 0, 0, 16);
    repeat (3) @(posedge clk); rst <= 0; @(posedge clk);
    csr_wr(1, 3);
    csr_wr(0, 3);                 // run, irq enable
    repeat (200) @(posedge clk);
    // buffer 0: frame 0, 10 words, ended by eop
    for (int j = 0; j < 10; j++)
      `TB_CHECK(host.exists(32'h1000 + 8 * j) && host[32'h1000 + 8 * j] == 64'(j), $sformatf("buf0 word %0d", j))
    `TB_CHECK(!host.exists(32'h1000 + 80), "buf0 stops at eop")
    `TB_CHECK(dram[7] == desc_word1(0, 1, 10, 16), $sformatf("desc 3 status %h", dram[7]))
    for (int j = 0; j < 6; j++)
      `TB_CHECK(host.exists(32'h2000 + 8 * j) && host[32'h2000 + 8 * j] == 64'(100 + j), $sformatf("buf1 word %0d", j))
    `TB_CHECK(dram[15] == desc_word1(0, 0, 6, 6), "desc 7 full, no eop")
    for (int j = 0; j < 4; j++)
      `TB_CHECK(host.exists(32'h3000 + 8 * j) && host[32'h3000 + 8 * j] == 64'(106 + j), $sformatf("buf2 word %0d", j))
    `TB_CHECK(dram[3] == desc_word1(0, 1, 4, 16), "desc 1 ends at eop")
    `TB_CHECK(dram[11] == desc_word1(0, 0, 0, 16), "unowned descriptor untouched")
    `TB_CHECK(host.size() == 20, $sformatf("20 words written, got %0d", host.size()))
    `TB_CHECK(irq_seen > 0, "interrupt raised")
    csr_rd(3, v); `TB_CHECK(v == 3, "3 descriptors completed")
    csr_rd(2, v); `TB_CHECK(v == 32'b110, "status: chain end, irq, idle")
    csr_wr(2, 2);
    csr_rd(2, v); `TB_CHECK(v == 32'b100, "irq cleared")
    csr_rd(0, v); `TB_CHECK(v == 32'b10, "run cleared at chain end")
    `TB_CHECK(!irq, "irq low")
    `TB_FINISH
  end
endmodule
