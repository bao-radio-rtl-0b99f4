// tb_pcie_fpga: the PCIe-board FPGA at reduced sizes (frames of 8 data words, 64-word frame
// FIFO). Channel 0 receives link frames with a stray word injected between two of them;
// channel 1 is switched to the test pattern, keeping one frame in two. The host programs
// descriptor chains through the BAR port (six buffers for channel 0, three for channel 1) and
// starts both DMAs. Checked: channel 0's buffers hold its frames word for word, each
// descriptor is written back (not owned, 9 words, end of frame); channel 1's buffers hold
// pattern frames two frame numbers apart; once channel 1's chain ends its FIFO fills and
// flow control drops frames; the stray word is counted; the DMAs contend for the endpoint.
`include "tb_util.svh"
module tb_pcie_fpga;
  import bao_pkg::*;
  localparam int NW = 8;
  logic clk = 0, rst = 1;
  always #4 clk = ~clk;
  int checks = 0, failures = 0;
  `TB_WATCHDOG(clk, 20000)

  logic [1:0] rx_valid = 0, rx_sop = 0, rx_eop = 0;
  logic [1:0][63:0] rx_data = '0;
  logic [15:0] h_addr = 0;
  logic h_write = 0, h_read = 0, h_rdvalid;
  logic [63:0] h_wdata = 0, h_rdata;
  logic txm_write, txm_waitrequest = 0;
  logic [31:0] txm_address;
  logic [63:0] txm_writedata;
  logic [1:0] irq;
  pcie_fpga #(.NCH(2), .IN_DEPTH(32), .FR_DEPTH(64), .MAXFRAME(NW + 2), .PAT_WORDS(NW), .PAT_GAP(4))
    dut (.*);

  // host memory behind the endpoint
  logic [63:0] host [int];
  int contention = 0, irq_seen [2];
  always @(posedge clk) begin
    txm_waitrequest <= ($urandom_range(3) == 0);
    if (txm_write && !txm_waitrequest) host[int'(txm_address)] = txm_writedata;
    if (dut.dm_write == 2'b11) contention++;
    for (int c = 0; c < 2; c++) if (irq[c]) irq_seen[c]++;
  end

  task automatic hwr(int a, logic [63:0] d);
    h_addr <= 16'(a); h_wdata <= d; h_write <= 1; @(posedge clk); h_write <= 0; @(posedge clk);
  endtask
  task automatic hrd(int a, output logic [63:0] d);
    h_addr <= 16'(a); h_read <= 1; @(posedge clk); h_read <= 0; @(negedge clk);
    d = h_rdata; @(posedge clk);
  endtask

  task automatic send_word(logic [63:0] d, bit sop, bit eop);
    rx_valid[0] <= 1; rx_sop[0] <= sop; rx_eop[0] <= eop; rx_data[0] <= d; @(posedge clk);
  endtask
  task automatic rx_idle(int n);
    rx_valid[0] <= 0; rx_sop[0] <= 0; rx_eop[0] <= 0; repeat (n) @(posedge clk);
  endtask

  logic [63:0] d;
  initial begin
    repeat (3) @(posedge clk); rst <= 0; @(posedge clk);
    // descriptor chains: channel 0 at 0x4000, channel 1 at 0x6000
    for (int i = 0; i < 7; i++) begin
      hwr('h4000 + 16 * i, desc_word0(32'(i + 1), 32'h10000 + 32'h1000 * i));
      hwr('h4008 + 16 * i, desc_word1(i < 6, 0, 0, 16));
    end
    for (int i = 0; i < 4; i++) begin
      hwr('h6000 + 16 * i, desc_word0(32'(i + 1), 32'h80000 + 32'h1000 * i));
      hwr('h6008 + 16 * i, desc_word1(i < 3, 0, 0, 16));
    end
    hwr('h5410, 64'h0002_0001);      // channel 1: pattern, keep one frame in two
    hwr('h5008, 0); hwr('h5028, 0);
    hwr('h5000, 3); hwr('h5020, 3);
    for (int f = 0; f < 6; f++) begin
      send_word(link_header(32'(f), 16'(NW)), 1, 0);
      for (int j = 0; j < NW; j++) send_word({16'hC0C0, 16'(f), 32'(j)}, 0, j == NW - 1);
      rx_idle(3);
      if (f == 1) begin send_word(64'hDEAD, 0, 0); rx_idle(2); end
    end
    repeat (600) @(posedge clk);
    // channel 0 buffers
    for (int f = 0; f < 6; f++) begin
      int b;
      b = 32'h10000 + 32'h1000 * f;
      `TB_CHECK(host.exists(b) && host[b] == link_header(32'(f), 16'(NW)), $sformatf("ch0 buffer %0d header", f))
      for (int j = 0; j < NW; j++)
        `TB_CHECK(host.exists(b + 8 * (j + 1)) && host[b + 8 * (j + 1)] == {16'hC0C0, 16'(f), 32'(j)},
                  $sformatf("ch0 buffer %0d word %0d", f, j))
      `TB_CHECK(!host.exists(b + 8 * (NW + 1)), "buffer ends with the frame")
      hrd('h4008 + 16 * f, d);
      `TB_CHECK(d == desc_word1(0, 1, 16'(NW + 1), 16), $sformatf("ch0 descriptor %0d status %h", f, d))
    end
    hrd('h4008 + 16 * 6, d);
    `TB_CHECK(d[63] == 0 && d[47:32] == 0, "ch0 unowned descriptor untouched")
    // channel 1 buffers: pattern frames, two frame numbers apart
    for (int i = 0; i < 3; i++) begin
      int b;
      b = 32'h80000 + 32'h1000 * i;
      `TB_CHECK(host.exists(b) && is_link_header(host[b]), $sformatf("ch1 buffer %0d header", i))
      if (i > 0 && host.exists(b) && host.exists(b - 32'h1000))
        `TB_CHECK(host[b][47:16] == host[b - 32'h1000][47:16] + 2, "one pattern frame in two kept")
      for (int j = 0; j < NW; j++)
        `TB_CHECK(host.exists(b + 8 * (j + 1)) && host[b + 8 * (j + 1)] == {host[b][47:16], 32'(j)},
                  $sformatf("ch1 buffer %0d word %0d", i, j))
    end
    hrd('h5418, d);
    `TB_CHECK(d[63:48] > 0, $sformatf("ch1 flow control dropped frames (%0d)", d[63:48]))
    `TB_CHECK(d[1:0] == 0, "ch1 FIFOs never overflowed")
    hrd('h5408, d);
    `TB_CHECK(d[47:32] == 1, $sformatf("ch0 stray word counted (%0d)", d[47:32]))
    `TB_CHECK(d[63:48] == 0, "ch0 dropped nothing")
    hrd('h5010, d);
    `TB_CHECK(d[2:0] == 3'b110, "ch0 DMA: chain end, irq, idle")
    hrd('h5038, d);
    `TB_CHECK(d == 3, "ch1 DMA completed 3 descriptors")
    `TB_CHECK(irq_seen[0] > 0 && irq_seen[1] > 0, "interrupts")
    `TB_CHECK(contention > 0, $sformatf("DMA write contention (%0d clocks)", contention))
    `TB_FINISH
  end
endmodule
