// tb_host_decoder: host writes and reads to each region of the address map reach the right
// target (descriptor RAM, DMA registers, channel registers) with one clock of read latency,
// and unmapped addresses read as zero.
`include "tb_util.svh"
module tb_host_decoder;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  `TB_WATCHDOG(clk, 3000)

  logic [15:0] h_addr = 0;
  logic h_write = 0, h_read = 0, h_rdvalid;
  logic [63:0] h_wdata = 0, h_rdata;
  logic [1:0][8:0] ram_addr;
  logic [1:0] ram_we, csr_write, csr_read, pattern_sel;
  logic [63:0] ram_wdata;
  logic [1:0][63:0] ram_rdata, chan_status;
  logic [1:0] csr_addr;
  logic [31:0] csr_wdata;
  logic [1:0][31:0] csr_rdata;
  logic [1:0][15:0] keep_every;
  host_decoder #(.NCH(2), .DAW(9)) dut (.*);

  // target models
  logic [63:0] ram [2][512];
  logic [31:0] regs [2][4];
  always @(posedge clk) for (int c = 0; c < 2; c++) begin
    if (ram_we[c]) ram[c][ram_addr[c]] <= ram_wdata;
    ram_rdata[c] <= ram[c][ram_addr[c]];
    if (csr_write[c]) regs[c][csr_addr] <= csr_wdata;
    if (csr_read[c]) csr_rdata[c] <= regs[c][csr_addr];
  end
  assign chan_status[0] = 64'h0123_4567_89AB_CDEF;
  assign chan_status[1] = 64'hFEDC_BA98_7654_3210;

  task automatic wr(int a, logic [63:0] d);
    h_addr <= 16'(a); h_wdata <= d; h_write <= 1; @(posedge clk); h_write <= 0; @(posedge clk);
  endtask
  task automatic rd(int a, output logic [63:0] d);
    h_addr <= 16'(a); h_read <= 1; @(posedge clk); h_read <= 0;
    @(negedge clk);
    `TB_CHECK(h_rdvalid, "read data valid one clock later")
    d = h_rdata; @(posedge clk);
  endtask

  logic [63:0] d;
  initial begin
    repeat (3) @(posedge clk); rst <= 0; @(posedge clk);
    wr('h4000 + 8 * 5, 64'hAAAA);
    wr('h6000 + 8 * 5, 64'hBBBB);
    wr('h5008, 64'h11);           // DMA ch0 reg 1
    wr('h5028, 64'h22);           // DMA ch1 reg 1
    wr('h5410, 64'h0003_0001);    // ch1: keep 3, pattern
    `TB_CHECK(ram[0][5] == 64'hAAAA && ram[1][5] == 64'hBBBB, "RAM writes routed")
    `TB_CHECK(regs[0][1] == 32'h11 && regs[1][1] == 32'h22, "DMA register writes routed")
    `TB_CHECK(pattern_sel == 2'b10 && keep_every[1] == 3 && keep_every[0] == 1, "channel registers")
    rd('h4028, d); `TB_CHECK(d == 64'hAAAA, "RAM 0 read")
    rd('h6028, d); `TB_CHECK(d == 64'hBBBB, "RAM 1 read")
    rd('h5028, d); `TB_CHECK(d == 64'h22, "DMA 1 register read")
    rd('h5418, d); `TB_CHECK(d == chan_status[1], "status 1 read")
    rd('h5410, d); `TB_CHECK(d == 64'h0003_0001, "control 1 read back")
    rd('h7000, d); `TB_CHECK(d == 0, "unmapped reads zero")
    `TB_FINISH
  end
endmodule
