// tb_onchip_ram: writes through both ports, reads back through the other, checks the one
// clock read latency and that port B wins a same-address write collision.
`include "tb_util.svh"
module tb_onchip_ram;
  localparam int D = 512;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  `TB_WATCHDOG(clk, 10000)
  logic [8:0] a_addr = 0, b_addr = 0;
  logic a_we = 0, b_we = 0;
  logic [63:0] a_wdata = 0, b_wdata = 0, a_rdata, b_rdata;
  onchip_ram #(.DEPTH(D)) dut (.*);
  logic [63:0] m [D];
  initial begin
    for (int i = 0; i < D; i++) begin
      m[i] = {$urandom, $urandom};
      a_we <= (i % 2 == 1); a_addr <= 9'(i); a_wdata <= m[i];
      b_we <= (i % 2 == 0); b_addr <= 9'(i); b_wdata <= m[i];
      @(posedge clk);
    end
    a_we <= 0; b_we <= 0;
    for (int i = 0; i < D; i++) begin
      a_addr <= 9'(i); b_addr <= 9'(D - 1 - i);
      @(posedge clk); @(negedge clk);
      `TB_CHECK(a_rdata == m[i] && b_rdata == m[D-1-i], $sformatf("read %0d %h %h %h %h", i, a_rdata, m[i], b_rdata, m[D-1-i]))
    end
    a_we <= 1; b_we <= 1; a_addr <= 5; b_addr <= 5; a_wdata <= 64'hA; b_wdata <= 64'hB;
    @(posedge clk); a_we <= 0; b_we <= 0; @(posedge clk); @(negedge clk);
    `TB_CHECK(a_rdata == 64'hB, "port B wins")
    `TB_FINISH
  end
endmodule
