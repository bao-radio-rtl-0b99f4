// tb_rfft_bram: writes random words to the whole RAM (N/4 = 2048 x 16 bits) and reads them
// back with one clock of latency, also reading while another address is written.
`include "tb_util.svh"
module tb_rfft_bram;
  localparam int D = 2048, AW = 11;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  `TB_WATCHDOG(clk, 20000)
  logic we = 0, re = 0;
  logic [AW-1:0] waddr = 0, raddr = 0;
  logic [15:0] wdata = 0, rdata;
  rfft_bram #(.DEPTH(D), .W(16)) dut (.*);
  logic [15:0] model [D];
  initial begin
    for (int i = 0; i < D; i++) begin
      model[i] = 16'($urandom);
      we <= 1; waddr <= AW'(i); wdata <= model[i]; @(posedge clk);
    end
    we <= 0;
    for (int i = 0; i < D; i++) begin
      automatic int j = D - 1 - i;
      re <= 1; raddr <= AW'(j);
      we <= 1; waddr <= AW'(i); wdata <= ~model[i];    // write elsewhere at the same time
      @(posedge clk);
      re <= 0; we <= 0;
      @(negedge clk);
      `TB_CHECK(rdata == model[j], $sformatf("read %0d", j))
      model[i] = ~model[i];                            // model follows the RAM contents
    end
    `TB_FINISH
  end
endmodule
