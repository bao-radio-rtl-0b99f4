// tb_write_arbiter: two masters issue write bursts (Avalon-MM: hold until waitrequest is low)
// into a slave with random waitrequest. Every write must reach the slave exactly once with its
// own address and data, each master's writes in order, and a master that is waiting when
// the other completes a write must get the next one.
`include "tb_util.svh"
module tb_write_arbiter;
  localparam int NW = 300;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  `TB_WATCHDOG(clk, 20000)

  logic [1:0] m_write = 0, m_waitrequest;
  logic [1:0][31:0] m_address = '0;
  logic [1:0][63:0] m_writedata = '0;
  logic s_write, s_waitrequest = 0, s_master;
  logic [31:0] s_address;
  logic [63:0] s_writedata;
  write_arbiter #(.NM(2)) dut (.*);

  int sent [2], recv [2], switches = 0, last = -1, both_busy = 0, expect_next = -1;

  // masters
  for (genvar g = 0; g < 2; g++) begin : g_m
    initial begin
      @(negedge rst);
      while (sent[g] < NW) begin
        m_write[g] <= 1; m_address[g] <= 32'(g * 1000 + sent[g]);
        m_writedata[g] <= {32'(g), 32'(sent[g])};
        @(posedge clk);
        while (m_waitrequest[g]) @(posedge clk);
        sent[g]++;
        if ($urandom_range(3) == 0) begin m_write[g] <= 0; @(posedge clk); end
      end
      m_write[g] <= 0;
    end
  end

  // slave
  always @(posedge clk) begin
    s_waitrequest <= ($urandom_range(2) == 0);
    if (!rst && s_write && !s_waitrequest) begin
      int g;
      g = int'(s_writedata[63:32]);
      `TB_CHECK(s_address == 32'(g * 1000 + recv[g]) && s_writedata[31:0] == 32'(recv[g]),
                $sformatf("master %0d write %0d", g, recv[g]))
      `TB_CHECK(int'(s_master) == g, "s_master tells the owner")
      recv[g]++;
      if (expect_next >= 0)
        `TB_CHECK(g == expect_next, "round robin: the waiting master goes next")
      expect_next = m_write[1 - g] ? 1 - g : -1;
      if (last >= 0 && last != g) switches++;
      last = g;
    end
    if (m_write == 2'b11) both_busy++;
  end

  initial begin
    repeat (3) @(posedge clk); rst <= 0;
    wait (recv[0] == NW && recv[1] == NW);
    repeat (3) @(posedge clk);
    `TB_CHECK(switches > NW / 2, $sformatf("grant alternates (%0d switches)", switches))
    `TB_CHECK(both_busy > 0, "contention happened")
    `TB_FINISH
  end
endmodule
