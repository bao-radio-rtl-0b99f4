// tb_sync_fifo: random traffic through a 16-deep FIFO with random stalls on both sides
// compared with a queue model; fill level checked each clock; writing into a full FIFO must
// set overflow and drop the word. Also runs the 4096-deep default for a full/empty cycle.
`include "tb_util.svh"
module tb_sync_fifo;
  localparam int D = 16;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  `TB_WATCHDOG(clk, 40000)

  logic in_valid = 0, out_ready = 0;
  logic in_ready, out_valid, overflow;
  logic [65:0] in_data = 0, out_data;
  logic [$clog2(D):0] level;
  sync_fifo #(.W(66), .DEPTH(D)) dut (.*);

  logic in_valid2 = 0, out_ready2 = 0, in_ready2, out_valid2, overflow2;
  logic [65:0] in_data2 = 0, out_data2;
  logic [12:0] level2;
  sync_fifo dut_big (.clk, .rst, .in_valid(in_valid2), .in_ready(in_ready2), .in_data(in_data2),
    .out_valid(out_valid2), .out_ready(out_ready2), .out_data(out_data2), .level(level2),
    .overflow(overflow2));

  logic [65:0] q [$];
  int nread = 0;
  always @(posedge clk) if (!rst) begin
    if (out_valid && out_ready) begin
      `TB_CHECK(q.size() > 0 && out_data == q[0], "data order")
      if (q.size() > 0) void'(q.pop_front());
      nread++;
    end
    if (in_valid && in_ready) q.push_back(in_data);
  end

  initial begin
    repeat (3) @(posedge clk); rst <= 0; @(posedge clk);
    for (int i = 0; i < 3000; i++) begin
      in_valid  <= ($urandom_range(99) < (i < 1500 ? 70 : 30));
      out_ready <= ($urandom_range(99) < (i < 1500 ? 30 : 70));
      in_data   <= {2'($urandom), $urandom, $urandom};
      @(posedge clk);
      #1 `TB_CHECK(int'(level) == q.size(), $sformatf("level %0d vs %0d", level, q.size()))
      `TB_CHECK(in_ready == (q.size() - int'(out_valid) < D), "ready follows room")
    end
    in_valid <= 0; out_ready <= 1;
    repeat (D + 4) @(posedge clk);
    `TB_CHECK(!out_valid && level == 0, "drained")
    // overflow: fill and push one more
    out_ready <= 0;
    for (int i = 0; i < D + 2; i++) begin in_valid <= 1; in_data <= 66'(i); @(posedge clk); end
    in_valid <= 0; @(posedge clk); #1;
    `TB_CHECK(overflow, "overflow flagged")
    `TB_CHECK(int'(level) == D + 1, "full: array plus output register")
    // default size: fill completely, then drain
    for (int i = 0; i < 4200; i++) begin in_valid2 <= 1; in_data2 <= 66'(i); @(posedge clk); end
    in_valid2 <= 0; @(posedge clk); #1;
    `TB_CHECK(level2 == 4097 && overflow2, "default depth 4096 (+1 output register)")
    out_ready2 <= 1;
    for (int i = 0; i < 4097; i++) begin
      @(posedge clk); #1;
      if (i < 4096) `TB_CHECK(!out_valid2 || out_data2 == 66'(i + 1), "big fifo order")
    end
    `TB_FINISH
  end
endmodule
