// tb_link_framer: drives two lockstep channels with frames of N/4+1 bin pairs (N = 32) and
// checks the link stream: one header {magic, frame number, N/4+1} per frame, then the data
// words {ch1 xb, ch1 xa, ch0 xb, ch0 xa} in order with eop on the last; then a channel that
// falls out of step must raise lock_err.
`include "tb_util.svh"
module tb_link_framer;
  import bao_pkg::*;
  localparam int N = 32, NW = N / 4 + 1, NF = 3;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  `TB_WATCHDOG(clk, 2000)

  logic [1:0] x_valid = 0, x_sof = 0, x_eof = 0;
  cbin_t [1:0] xa = '0, xb = '0;
  logic link_valid, link_sop, link_eop, lock_err;
  logic [63:0] link_data;
  logic [31:0] frame_no;
  link_framer #(.N(N)) dut (.*);

  logic [63:0] exp_q [$];
  int nwords = 0;
  bit mon = 1;
  always @(posedge clk) if (!rst && mon && link_valid) begin
    logic [63:0] e;
    `TB_CHECK(exp_q.size() > 0, "unexpected word")
    if (exp_q.size() > 0) begin
      e = exp_q.pop_front();
      `TB_CHECK(link_data == e, $sformatf("word %h want %h", link_data, e))
      `TB_CHECK(link_sop == is_link_header(e), "sop flag")
      `TB_CHECK(link_eop == (exp_q.size() == 0 || is_link_header(exp_q[0])), "eop flag")
    end
    nwords++;
  end

  initial begin
    repeat (3) @(posedge clk); rst <= 0; @(posedge clk);
    for (int f = 0; f < NF; f++) begin
      exp_q.push_back({LINK_MAGIC, 32'(f), 16'(NW)});
      for (int j = 0; j < NW; j++) begin
        logic [63:0] w;
        w = {$urandom, $urandom};
        exp_q.push_back(w);
        x_valid <= 2'b11; x_sof <= {2{j == 0}}; x_eof <= {2{j == NW - 1}};
        {xb[1], xa[1], xb[0], xa[0]} <= w;
        @(posedge clk);
      end
      x_valid <= 0; x_sof <= 0; x_eof <= 0;
      repeat (N / 4 - 1) @(posedge clk);       // the idle gap of a post-processor frame
    end
    repeat (3) @(posedge clk);
    `TB_CHECK(exp_q.size() == 0 && nwords == NF * (NW + 1), "all words sent")
    `TB_CHECK(!lock_err && frame_no == NF, "in step, frame count")
    mon = 0;
    x_valid <= 2'b01; @(posedge clk); x_valid <= 0; @(posedge clk); @(posedge clk);
    `TB_CHECK(lock_err, "lock error flagged")
    `TB_FINISH
  end
endmodule
