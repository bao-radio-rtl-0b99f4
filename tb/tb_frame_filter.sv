// tb_frame_filter: a stream of good frames, a frame without magic, stray words between
// frames and a frame cut short by a new header is sent; the filter must pass the good frames
// unchanged, count the bad words, close the cut frame with an all-ones end word, and with
// keep_every = 3 pass only one good frame in three.
`include "tb_util.svh"
module tb_frame_filter;
  import bao_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  `TB_WATCHDOG(clk, 3000)

  logic [15:0] keep_every = 1;
  logic in_valid = 0, in_sop = 0, in_eop = 0;
  logic [63:0] in_data = 0;
  logic out_valid, out_sop, out_eop;
  logic [63:0] out_data;
  logic [31:0] bad_words, skipped;
  frame_filter dut (.*);

  logic [63:0] exp_q [$];
  int got_frames = 0;
  always @(posedge clk) if (!rst && out_valid) begin
    `TB_CHECK(exp_q.size() > 0, "unexpected output word")
    if (exp_q.size() > 0) begin
      `TB_CHECK(out_data == exp_q[0], $sformatf("word %h want %h", out_data, exp_q[0]))
      void'(exp_q.pop_front());
    end
    if (out_eop) got_frames++;
  end

  task automatic word(logic [63:0] d, bit sop, bit eop);
    in_valid <= 1; in_data <= d; in_sop <= sop; in_eop <= eop; @(posedge clk);
  endtask
  task automatic idle();
    in_valid <= 0; in_sop <= 0; in_eop <= 0; @(posedge clk);
  endtask
  task automatic frame(int f, int n, bit good, bit expect_out);
    logic [63:0] h;
    h = good ? link_header(32'(f), 16'(n)) : 64'h1234;
    word(h, 1, 0);
    if (expect_out) exp_q.push_back(h);
    for (int j = 0; j < n; j++) begin
      word({32'(f), 32'(j)}, 0, j == n - 1);
      if (expect_out) exp_q.push_back({32'(f), 32'(j)});
    end
    idle();
  endtask

  initial begin
    repeat (3) @(posedge clk); rst <= 0; @(posedge clk);
    frame(0, 5, 1, 1);
    frame(1, 5, 0, 0);                  // no magic: 6 bad words
    word(64'h55, 0, 0); word(64'h66, 0, 1); idle();   // 2 stray words
    frame(2, 5, 1, 1);
    // frame 3 cut: header + 2 words, then a start word without magic closes it
    word(link_header(3, 5), 1, 0); exp_q.push_back(link_header(3, 5));
    word(64'h30, 0, 0); exp_q.push_back(64'h30);
    word(64'h31, 0, 0); exp_q.push_back(64'h31);
    word(64'h77, 1, 0); exp_q.push_back('1);  // 1 bad word, closes frame 3
    idle(); idle();
    `TB_CHECK(bad_words == 9, $sformatf("bad words %0d", bad_words))
    `TB_CHECK(got_frames == 3, "frames 0, 2 and the closed frame 3")
    keep_every <= 3;
    @(posedge clk);
    for (int f = 10; f < 16; f++) frame(f, 3, 1, (f - 10) % 3 == 0);
    repeat (3) @(posedge clk);
    `TB_CHECK(skipped == 4, $sformatf("skipped %0d", skipped))
    `TB_CHECK(got_frames == 5 && exp_q.size() == 0, "decimated frames out")
    `TB_FINISH
  end
endmodule
