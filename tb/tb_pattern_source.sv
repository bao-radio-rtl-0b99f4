// tb_pattern_source: with sel = 0 link frames pass through unchanged (one clock later); with
// sel = 1 the pattern frames {header, {frame, index} words, gap} come out; a switch requested
// in the middle of a link frame waits for the end of that frame.
`include "tb_util.svh"
module tb_pattern_source;
  import bao_pkg::*;
  localparam int NW = 6, GAP = 3;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  `TB_WATCHDOG(clk, 3000)

  logic sel = 0, link_valid = 0, link_sop = 0, link_eop = 0;
  logic [63:0] link_data = 0;
  logic out_valid, out_sop, out_eop, cur_sel;
  logic [63:0] out_data;
  pattern_source #(.NWORDS(NW), .GAP(GAP)) dut (.*);

  // monitor: count link words and pattern frames, check pattern content
  int link_words = 0, pat_frames = 0, pat_idx = -1, cut = 0;
  logic [31:0] pat_fr;
  always @(posedge clk) if (!rst && out_valid) begin
    if (out_data[63:56] == 8'hAA) link_words++;
    else if (out_sop) begin
      `TB_CHECK(out_data[63:48] == LINK_MAGIC && out_data[15:0] == 16'(NW), "pattern header")
      pat_fr = out_data[47:16]; pat_idx = 0;
    end else if (pat_idx >= 0) begin
      `TB_CHECK(out_data == {pat_fr, 32'(pat_idx)}, $sformatf("pattern word %h", out_data))
      `TB_CHECK(out_eop == (pat_idx == NW - 1), "pattern eop")
      if (out_eop) begin pat_frames++; pat_idx = -1; end else pat_idx++;
    end else cut++;
  end

  task automatic link_frame(int n, bit flip_mid);
    for (int j = 0; j < n; j++) begin
      link_valid <= 1; link_sop <= (j == 0); link_eop <= (j == n - 1);
      link_data <= {8'hAA, 56'(j)};
      if (flip_mid && j == n / 2) sel <= 1;
      @(posedge clk);
    end
    link_valid <= 0; link_sop <= 0; link_eop <= 0;
  endtask

  initial begin
    repeat (3) @(posedge clk); rst <= 0; @(posedge clk);
    link_frame(10, 0);
    repeat (3) @(posedge clk);
    `TB_CHECK(link_words == 10 && !cur_sel, "link frame passed")
    link_frame(10, 1);                      // switch asked for half way
    repeat (2) @(posedge clk);
    `TB_CHECK(link_words == 20, "link frame finished before the switch")
    repeat (60) @(posedge clk);
    `TB_CHECK(cur_sel, "switched to pattern")
    `TB_CHECK(pat_frames >= 3, $sformatf("pattern frames %0d", pat_frames))
    `TB_CHECK(cut == 0, "no cut frame")
    `TB_FINISH
  end
endmodule
