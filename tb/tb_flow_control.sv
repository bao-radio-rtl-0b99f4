// tb_flow_control: frames of 8 words arrive while the free space of the downstream FIFO is
// varied; a frame must be passed whole when free_words >= MAXFRAME+2 at its first word and
// dropped whole otherwise, even if the space changes in the middle of the frame. Every output
// word is compared with a queue of the words of the admitted frames (data, sop, eop), and the
// admitted/dropped counters are checked after every frame.
`include "tb_util.svh"
module tb_flow_control;
  localparam int MF = 8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  `TB_WATCHDOG(clk, 3000)

  logic in_valid = 0, in_sop = 0, in_eop = 0;
  logic [63:0] in_data = 0;
  logic [13:0] free_words = 100;
  logic out_valid, out_sop, out_eop;
  logic [63:0] out_data;
  logic [31:0] admitted, dropped;
  flow_control #(.MAXFRAME(MF), .LW(14)) dut (.*);

  int words_out = 0, frames_out = 0, exp_words = 0, exp_frames = 0;
  logic [65:0] expq[$];
  always @(posedge clk) if (!rst && out_valid) begin
    logic [65:0] e;
    words_out++;
    if (out_eop) frames_out++;
    if (expq.size() == 0) begin
      `TB_CHECK(0, "output word with none expected")
    end else begin
      e = expq.pop_front();
      `TB_CHECK({out_sop, out_eop, out_data} == e,
                $sformatf("word %h want %h", {out_sop, out_eop, out_data}, e))
    end
  end

  initial begin
    repeat (3) @(posedge clk); rst <= 0; @(posedge clk);
    for (int f = 0; f < 40; f++) begin
      int space;
      space = (f % 4 == 0) ? MF + 1 : (f % 4 == 1) ? MF + 2 : int'($urandom_range(30));
      if (space >= MF + 2) begin
        exp_frames++; exp_words += MF;
        for (int j = 0; j < MF; j++)
          expq.push_back({j == 0, j == MF - 1, 32'(f), 32'(j)});
      end
      for (int j = 0; j < MF; j++) begin
        in_valid <= 1; in_sop <= (j == 0); in_eop <= (j == MF - 1);
        in_data <= {32'(f), 32'(j)};
        // changes of the space inside the frame do not matter
        free_words <= (j == 0) ? 14'(space) : 14'($urandom_range(30));
        @(posedge clk);
      end
      in_valid <= 0; in_sop <= 0; in_eop <= 0;
      repeat (1 + $urandom_range(1)) @(posedge clk);
      `TB_CHECK(admitted == 32'(exp_frames) && dropped == 32'(f + 1 - exp_frames),
                $sformatf("counters after frame %0d", f))
    end
    repeat (3) @(posedge clk);
    `TB_CHECK(expq.size() == 0, "all admitted words delivered")
    `TB_CHECK(words_out == exp_words, $sformatf("words %0d want %0d", words_out, exp_words))
    `TB_CHECK(frames_out == exp_frames && admitted == exp_frames, "frames admitted")
    `TB_CHECK(dropped == 40 - exp_frames && dropped > 0, "frames dropped")
    `TB_FINISH
  end
endmodule
