// tb_adc_framer: checks sample packing, frame numbering and start/stop gating of adc_framer
// (N = 16, so 8 complex samples per frame). The ADC word i carries the value i in its low
// byte and i+100 in its high byte.
`include "tb_util.svh"
module tb_adc_framer;
  localparam int N = 16, M = N / 2;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  `TB_WATCHDOG(clk, 2000)

  logic [15:0] adc_data = 0;
  logic adc_valid = 0, start = 0, stop = 0;
  logic signed [7:0] c_re, c_im;
  logic c_valid, c_sop, c_eop, running;
  logic [31:0] frames;
  adc_framer #(.N(N)) dut (.*);

  int word = 0, nout = 0, nsop = 0, neop = 0, pos = 0;
  always @(posedge clk) if (!rst) begin
    if (c_valid) begin
      `TB_CHECK(c_sop == (pos == 0), "sop position")
      `TB_CHECK(c_eop == (pos == M - 1), "eop position")
      `TB_CHECK(c_im == 8'(c_re + 100), "sample pairing")
      nout++; nsop += c_sop; neop += c_eop;
      pos = (pos + 1) % M;
    end
  end

  task automatic feed(int n);
    repeat (n) begin
      adc_valid <= 1; adc_data <= {8'(word + 100), 8'(word)}; word++;
      @(posedge clk);
    end
    adc_valid <= 0;
  endtask

  initial begin
    repeat (3) @(posedge clk); rst <= 0; @(posedge clk);
    feed(5);                               // not started: nothing passes
    `TB_CHECK(nout == 0, "no output before start")
    start <= 1; @(posedge clk); start <= 0;
    feed(3 * M + 3);                       // 3 whole frames and 3 samples of a 4th
    stop <= 1; @(posedge clk); stop <= 0;  // the 4th frame must still finish
    feed(2 * M);
    repeat (3) @(posedge clk);
    `TB_CHECK(nout == 4 * M, $sformatf("4 whole frames out, got %0d samples", nout))
    `TB_CHECK(nsop == 4 && neop == 4, "4 sop and 4 eop")
    `TB_CHECK(frames == 4, "frame counter")
    `TB_CHECK(!running, "stopped after the frame")
    `TB_FINISH
  end
endmodule
