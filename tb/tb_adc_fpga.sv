// tb_adc_fpga: the ADC-board datapath at N = 64 with a behavioural FFT core per channel.
// Two channels of random 8-bit samples are started, run for a few frames and stopped; the
// link must carry, for each frame, a header {magic, frame number, N/4+1} and N/4+1 words
// whose bins equal the reference recombination of the FFT model's output for both channels.
`include "tb_util.svh"
module tb_adc_fpga;
  import bao_pkg::*;
  import rfft_ref_pkg::*;
  localparam int N = 64, M = N / 2, Q = N / 4;
  logic clk = 0, rst = 1;
  always #2 clk = ~clk;
  int checks = 0, failures = 0;
  `TB_WATCHDOG(clk, 5000)

  logic [1:0][15:0] adc_data = '0;
  logic [1:0] adc_valid = 0;
  logic start = 0, stop = 0;
  logic [1:0] fft_in_valid, fft_in_sop, fft_in_eop, fft_out_valid, fft_out_sop, running;
  cbin_t [1:0] fft_in, fft_out;
  logic link_valid, link_sop, link_eop, lock_err;
  logic [63:0] link_data;
  logic [31:0] link_frames;
  adc_fpga #(.N(N)) dut (.*);

  for (genvar c = 0; c < 2; c++) begin : g_fft
    fft_model #(.N(N), .SHIFT(3)) u_fft (
      .clk, .in_valid(fft_in_valid[c]), .in_sop(fft_in_sop[c]),
      .in_re(fft_in[c].re), .in_im(fft_in[c].im),
      .out_valid(fft_out_valid[c]), .out_sop(fft_out_sop[c]),
      .out_re(fft_out[c].re), .out_im(fft_out[c].im));
  end

  // link monitor
  int fr = 0, widx = -1, nframes_ok = 0;
  always @(posedge clk) if (!rst && link_valid) begin
    if (link_sop) begin
      `TB_CHECK(link_data == link_header(32'(fr), 16'(Q + 1)), $sformatf("header %h", link_data))
      widx = 0;
    end else if (widx >= 0) begin
      int k;
      logic [63:0] e;
      k = Q - widx;
      for (int c = 0; c < 2; c++)
        e[32*c +: 32] = rfft_pair((c == 0 ? g_fft[0].u_fft.zr[fr][k] : g_fft[1].u_fft.zr[fr][k]),
                                  (c == 0 ? g_fft[0].u_fft.zi[fr][k] : g_fft[1].u_fft.zi[fr][k]),
                                  (c == 0 ? g_fft[0].u_fft.zr[fr][(M - k) % M] : g_fft[1].u_fft.zr[fr][(M - k) % M]),
                                  (c == 0 ? g_fft[0].u_fft.zi[fr][(M - k) % M] : g_fft[1].u_fft.zi[fr][(M - k) % M]),
                                  k, N);
      `TB_CHECK(link_data == e, $sformatf("frame %0d k=%0d: %h want %h", fr, k, link_data, e))
      `TB_CHECK(link_eop == (k == 0), "eop on k = 0")
      if (k == 0) begin widx = -1; fr++; nframes_ok++; end else widx++;
    end else `TB_CHECK(0, "data word outside a frame")
  end

  initial begin
    repeat (3) @(posedge clk); rst <= 0; @(posedge clk);
    fork
      begin
        for (int i = 0; i < 5 * M; i++) begin
          adc_valid <= 2'b11;
          adc_data[0] <= {8'($urandom_range(255)), 8'($urandom_range(255))};
          adc_data[1] <= {8'($urandom_range(40)), 8'($urandom_range(40))};
          @(posedge clk);
        end
        adc_valid <= 0;
      end
      begin
        repeat (7) @(posedge clk); start <= 1; @(posedge clk); start <= 0;
        repeat (2 * M) @(posedge clk); stop <= 1; @(posedge clk); stop <= 0;
      end
    join
    repeat (M + 40) @(posedge clk);
    // started 8 words late, stopped inside the 3rd frame: exactly 3 frames
    `TB_CHECK(nframes_ok == 3 && link_frames == 3, $sformatf("3 frames on the link, got %0d", nframes_ok))
    `TB_CHECK(!lock_err, "channels in step")
    `TB_FINISH
  end
endmodule
