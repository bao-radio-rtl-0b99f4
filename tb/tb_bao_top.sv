// tb_bao_top: end-to-end run of the whole chain at the default size (N = 8192, 4096-point
// complex FFT, 2049 link words per spectrum, 32 KiB and 64 KiB FIFOs, 4 KiB descriptor RAMs).
//
// Two ADC channels carry different tones plus noise at 250 MHz. Behavioural FFT cores close
// the loop around the ADC-board FPGA; the link words are carried across to channel 0 of the
// PCIe-board FPGA (125 MHz clock here), with one stray word added between two frames.
// Channel 1 of the PCIe board runs its test pattern. The host programs descriptor chains.
// Checked: each spectrum that reaches host memory equals, word for word, the reference
// recombination of the FFT model output for both channels, and its strongest bin is the tone;
// descriptors are written back; the acquisition started and stopped on frame boundaries;
// the spectra leave the ADC board at the full rate, one pair per N/2 ADC clocks; the DMA
// rate into host memory, at 125.6 MHz and with endpoint backpressure, is at least 430 MB/s.
// Mechanisms counted (each must happen): start/stop gating, link framing, the k = 0 extra
// clock, frame-filter rejection, source switch to the pattern, flow-control drop, DMA chain
// end, interrupts, endpoint contention between the two DMAs.
`include "tb_util.svh"
module tb_bao_top;
  import bao_pkg::*;
  import rfft_ref_pkg::*;
  localparam int N = 8192, M = N / 2, Q = N / 4, NW = Q + 1, NFR = 3;
  localparam int TONE0 = 700, TONE1 = 1900;
  localparam real PI = 3.14159265358979323846;

  logic clk_adc = 0, clk_pcie = 0, rst_adc = 1, rst_pcie = 1;
  always #2 clk_adc = ~clk_adc;
  always #4 clk_pcie = ~clk_pcie;
  int checks = 0, failures = 0;
  `TB_WATCHDOG(clk_pcie, 60000)

  logic [1:0][15:0] adc_data = '0;
  logic [1:0] adc_valid = 0;
  logic start = 0, stop = 0;
  logic [1:0] fft_in_valid, fft_in_sop, fft_in_eop, fft_out_valid, fft_out_sop, running;
  cbin_t [1:0] fft_in, fft_out;
  logic link_valid, link_sop, link_eop, lock_err;
  logic [63:0] link_data;
  logic [31:0] link_frames;
  logic [1:0] rx_valid = 0, rx_sop = 0, rx_eop = 0;
  logic [1:0][63:0] rx_data = '0;
  logic [15:0] h_addr = 0;
  logic h_write = 0, h_read = 0, h_rdvalid;
  logic [63:0] h_wdata = 0, h_rdata;
  logic txm_write, txm_waitrequest = 0;
  logic [31:0] txm_address;
  logic [63:0] txm_writedata;
  logic [1:0] irq;

  bao_top dut (.*);

  for (genvar c = 0; c < 2; c++) begin : g_fft
    fft_model #(.N(N), .SHIFT(10), .NKEEP(4)) u_fft (
      .clk(clk_adc), .in_valid(fft_in_valid[c]), .in_sop(fft_in_sop[c]),
      .in_re(fft_in[c].re), .in_im(fft_in[c].im),
      .out_valid(fft_out_valid[c]), .out_sop(fft_out_sop[c]),
      .out_re(fft_out[c].re), .out_im(fft_out[c].im));
  end

  // ---- mechanism counters
  int n_k0 = 0, n_link_hdr = 0, irq_seen = 0, contention = 0;
  longint adc_cyc = 0, hdr_cyc [$];
  always @(posedge clk_adc) adc_cyc++;
  always @(posedge clk_adc)
    if (dut.u_adc.g_ch[0].u_post.x_valid && dut.u_adc.g_ch[0].u_post.x_eof) n_k0++;

  // ---- optical link model: ADC clock domain -> PCIe clock domain
  typedef struct { logic [63:0] d; bit sop, eop; } lw_t;
  lw_t link_q [$];
  always @(posedge clk_adc) if (!rst_adc && link_valid) begin
    link_q.push_back('{link_data, link_sop, link_eop});
    if (link_sop) begin n_link_hdr++; hdr_cyc.push_back(adc_cyc); end
    if (link_eop && n_link_hdr == 1) link_q.push_back('{64'h5555, 0, 0});  // stray word
  end
  always @(posedge clk_pcie) begin
    if (link_q.size() > 0) begin
      lw_t w;
      w = link_q.pop_front();
      rx_valid[0] <= 1; rx_data[0] <= w.d; rx_sop[0] <= w.sop; rx_eop[0] <= w.eop;
    end else begin
      rx_valid[0] <= 0; rx_sop[0] <= 0; rx_eop[0] <= 0;
    end
  end

  // ---- host memory behind the endpoint
  logic [63:0] host [int];
  longint pcie_cyc = 0, first_wr = 0, last_wr = 0, n_wr = 0;
  always @(posedge clk_pcie) begin
    txm_waitrequest <= ($urandom_range(4) == 0);
    if (txm_write && !txm_waitrequest) begin
      host[int'(txm_address)] = txm_writedata;
      if (n_wr == 0) first_wr = pcie_cyc;
      last_wr = pcie_cyc; n_wr++;
    end
    pcie_cyc++;
    if (dut.u_pcie.dm_write == 2'b11) contention++;
    if (irq != 0) irq_seen++;
  end

  task automatic hwr(int a, logic [63:0] d);
    h_addr <= 16'(a); h_wdata <= d; h_write <= 1; @(posedge clk_pcie);
    h_write <= 0; @(posedge clk_pcie);
  endtask
  task automatic hrd(int a, output logic [63:0] d);
    h_addr <= 16'(a); h_read <= 1; @(posedge clk_pcie); h_read <= 0; @(negedge clk_pcie);
    d = h_rdata; @(posedge clk_pcie);
  endtask

  // ---- ADC stimulus
  function automatic logic [7:0] sample(int c, int n);
    real v;
    int  noise;
    noise = $urandom % 21;
    v = 50.0 * $cos(2.0 * PI * (c == 0 ? TONE0 : TONE1) * n / N) + real'(noise - 10);
    return 8'($rtoi($floor(v + 0.5)));
  endfunction

  logic [63:0] d;
  int nsamp = 0;
  initial begin
    repeat (4) @(posedge clk_pcie); rst_pcie <= 0;
    @(posedge clk_adc); rst_adc <= 0;
    // host: channel 0 chain of 4 buffers (spectra), channel 1 chain of 2 buffers (pattern)
    for (int i = 0; i < 5; i++) begin
      hwr('h4000 + 16 * i, desc_word0(32'(i + 1), 32'h0100_0000 + 32'h10000 * i));
      hwr('h4008 + 16 * i, desc_word1(i < 4, 0, 0, 16'd4096));
    end
    for (int i = 0; i < 3; i++) begin
      hwr('h6000 + 16 * i, desc_word0(32'(i + 1), 32'h0200_0000 + 32'h10000 * i));
      hwr('h6008 + 16 * i, desc_word1(i < 2, 0, 0, 16'd4096));
    end
    hwr('h5410, 64'h0001_0001);       // channel 1: test pattern
    hwr('h5008, 0); hwr('h5028, 0);
    hwr('h5000, 3); hwr('h5020, 3);
    // ADC: start after a few words, stop during frame NFR
    fork
      begin
        @(posedge clk_adc);
        for (int i = 0; i < (NFR + 1) * M; i++) begin
          adc_valid <= 2'b11;
          adc_data[0] <= {sample(0, 2 * i + 1), sample(0, 2 * i)};
          adc_data[1] <= {sample(1, 2 * i + 1), sample(1, 2 * i)};
          @(posedge clk_adc);
        end
        adc_valid <= 0;
      end
      begin
        repeat (5) @(posedge clk_adc); start <= 1; @(posedge clk_adc); start <= 0;
        repeat ((NFR - 1) * M + 100) @(posedge clk_adc); stop <= 1; @(posedge clk_adc); stop <= 0;
      end
    join
    repeat (2 * M + 3000) @(posedge clk_pcie);

    // ---- checks
    `TB_CHECK(link_frames == NFR && n_link_hdr == NFR, $sformatf("%0d spectra on the link", n_link_hdr))
    `TB_CHECK(!running[0] && !running[1] && !lock_err, "acquisition stopped on a frame boundary")
    // rate: with a continuous ADC stream, one spectrum pair per N/2 ADC clocks
    for (int f = 1; f < hdr_cyc.size(); f++)
      `TB_CHECK(hdr_cyc[f] - hdr_cyc[f - 1] == longint'(M),
                $sformatf("spectra %0d and %0d are %0d ADC clocks apart", f - 1, f, hdr_cyc[f] - hdr_cyc[f - 1]))
    for (int f = 0; f < NFR; f++) begin
      int b, bad, peak_k [2];
      int peak_v [2];
      b = 32'h0100_0000 + 32'h10000 * f;
      `TB_CHECK(host.exists(b) && host[b] == link_header(32'(f), 16'(NW)), $sformatf("spectrum %0d header", f))
      bad = 0; peak_v = '{0, 0}; peak_k = '{0, 0};
      for (int w = 0; w < NW; w++) begin
        int k;
        logic [63:0] e, got;
        k = Q - w;
        for (int c = 0; c < 2; c++)
          e[32*c +: 32] = rfft_pair(g_fft_zr(c, f, k), g_fft_zi(c, f, k),
                                    g_fft_zr(c, f, (M - k) % M), g_fft_zi(c, f, (M - k) % M), k, N);
        got = host.exists(b + 8 * (w + 1)) ? host[b + 8 * (w + 1)] : ~e;
        if (got != e) begin
          bad++;
          if (bad < 4) $display("spectrum %0d k=%0d: %h want %h", f, k, got, e);
        end
        for (int c = 0; c < 2; c++) begin
          // magnitude^2 of X[k] (bits [15:0] of the channel's half) and X[N/2-k] ([31:16])
          int ar, ai, br, bi;
          ar = int'($signed(got[32*c + 8 +: 8])); ai = int'($signed(got[32*c +: 8]));
          br = int'($signed(got[32*c + 24 +: 8])); bi = int'($signed(got[32*c + 16 +: 8]));
          if (k > 0 && ar * ar + ai * ai > peak_v[c]) begin peak_v[c] = ar * ar + ai * ai; peak_k[c] = k; end
          if (k < Q && br * br + bi * bi > peak_v[c]) begin peak_v[c] = br * br + bi * bi; peak_k[c] = M - k; end
        end
      end
      `TB_CHECK(bad == 0, $sformatf("spectrum %0d: %0d words differ from the reference", f, bad))
      `TB_CHECK(peak_k[0] == TONE0 && peak_k[1] == TONE1,
                $sformatf("spectrum %0d peaks at bins %0d, %0d", f, peak_k[0], peak_k[1]))
      hrd('h4008 + 16 * f, d);
      `TB_CHECK(d == desc_word1(0, 1, 16'(NW + 1), 16'd4096), $sformatf("descriptor %0d status %h", f, d))
    end
    hrd('h4008 + 16 * NFR, d);
    `TB_CHECK(d[63] == 1 && d[47:32] == 0, "fourth buffer still waiting")
    // pattern channel
    for (int i = 0; i < 2; i++) begin
      int b;
      b = 32'h0200_0000 + 32'h10000 * i;
      `TB_CHECK(host.exists(b) && is_link_header(host[b]) && host[b][15:0] == 16'(NW), $sformatf("pattern buffer %0d header", i))
      `TB_CHECK(host.exists(b + 8 * NW) && host[b + 8 * NW] == {host[b][47:16], 32'(NW - 1)},
                $sformatf("pattern buffer %0d last word", i))
    end
    // mechanisms
    hrd('h5408, d);
    `TB_CHECK(d[47:32] == 1, $sformatf("frame filter rejected the stray word (%0d)", d[47:32]))
    `TB_CHECK(d[63:48] == 0 && d[1:0] == 0, "channel 0: no drop, no overflow")
    hrd('h5418, d);
    `TB_CHECK(d[63:48] > 0, $sformatf("flow control dropped pattern frames (%0d)", d[63:48]))
    `TB_CHECK(d[1:0] == 0, "channel 1: FIFOs never overflowed")
    hrd('h5030, d);
    `TB_CHECK(d[2] == 1, "channel 1 DMA reached the end of its chain")
    `TB_CHECK(dut.u_pcie.g_ch[1].u_src.cur_sel, "channel 1 switched to the pattern")
    `TB_CHECK(n_k0 == NFR, $sformatf("k = 0 extra clock ran %0d times", n_k0))
    `TB_CHECK(irq_seen > 0, "interrupts")
    `TB_CHECK(contention > 0, $sformatf("endpoint contention (%0d clocks)", contention))
    // DMA rate into host memory, with the endpoint refusing one write in five, scaled to the
    // board's 125.6 MHz clock; the original system sustained 430 MB/s
    begin
      real mbs;
      mbs = real'(n_wr) * 8.0 * 125.6 / real'(last_wr - first_wr + 1);
      $display("DMA: %0d words in %0d clocks = %0.1f MB/s at 125.6 MHz", n_wr, last_wr - first_wr + 1, mbs);
      `TB_CHECK(mbs >= 430.0, $sformatf("DMA rate %0.1f MB/s", mbs))
    end
    $display("mechanisms: spectra=%0d k0=%0d contention=%0d irq_clocks=%0d", n_link_hdr, n_k0, contention, irq_seen);
    `TB_FINISH
  end

  function automatic int g_fft_zr(int c, int f, int k);
    return c == 0 ? g_fft[0].u_fft.zr[f][k] : g_fft[1].u_fft.zr[f][k];
  endfunction
  function automatic int g_fft_zi(int c, int f, int k);
    return c == 0 ? g_fft[0].u_fft.zi[f][k] : g_fft[1].u_fft.zi[f][k];
  endfunction
endmodule
