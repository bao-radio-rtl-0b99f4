// tb_rfft_butterfly: random operand pairs and twiddles, including full-scale values that
// clip, streamed one per clock; every output is compared with a model of
//   X[k] = (S - jW*D)/2, X[N/2-k] = conj(S + jW*D)/2, S = A + conj(B), D = A - conj(B)
// rounded half-up and saturated to 8 bits, and must appear 3 clocks after its input.
`include "tb_util.svh"
module tb_rfft_butterfly;
  localparam int TW = 16, NV = 2000;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  `TB_WATCHDOG(clk, 5000)

  logic in_valid = 0;
  logic [13:0] in_tag = 0;
  logic signed [7:0] a_re = 0, a_im = 0, b_re = 0, b_im = 0;
  logic signed [15:0] cos_k = 0, sin_k = 0;
  logic out_valid;
  logic [13:0] out_tag;
  logic signed [7:0] xa_re, xa_im, xb_re, xb_im;
  rfft_butterfly #(.DW(8), .OW(8), .TW(TW), .TAGW(14)) dut (.*);

  int ex [NV][4];
  int cyc = 0, sent_cyc [NV], nrecv = 0, nclip = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic int half_round_sat(longint v);
    longint r;
    r = (v + 64'sd8192 * 2) >>> 15;
    if (r > 127) return 127;
    if (r < -128) return -128;
    return int'(r);
  endfunction

  always @(posedge clk) if (!rst && in_valid) sent_cyc[int'(in_tag)] = cyc;
  always @(posedge clk) if (!rst && out_valid) begin
    int i;
    i = int'(out_tag);
    `TB_CHECK(cyc - sent_cyc[i] == 3, $sformatf("latency %0d", cyc - sent_cyc[i]))
    `TB_CHECK(int'(xa_re) == ex[i][0] && int'(xa_im) == ex[i][1] && int'(xb_re) == ex[i][2] && int'(xb_im) == ex[i][3],
      $sformatf("pair %0d: got %0d %0d %0d %0d want %0d %0d %0d %0d", i, xa_re, xa_im, xb_re, xb_im,
                ex[i][0], ex[i][1], ex[i][2], ex[i][3]))
    nrecv++;
  end

  initial begin
    repeat (3) @(posedge clk); rst <= 0;
    for (int i = 0; i < NV; i++) begin
      int ar, ai, br, bi, c, s, sr, si, dr, di, t;
      longint rr, ri;
      real ang;
      ar = int'($urandom_range(255)) - 128; ai = int'($urandom_range(255)) - 128;
      br = int'($urandom_range(255)) - 128; bi = int'($urandom_range(255)) - 128;
      if (i % 3 == 0) begin ar = ar / 8; ai = ai / 8; br = br / 8; bi = bi / 8; end
      ang = 1.5707963267948966 * $urandom_range(1000) / 1000.0;
      c = $rtoi($floor($cos(ang) * 16384 + 0.5)); s = $rtoi($floor($sin(ang) * 16384 + 0.5));
      sr = ar + br; si = ai - bi; dr = ar - br; di = ai + bi;
      rr = longint'(dr) * s - longint'(di) * c;
      ri = longint'(dr) * c + longint'(di) * s;
      ex[i][0] = half_round_sat(longint'(sr) * 16384 - rr);
      ex[i][1] = half_round_sat(longint'(si) * 16384 - ri);
      ex[i][2] = half_round_sat(longint'(sr) * 16384 + rr);
      t = half_round_sat(longint'(si) * 16384 + ri);
      ex[i][3] = (t == -128) ? 127 : -t;
      if (ex[i][0] == 127 || ex[i][0] == -128) nclip++;
      in_valid <= 1; in_tag <= 14'(i);
      a_re <= 8'(ar); a_im <= 8'(ai); b_re <= 8'(br); b_im <= 8'(bi);
      cos_k <= 16'(c); sin_k <= 16'(s);
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (6) @(posedge clk);
    `TB_CHECK(nrecv == NV, "all pairs came out")
    `TB_CHECK(nclip > 0, "clipping exercised")
    `TB_FINISH
  end
endmodule
