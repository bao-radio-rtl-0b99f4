// tb_rfft_post: self-checking test of the real-FFT post-processor at N = 64.
//
// Random 4-bit real signals s are packed as c[i] = s[2i] + j*s[2i+1]; the testbench computes
// Z = DFT_{N/2}(c)/4 with real arithmetic, rounds it to 8 bits and streams it in natural order,
// three frames back to back. Every output pair is checked bit-exactly against an integer model
// of the recombination, and against the true N-point DFT of s (divided by 4) within 2 LSB.
// Timing checks: each frame gives N/4+1 outputs on consecutive clocks, k = N/4 first (sof) and
// k = 0 last (eof), and the first output is registered 4 clocks after the edge that samples Z[N/4]
// (seen by the monitor 5 edges later).
module tb_rfft_post;
  localparam int N = 64, M = N / 2, Q = N / 4, NF = 3, TW = 16;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic z_valid = 0, z_sop = 0;
  logic signed [7:0] z_re = 0, z_im = 0;
  logic x_valid, x_sof, x_eof;
  logic [$clog2(Q+1)-1:0] x_k;
  logic signed [7:0] xa_re, xa_im, xb_re, xb_im;

  rfft_post #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  int s [NF][N];
  int zr [NF][M], zi [NF][M];
  int cyc = 0, t_q [NF], nout [NF], last_out_cyc = -1;
  int fr = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd(real v);
    return $rtoi($floor(v + 0.5));
  endfunction
  function automatic real fabs(real v);
    return v < 0 ? -v : v;
  endfunction
  function automatic int sat8(int v);
    return v > 127 ? 127 : (v < -128 ? -128 : v);
  endfunction
  function automatic int rsh(int v);      // (v + 2^(TW-2)) >> (TW-1), floor
    return $rtoi($floor(real'(v + (1 << (TW - 2))) / real'(1 << (TW - 1))));
  endfunction

  // expected pair for frame f, bin k
  task automatic expect_pair(int f, int k, output int ar, ai, br, bi);
    int a_r, a_i, b_r, b_i, sr, si, dr, di, c, sn, rr, ri, t;
    a_r = zr[f][k]; a_i = zi[f][k];
    b_r = zr[f][(M - k) % M]; b_i = zi[f][(M - k) % M];
    sr = a_r + b_r; si = a_i - b_i; dr = a_r - b_r; di = a_i + b_i;
    c  = rnd($cos(2.0 * PI * k / N) * (1 << (TW - 2)));
    sn = rnd($cos(2.0 * PI * (Q - k) / N) * (1 << (TW - 2)));
    rr = dr * sn - di * c;
    ri = dr * c + di * sn;
    ar = sat8(rsh(sr * (1 << (TW - 2)) - rr));
    ai = sat8(rsh(si * (1 << (TW - 2)) - ri));
    br = sat8(rsh(sr * (1 << (TW - 2)) + rr));
    t  = sat8(rsh(si * (1 << (TW - 2)) + ri));
    bi = (t == -128) ? 127 : -t;
  endtask

  // true DFT_N of s at bin k, divided by 4
  task automatic true_bin(int f, int k, output real re, im);
    re = 0; im = 0;
    for (int n = 0; n < N; n++) begin
      re += s[f][n] * $cos(2.0 * PI * n * k / N);
      im -= s[f][n] * $sin(2.0 * PI * n * k / N);
    end
    re /= 4.0; im /= 4.0;
  endtask

  // clock edge at which Z[N/4] of each frame is sampled
  int in_cnt = 0, in_fr = 0;
  always @(posedge clk) if (!rst && z_valid) begin
    int mm;
    mm = z_sop ? 0 : in_cnt;
    if (mm == Q) t_q[in_fr] = cyc;
    if (mm == M - 1) in_fr++;
    in_cnt = mm + 1;
  end

  // output monitor
  int exp_k [NF];
  always @(posedge clk) if (!rst && x_valid) begin
    int ar, ai, br, bi;
    real tr, ti;
    if (fr < NF) begin
      if (nout[fr] == 0) begin
        checks++;
        if (!x_sof || int'(x_k) != Q || cyc - t_q[fr] != 5) begin
          failures++;
          $display("frame %0d: first output sof=%0d k=%0d latency=%0d", fr, x_sof, x_k, cyc - t_q[fr]);
        end
      end else begin
        checks++;
        if (cyc != last_out_cyc + 1 || int'(x_k) != Q - nout[fr]) begin
          failures++;
          $display("frame %0d: output %0d not consecutive or k=%0d", fr, nout[fr], x_k);
        end
      end
      expect_pair(fr, int'(x_k), ar, ai, br, bi);
      checks++;
      if (int'(xa_re) != ar || int'(xa_im) != ai || int'(xb_re) != br || int'(xb_im) != bi) begin
        failures++;
        $display("frame %0d k=%0d: got (%0d,%0d) (%0d,%0d) expected (%0d,%0d) (%0d,%0d)",
                 fr, x_k, xa_re, xa_im, xb_re, xb_im, ar, ai, br, bi);
      end
      true_bin(fr, int'(x_k), tr, ti);
      checks++;
      if (fr == NF - 1 && x_k == 3) ;   // clipped on purpose
      else if (fabs(tr - xa_re) > 2.0 || fabs(ti - xa_im) > 2.0) begin
        failures++; $display("frame %0d k=%0d far from DFT: %f %f vs %0d %0d", fr, x_k, tr, ti, xa_re, xa_im);
      end
      true_bin(fr, M - int'(x_k), tr, ti);
      checks++;
      if (fr == NF - 1 && x_k == 3) ;
      else if (fabs(tr - xb_re) > 2.0 || fabs(ti - xb_im) > 2.0) begin
        failures++; $display("frame %0d bin %0d far from DFT: %f %f vs %0d %0d", fr, M - int'(x_k), tr, ti, xb_re, xb_im);
      end
      last_out_cyc = cyc;
      nout[fr]++;
      if (x_eof) begin
        checks++;
        if (nout[fr] != Q + 1 || x_k != 0) begin
          failures++; $display("frame %0d: eof after %0d outputs", fr, nout[fr]);
        end
        fr++;
      end
    end else begin
      failures++; $display("unexpected output");
    end
  end

  initial begin
    for (int f = 0; f < NF; f++) begin
      for (int n = 0; n < N; n++) s[f][n] = int'($urandom_range(15)) - 8;
      for (int m = 0; m < M; m++) begin
        real re, im, ang;
        re = 0; im = 0;
        for (int i = 0; i < M; i++) begin
          ang = -2.0 * PI * i * m / M;
          re += s[f][2*i] * $cos(ang) - s[f][2*i+1] * $sin(ang);
          im += s[f][2*i] * $sin(ang) + s[f][2*i+1] * $cos(ang);
        end
        zr[f][m] = sat8(rnd(re / 4.0));
        zi[f][m] = sat8(rnd(im / 4.0));
      end
    end
    // saturating inputs in the last frame exercise the output clipping
    zr[NF-1][3] = 127; zi[NF-1][3] = -128; zr[NF-1][M-3] = -128; zi[NF-1][M-3] = -128;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (2) @(posedge clk);
    for (int f = 0; f < NF; f++)
      for (int m = 0; m < M; m++) begin
        z_valid <= 1; z_sop <= (m == 0);
        z_re <= 8'(zr[f][m]); z_im <= 8'(zi[f][m]);
        @(posedge clk);
      end
    z_valid <= 0; z_sop <= 0;
    repeat (30) @(posedge clk);
    checks++;
    if (fr != NF) begin failures++; $display("only %0d frames completed", fr); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
