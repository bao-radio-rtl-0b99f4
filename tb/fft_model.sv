// fft_model: behavioural model of the N/2-point complex FFT core used on the ADC board
// (testbench only; the real part is a vendor IP core). It collects a frame of complex samples
// (sop on the first), computes the exact DFT Z[m] = sum_i c[i] exp(-2*pi*j*i*m/M) in floating
// point, divides by 2^SHIFT, rounds and clips to 8 bits, and streams Z[0..M-1] in natural
// order, one per clock, starting the clock after the last input sample. The values are also
// kept (zr/zi of the last NKEEP frames) so that testbenches can compute expected results.
module fft_model #(
  parameter int N     = 8192,
  parameter int SHIFT = 6,
  parameter int NKEEP = 8
) (
  input  logic              clk,
  input  logic              in_valid,
  input  logic              in_sop,
  input  logic signed [7:0] in_re,
  input  logic signed [7:0] in_im,
  output logic              out_valid,
  output logic              out_sop,
  output logic signed [7:0] out_re,
  output logic signed [7:0] out_im
);
  localparam int M = N / 2;
  localparam real PI = 3.14159265358979323846;

  int   cr [M], ci [M];
  real  ct [M], st [M];
  int   zr [NKEEP][M], zi [NKEEP][M];
  int   frames_done = 0;
  int   n_in = 0;
  int   q_re [$], q_im [$], q_idx [$];

  initial begin
    out_valid = 0; out_sop = 0; out_re = 0; out_im = 0;
    for (int i = 0; i < M; i++) begin
      ct[i] = $cos(2.0 * PI * i / M);
      st[i] = $sin(2.0 * PI * i / M);
    end
  end

  function automatic int q8(real v);
    int r;
    r = $rtoi($floor(v / real'(1 << SHIFT) + 0.5));
    return r > 127 ? 127 : (r < -128 ? -128 : r);
  endfunction

  always @(posedge clk) begin
    if (q_re.size() > 0) begin
      out_valid <= 1;
      out_sop   <= (q_idx[0] == 0);
      out_re    <= 8'(q_re.pop_front());
      out_im    <= 8'(q_im.pop_front());
      void'(q_idx.pop_front());
    end else begin
      out_valid <= 0; out_sop <= 0;
    end
    if (in_valid) begin
      if (in_sop) n_in = 0;
      cr[n_in] = int'(in_re); ci[n_in] = int'(in_im);
      n_in++;
      if (n_in == M) begin
        int slot;
        slot = frames_done % NKEEP;
        for (int m = 0; m < M; m++) begin
          real re, im;
          int  p;
          re = 0; im = 0; p = 0;
          for (int i = 0; i < M; i++) begin
            // c * exp(-j a) = (cr + j ci)(cos a - j sin a)
            re += cr[i] * ct[p] + ci[i] * st[p];
            im += ci[i] * ct[p] - cr[i] * st[p];
            p = (p + m) % M;
          end
          zr[slot][m] = q8(re); zi[slot][m] = q8(im);
          q_re.push_back(zr[slot][m]); q_im.push_back(zi[slot][m]); q_idx.push_back(m);
        end
        frames_done++;
        n_in = 0;
      end
    end
  end
endmodule
