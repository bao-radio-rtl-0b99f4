// rfft_butterfly: the two butterfly operators that turn a pair of N/2-point complex FFT
// outputs into two bins of the N-point real FFT.
//
// With Z = FFT_N/2(c), c[i] = s[2i] + j*s[2i+1], A = Z[k] and B = Z[N/2-k]:
//   S = A + conj(B),  D = A - conj(B)                   (first operator pair: + and -)
//   X[k]     = (S - jW^k * D) / 2                       (second pair: - ...
//   X[N/2-k] = conj(S + jW^k * D) / 2                   ... and + followed by conjugate)
// with W^k = cos(t) - j sin(t), t = 2*pi*k/N, so jW^k = sin(t) + j cos(t). The operator
// structure is the source material's; the 1/2 scaling (which makes the result the true
// N-point transform of s), round-half-up and saturation to OW bits are this design's choices.
// Twiddles are signed TW-bit numbers with 1.0 = 2^(TW-2).
// Timing: fully pipelined, one pair per clock, 3 clocks from in_valid to out_valid; the
// tag (bin index and frame flags) travels with the data.
module rfft_butterfly #(
  parameter int DW   = 8,            // bits of Z real/imaginary parts
  parameter int OW   = 8,            // bits of X real/imaginary parts
  parameter int TW   = 16,           // twiddle bits
  parameter int TAGW = 14
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   in_valid,
  input  logic [TAGW-1:0]        in_tag,
  input  logic signed [DW-1:0]   a_re, a_im,     // Z[k]
  input  logic signed [DW-1:0]   b_re, b_im,     // Z[N/2-k]
  input  logic signed [TW-1:0]   cos_k, sin_k,
  output logic                   out_valid,
  output logic [TAGW-1:0]        out_tag,
  output logic signed [OW-1:0]   xa_re, xa_im,   // X[k]
  output logic signed [OW-1:0]   xb_re, xb_im    // X[N/2-k]
);
  localparam int SH = TW - 2;          // twiddle fraction bits
  localparam int PW = DW + 1 + TW + 1; // product-sum width
  localparam int FW = PW + 2;

  // stage 1: sums and differences
  logic                 v1;
  logic [TAGW-1:0]      t1;
  logic signed [DW:0]   s_re, s_im, d_re, d_im;
  logic signed [TW-1:0] c1, sn1;
  // stage 2: rotated difference jW*D and scaled sum
  logic                 v2;
  logic [TAGW-1:0]      t2;
  logic signed [PW-1:0] r_re, r_im;
  logic signed [PW-1:0] ss_re, ss_im;

  function automatic logic signed [OW-1:0] rnd_sat(input logic signed [FW-1:0] v);
    logic signed [FW-1:0] r;
    r = (v + (FW'(1) <<< SH)) >>> (SH + 1);
    if (r > FW'((1 << (OW - 1)) - 1))   return OW'((1 << (OW - 1)) - 1);
    else if (r < -FW'(1 << (OW - 1)))   return OW'(-(1 << (OW - 1)));
    else                                return r[OW-1:0];
  endfunction

  function automatic logic signed [OW-1:0] neg_sat(input logic signed [OW-1:0] v);
    if (v == OW'(-(1 << (OW - 1)))) return OW'((1 << (OW - 1)) - 1);
    else                           return -v;
  endfunction

  logic signed [FW-1:0] fa_re, fa_im, fb_re, fb_im;
  always_comb begin
    fa_re = FW'(ss_re) - FW'(r_re);
    fa_im = FW'(ss_im) - FW'(r_im);
    fb_re = FW'(ss_re) + FW'(r_re);
    fb_im = FW'(ss_im) + FW'(r_im);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      v1 <= 1'b0; v2 <= 1'b0; out_valid <= 1'b0;
    end else begin
      v1 <= in_valid; v2 <= v1; out_valid <= v2;
    end
    // stage 1
    t1   <= in_tag;
    s_re <= (DW+1)'(a_re) + (DW+1)'(b_re);
    s_im <= (DW+1)'(a_im) - (DW+1)'(b_im);
    d_re <= (DW+1)'(a_re) - (DW+1)'(b_re);
    d_im <= (DW+1)'(a_im) + (DW+1)'(b_im);
    c1   <= cos_k;
    sn1  <= sin_k;
    // stage 2: (d_re + j d_im)(sin + j cos)
    t2    <= t1;
    r_re  <= PW'(d_re) * PW'(sn1) - PW'(d_im) * PW'(c1);
    r_im  <= PW'(d_re) * PW'(c1)  + PW'(d_im) * PW'(sn1);
    ss_re <= PW'(s_re) <<< SH;
    ss_im <= PW'(s_im) <<< SH;
    // stage 3: combine, halve, round, saturate, conjugate the second output
    out_tag <= t2;
    xa_re   <= rnd_sat(fa_re);
    xa_im   <= rnd_sat(fa_im);
    xb_re   <= rnd_sat(fb_re);
    xb_im   <= neg_sat(rnd_sat(fb_im));
  end
endmodule
