// rfft_post: real-FFT post-processor. An N-point FFT of a real signal s is obtained from an
// N/2-point complex FFT Z of c[i] = s[2i] + j*s[2i+1], which halves the FFT core.
//
// The complex FFT core delivers Z[0..N/2-1] of each frame in natural order, one per clock
// (natural order is this design's reading; the source gives the step lengths below).
//   Step 1, N/4 clocks: Z[0..N/4-1] are written to the block RAM (16 bits x N/4).
//   Step 2, N/4+1 clocks: each further output Z[m], m = N/4..N/2-1, is paired with the stored
//   Z[N/2-m] and the pair goes through the two butterfly operators, giving bins k = N/2-m,
//   i.e. k = N/4 down to 1 (for k = N/4 both operands are Z[N/4] itself); one extra clock
//   then handles k = 0, where both operands are Z[0] (Z[N/2] = Z[0]), kept in a register so
//   the next frame may start at once.
// Each output clock carries X[k] and X[N/2-k], so a frame gives bins 0..N/2 in N/4+1
// consecutive clocks, and frames can follow back to back (one frame per N/2 input clocks).
// Interface: z_* from the FFT core (z_sop marks Z[0]); x_* out with the bin index x_k,
// x_sof on k = N/4 (first output of the frame) and x_eof on k = 0 (last).
// Latency: the output pair for Z[m] is registered 4 clocks after the edge that samples Z[m]
// (RAM read, twiddle read, 3 butterfly stages, the first two overlapping); k = 0 follows the
// k = 1 output on the next clock.
module rfft_post #(
  parameter int N  = 8192,
  parameter int DW = 8,
  parameter int OW = 8,
  parameter int TW = 16,
  localparam int KW = $clog2(N/4+1)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 z_valid,
  input  logic                 z_sop,
  input  logic signed [DW-1:0] z_re,
  input  logic signed [DW-1:0] z_im,
  output logic                 x_valid,
  output logic                 x_sof,
  output logic                 x_eof,
  output logic [KW-1:0]        x_k,
  output logic signed [OW-1:0] xa_re, xa_im,   // X[k]
  output logic signed [OW-1:0] xb_re, xb_im    // X[N/2-k]
);
  localparam int M   = N / 2;
  localparam int Q   = N / 4;
  localparam int MW  = $clog2(M);
  localparam int AW  = $clog2(Q);
  localparam int TAG = KW + 2;

  initial assert (N >= 16 && (N & (N - 1)) == 0) else $error("N must be a power of two >= 16");

  // input sample index within the frame
  logic [MW-1:0] m_cnt, m;
  always_comb m = z_sop ? '0 : m_cnt;
  always_ff @(posedge clk) begin
    if (rst)          m_cnt <= '0;
    else if (z_valid) m_cnt <= m + 1'b1;
  end

  wire step1 = z_valid && (m < MW'(Q));
  wire step2 = z_valid && (m >= MW'(Q));
  wire last  = z_valid && (m == MW'(M - 1));

  // block RAM: write in step 1, read Z[N/2-m] in step 2
  logic [2*DW-1:0] ram_q;
  rfft_bram #(.DEPTH(Q), .W(2*DW)) u_ram (
    .clk, .we(step1), .waddr(m[AW-1:0]), .wdata({z_re, z_im}),
    .re(step2), .raddr(AW'(MW'(M) - m)), .rdata(ram_q));

  // Z[0] register, and its copy held for the k = 0 clock
  logic signed [DW-1:0] z0_re, z0_im, z0h_re, z0h_im;
  // stage p1: RAM output aligned with the delayed stream sample
  logic                 p1_pair, p1_self, p1_k0a, p1_k0;
  logic signed [DW-1:0] p1_re, p1_im;
  logic [KW-1:0]        p1_k;
  always_ff @(posedge clk) begin
    if (rst) begin
      p1_pair <= 1'b0; p1_self <= 1'b0; p1_k0a <= 1'b0; p1_k0 <= 1'b0;
    end else begin
      p1_pair <= step2;
      p1_self <= step2 && (m == MW'(Q));
      p1_k0a  <= last;
      p1_k0   <= p1_k0a;
    end
    if (z_valid && m == '0) begin z0_re <= z_re; z0_im <= z_im; end
    if (last) begin z0h_re <= z0_re; z0h_im <= z0_im; end
    p1_re <= z_re;
    p1_im <= z_im;
    p1_k  <= KW'(MW'(M) - m);
  end

  // operand select, then stage p2 aligned with the twiddle ROM output
  logic                 op_v;
  logic signed [DW-1:0] opa_re, opa_im, opb_re, opb_im;
  logic [KW-1:0]        op_k;
  always_comb begin
    op_v = p1_pair | p1_k0;
    if (p1_pair) begin
      if (p1_self) begin opa_re = p1_re; opa_im = p1_im; end
      else         {opa_re, opa_im} = ram_q;
      opb_re = p1_re;  opb_im = p1_im;  op_k = p1_k;
    end else begin
      opa_re = z0h_re; opa_im = z0h_im;
      opb_re = z0h_re; opb_im = z0h_im; op_k = '0;
    end
  end

  logic                 p2_v;
  logic signed [DW-1:0] p2a_re, p2a_im, p2b_re, p2b_im;
  logic [KW-1:0]        p2_k;
  logic signed [TW-1:0] cos_k, sin_k;
  twiddle_rom #(.N(N), .TW(TW)) u_tw (.clk, .k(op_k), .cos_k, .sin_k);

  always_ff @(posedge clk) begin
    if (rst) p2_v <= 1'b0;
    else     p2_v <= op_v;
    p2a_re <= opa_re; p2a_im <= opa_im;
    p2b_re <= opb_re; p2b_im <= opb_im;
    p2_k   <= op_k;
  end

  logic [TAG-1:0] tag_out;
  rfft_butterfly #(.DW(DW), .OW(OW), .TW(TW), .TAGW(TAG)) u_bf (
    .clk, .rst, .in_valid(p2_v),
    .in_tag({p2_k == KW'(Q), p2_k == '0, p2_k}),
    .a_re(p2a_re), .a_im(p2a_im), .b_re(p2b_re), .b_im(p2b_im),
    .cos_k, .sin_k,
    .out_valid(x_valid), .out_tag(tag_out),
    .xa_re, .xa_im, .xb_re, .xb_im);

  assign {x_sof, x_eof, x_k} = tag_out;
endmodule
