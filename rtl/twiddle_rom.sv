// twiddle_rom: twiddle factor table for the real-FFT recombination, W_N^k = cos(t) - j sin(t)
// with t = 2*pi*k/N, for 0 <= k <= N/4.
//
// Only the quarter wave is needed, so a single table of N/4+1 cosines is kept and the sine is
// read from the mirrored entry: sin(2*pi*k/N) = cos(2*pi*(N/4-k)/N). Entries are
// round(cos(t) * 2^(TW-2)), so 1.0 is 2^(TW-2) and fits a signed TW-bit word. The table is
// computed at start-up from the formula. The coefficient width is this design's choice.
// Timing: address in, cos and sin registered one clock later.
module twiddle_rom #(
  parameter int N  = 8192,
  parameter int TW = 16
) (
  input  logic                       clk,
  input  logic [$clog2(N/4+1)-1:0]   k,
  output logic signed [TW-1:0]       cos_k,
  output logic signed [TW-1:0]       sin_k
);
  localparam int Q  = N / 4;
  localparam int KW = $clog2(N/4+1);

  logic signed [TW-1:0] tab [Q+1];

  initial begin
    for (int i = 0; i <= Q; i++)
      tab[i] = TW'($rtoi($floor($cos(2.0 * 3.14159265358979323846 * i / N)
                                * real'(1 << (TW - 2)) + 0.5)));
  end

  always_ff @(posedge clk) begin
    cos_k <= tab[k];
    sin_k <= tab[KW'(Q) - k];
  end
endmodule
