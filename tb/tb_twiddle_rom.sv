// tb_twiddle_rom: reads every entry of the N = 8192 table and compares cos and sin with
// round(cos(2*pi*k/N)*2^14) and round(sin(2*pi*k/N)*2^14) computed here; checks the
// one-clock read latency.
`include "tb_util.svh"
module tb_twiddle_rom;
  localparam int N = 8192, Q = N / 4;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  `TB_WATCHDOG(clk, 10000)
  logic [$clog2(Q+1)-1:0] k = 0;
  logic signed [15:0] cos_k, sin_k;
  twiddle_rom #(.N(N), .TW(16)) dut (.*);
  initial begin
    for (int i = 0; i <= Q; i++) begin
      int ec, es;
      ec = $rtoi($floor($cos(6.283185307179586 * i / N) * 16384.0 + 0.5));
      es = $rtoi($floor($sin(6.283185307179586 * i / N) * 16384.0 + 0.5));
      k <= 12'(i);
      @(posedge clk); @(negedge clk);
      `TB_CHECK(int'(cos_k) == ec && int'(sin_k) == es,
                $sformatf("k=%0d got %0d %0d want %0d %0d", i, cos_k, sin_k, ec, es))
    end
    `TB_FINISH
  end
endmodule
