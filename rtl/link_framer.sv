// link_framer: puts the spectra of the two channels of the ADC board onto one serial link.
//
// The two real-FFT post-processors run in lockstep (same clock, same start), so each of their
// output clocks gives X[k] and X[N/2-k] for both channels: four 16-bit bins, packed into one
// 64-bit link word {ch1 X[N/2-k], ch1 X[k], ch0 X[N/2-k], ch0 X[k]}. A frame is one header
// word {LINK_MAGIC, frame number, N/4+1} followed by the N/4+1 data words for k = N/4 .. 0.
// Sharing one link between the two 8-bit FFT8k spectra is the source material's; the word
// and header layout is this design's own.
// Timing: the header goes out in the clock where the first bins of a frame arrive and all
// data is delayed by one clock; a post-processor frame leaves N/4-1 idle clocks, so the
// header never collides with data. lock_err is set (sticky) if the channels are not in step.
module link_framer
  import bao_pkg::*;
#(
  parameter int N = 8192
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [1:0]   x_valid,
  input  logic [1:0]   x_sof,
  input  logic [1:0]   x_eof,
  input  cbin_t [1:0]  xa,          // X[k] per channel
  input  cbin_t [1:0]  xb,          // X[N/2-k] per channel
  output logic         link_valid,
  output logic         link_sop,
  output logic         link_eop,
  output logic [63:0]  link_data,
  output logic [31:0]  frame_no,
  output logic         lock_err
);
  localparam int NW = N / 4 + 1;

  logic        d_valid, d_eof;
  logic [63:0] d_word;

  always_ff @(posedge clk) begin
    if (rst) begin
      d_valid    <= 1'b0;
      d_eof      <= 1'b0;
      link_valid <= 1'b0;
      link_sop   <= 1'b0;
      link_eop   <= 1'b0;
      frame_no   <= '0;
      lock_err   <= 1'b0;
    end else begin
      d_valid <= x_valid[0];
      d_eof   <= x_eof[0];
      if (x_valid[0] != x_valid[1] || (x_valid[0] && x_sof[0] != x_sof[1]))
        lock_err <= 1'b1;
      if (x_valid[0] && x_sof[0]) begin
        link_valid <= 1'b1;
        link_sop   <= 1'b1;
        link_eop   <= 1'b0;
        link_data  <= link_header(frame_no, 16'(NW));
        frame_no   <= frame_no + 1;
      end else begin
        link_valid <= d_valid;
        link_sop   <= 1'b0;
        link_eop   <= d_valid && d_eof;
        link_data  <= d_word;
      end
    end
    d_word <= {xb[1], xa[1], xb[0], xa[0]};
  end
endmodule
