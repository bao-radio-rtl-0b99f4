// adc_fpga: datapath of the ADC-board FPGA for two channels, from ADC words to one framed
// serial-link stream of N-point spectra.
//
// Per channel: adc_framer packs each 16-bit ADC word (two 8-bit samples at 250 MHz, i.e.
// 500 MS/s) into one complex sample c[i] = s[2i] + j*s[2i+1] and frames N/2 of them; the
// N/2-point complex FFT core (vendor IP, outside this module: fft_in_* out, fft_out_* in)
// transforms them; rfft_post turns its output into bins 0..N/2 of the N-point real FFT.
// link_framer then puts both channels' 8-bit spectra on one link, as in the board's two-channel
// FFT8192 firmware. Both channels share start/stop so their frames stay in step.
// Timing: everything runs on the ADC clock; a frame enters in N/2 clocks and its spectrum
// leaves in N/4+2 link words (header included), so the link is busy about half the time.
module adc_fpga
  import bao_pkg::*;
#(
  parameter int N  = 8192,
  localparam int NCH = 2
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic [NCH-1:0][15:0]  adc_data,
  input  logic [NCH-1:0]        adc_valid,
  input  logic                  start,
  input  logic                  stop,
  // to the complex FFT cores
  output logic [NCH-1:0]        fft_in_valid,
  output logic [NCH-1:0]        fft_in_sop,
  output logic [NCH-1:0]        fft_in_eop,
  output cbin_t [NCH-1:0]       fft_in,
  // from the complex FFT cores (natural order, sop on bin 0)
  input  logic [NCH-1:0]        fft_out_valid,
  input  logic [NCH-1:0]        fft_out_sop,
  input  cbin_t [NCH-1:0]       fft_out,
  // serial link transmitter side
  output logic                  link_valid,
  output logic                  link_sop,
  output logic                  link_eop,
  output logic [63:0]           link_data,
  output logic [31:0]           link_frames,
  output logic                  lock_err,
  output logic [NCH-1:0]        running
);
  localparam int KW = $clog2(N/4+1);

  logic [NCH-1:0] x_valid, x_sof, x_eof;
  cbin_t [NCH-1:0] xa, xb;

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    logic [31:0] frames;
    adc_framer #(.N(N), .SW(8)) u_framer (
      .clk, .rst, .adc_data(adc_data[c]), .adc_valid(adc_valid[c]), .start, .stop,
      .c_re(fft_in[c].re), .c_im(fft_in[c].im), .c_valid(fft_in_valid[c]),
      .c_sop(fft_in_sop[c]), .c_eop(fft_in_eop[c]), .running(running[c]), .frames);

    logic [KW-1:0] x_k;
    rfft_post #(.N(N), .DW(8), .OW(8), .TW(16)) u_post (
      .clk, .rst, .z_valid(fft_out_valid[c]), .z_sop(fft_out_sop[c]),
      .z_re(fft_out[c].re), .z_im(fft_out[c].im),
      .x_valid(x_valid[c]), .x_sof(x_sof[c]), .x_eof(x_eof[c]), .x_k,
      .xa_re(xa[c].re), .xa_im(xa[c].im), .xb_re(xb[c].re), .xb_im(xb[c].im));
  end

  link_framer #(.N(N)) u_link (
    .clk, .rst, .x_valid, .x_sof, .x_eof, .xa, .xb,
    .link_valid, .link_sop, .link_eop, .link_data, .frame_no(link_frames), .lock_err);
endmodule
