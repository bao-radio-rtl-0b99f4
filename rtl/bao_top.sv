// bao_top: the digital part of the multi-channel radio-telescope acquisition chain.
//
// Two FPGA designs stand side by side, as on the real system:
//  - the ADC-board FPGA (adc_fpga, ADC clock 250 MHz): two channels of 500 MS/s samples are
//    framed, transformed by N/2-point complex FFT cores and post-processed into N-point real
//    spectra, which are framed onto one serial link;
//  - the PCIe-board FPGA (pcie_fpga, 125.6 MHz): two fibre channels are buffered, filtered,
//    admitted frame by frame and written to host memory by scatter-gather DMA.
// What joins and surrounds them is not logic of this design and appears as ports: the
// complex FFT cores (fft_*), the optical link between the boards (link_* out of the ADC
// board, rx_* into the PCIe board), the PCIe endpoint (h_* host accesses, txm_* writes to
// host memory). A testbench closes these loops with models.
module bao_top
  import bao_pkg::*;
#(
  parameter int N = 8192
) (
  input  logic                clk_adc,
  input  logic                rst_adc,
  input  logic                clk_pcie,
  input  logic                rst_pcie,
  // ADC board
  input  logic [1:0][15:0]    adc_data,
  input  logic [1:0]          adc_valid,
  input  logic                start,
  input  logic                stop,
  output logic [1:0]          fft_in_valid,
  output logic [1:0]          fft_in_sop,
  output logic [1:0]          fft_in_eop,
  output cbin_t [1:0]         fft_in,
  input  logic [1:0]          fft_out_valid,
  input  logic [1:0]          fft_out_sop,
  input  cbin_t [1:0]         fft_out,
  output logic                link_valid,
  output logic                link_sop,
  output logic                link_eop,
  output logic [63:0]         link_data,
  output logic [31:0]         link_frames,
  output logic                lock_err,
  output logic [1:0]          running,
  // PCIe board
  input  logic [1:0]          rx_valid,
  input  logic [1:0]          rx_sop,
  input  logic [1:0]          rx_eop,
  input  logic [1:0][63:0]    rx_data,
  input  logic [15:0]         h_addr,
  input  logic                h_write,
  input  logic [63:0]         h_wdata,
  input  logic                h_read,
  output logic [63:0]         h_rdata,
  output logic                h_rdvalid,
  output logic                txm_write,
  output logic [31:0]         txm_address,
  output logic [63:0]         txm_writedata,
  input  logic                txm_waitrequest,
  output logic [1:0]          irq
);
  adc_fpga #(.N(N)) u_adc (
    .clk(clk_adc), .rst(rst_adc), .adc_data, .adc_valid, .start, .stop,
    .fft_in_valid, .fft_in_sop, .fft_in_eop, .fft_in, .fft_out_valid, .fft_out_sop, .fft_out,
    .link_valid, .link_sop, .link_eop, .link_data, .link_frames, .lock_err, .running);

  pcie_fpga #(.NCH(2), .MAXFRAME(N / 4 + 2), .PAT_WORDS(N / 4 + 1)) u_pcie (
    .clk(clk_pcie), .rst(rst_pcie), .rx_valid, .rx_sop, .rx_eop, .rx_data,
    .h_addr, .h_write, .h_wdata, .h_read, .h_rdata, .h_rdvalid,
    .txm_write, .txm_address, .txm_writedata, .txm_waitrequest, .irq);
endmodule
