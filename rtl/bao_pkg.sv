// bao_pkg: types and constants shared by the ADC-board and PCIe-board FPGA designs.
//
// - cbin_t: one complex value of 8-bit real and 8-bit imaginary parts (two's complement).
//   The block RAM of the real-FFT post-processor is 16 bits wide, so a stored complex FFT
//   output and an output spectrum bin are both this 16-bit pair.
// - Link frame format (this design's own choice, the source material only says that two
//   8-bit FFT8k spectra share one serial link): one header word, then NWORDS data words.
//   Header = {LINK_MAGIC[63:48], frame number[47:16], number of data words[15:0]}.
//   Data word = {ch1 X[N/2-k], ch1 X[k], ch0 X[N/2-k], ch0 X[k]}, k = N/4 down to 0.
// - Stream beat (st_beat_t): 64-bit data with start/end of packet flags, as carried between
//   the FIFOs, the frame filter, the flow control and the DMA on the PCIe board.
// - DMA descriptor: two 64-bit words in descriptor RAM (own layout, modelled on a
//   scatter-gather descriptor): word 0 = {next descriptor index[63:32], destination byte
//   address[31:0]}; word 1 = {OWNED_BY_HW[63], EOP seen[48], words written[47:32],
//   buffer length in 64-bit words[15:0]}.
package bao_pkg;

  typedef struct packed {
    logic signed [7:0] re;
    logic signed [7:0] im;
  } cbin_t;

  localparam logic [15:0] LINK_MAGIC = 16'hBA0F;
  localparam int LINK_W = 64;

  typedef struct packed {
    logic              sop;
    logic              eop;
    logic [LINK_W-1:0] data;
  } st_beat_t;

  localparam int ST_W = LINK_W + 2;

  function automatic logic [63:0] link_header(input logic [31:0] frame_no,
                                              input logic [15:0] nwords);
    return {LINK_MAGIC, frame_no, nwords};
  endfunction

  function automatic logic is_link_header(input logic [63:0] w);
    return w[63:48] == LINK_MAGIC;
  endfunction

  // Descriptor word 1 fields
  localparam int D_OWNED = 63;
  localparam int D_EOP   = 48;

  function automatic logic [63:0] desc_word0(input logic [31:0] next_idx,
                                             input logic [31:0] dest_addr);
    return {next_idx, dest_addr};
  endfunction

  function automatic logic [63:0] desc_word1(input logic owned, input logic eop,
                                             input logic [15:0] done_words,
                                             input logic [15:0] len_words);
    return {owned, 14'd0, eop, done_words, 16'd0, len_words};
  endfunction

endpackage
