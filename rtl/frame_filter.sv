// frame_filter: passes only well-formed frames, and optionally only one frame in every
// `keep_every`, from the input FIFO toward the frame FIFO of a PCIe-board channel.
//
// A frame starts with a start-of-packet word that carries the link header magic; words seen
// outside such a frame (a lost header, the tail of a frame cut by an input-FIFO overflow)
// are discarded and counted. Of the good frames, one in every keep_every is forwarded and
// the others are dropped whole, which lets the host lower the data rate (keep_every = 0 or
// 1 keeps all). The block is only named in the source material; this behaviour is this
// design's choice.
// Timing: one registered stage, no backpressure (the consumer, flow control, always accepts).
module frame_filter
  import bao_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] keep_every,
  input  logic        in_valid,
  input  logic        in_sop,
  input  logic        in_eop,
  input  logic [63:0] in_data,
  output logic        out_valid,
  output logic        out_sop,
  output logic        out_eop,
  output logic [63:0] out_data,
  output logic [31:0] bad_words,     // words outside a valid frame
  output logic [31:0] skipped        // good frames dropped by decimation
);
  logic        in_frame, passing;
  logic [15:0] phase;

  wire good_sop = in_valid && in_sop && is_link_header(in_data);
  wire keep_now = (keep_every <= 16'd1) || (phase == '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      in_frame  <= 1'b0;
      passing   <= 1'b0;
      phase     <= '0;
      out_valid <= 1'b0;
      out_sop   <= 1'b0;
      out_eop   <= 1'b0;
      out_data  <= '0;
      bad_words <= '0;
      skipped   <= '0;
    end else begin
      out_valid <= 1'b0;
      out_sop   <= 1'b0;
      out_eop   <= 1'b0;
      out_data  <= in_data;
      if (good_sop) begin
        in_frame <= !in_eop;
        passing  <= keep_now;
        phase    <= (keep_every <= 16'd1 || phase == keep_every - 1'b1) ? '0 : phase + 1'b1;
        if (!keep_now) skipped <= skipped + 1;
        out_valid <= keep_now;
        out_sop   <= keep_now;
        out_eop   <= keep_now && in_eop;
      end else if (in_valid && in_frame && !in_sop) begin
        out_valid <= passing;
        out_eop   <= passing && in_eop;
        if (in_eop) in_frame <= 1'b0;
      end else if (in_valid) begin
        // a word with no frame around it, or a start word without the header: if it cuts
        // a frame short, the open frame is closed by flagging this word's slot as its end
        bad_words <= bad_words + 1;
        in_frame  <= 1'b0;
        if (in_frame && passing) begin
          out_valid <= 1'b1;
          out_eop   <= 1'b1;
          out_data  <= '1;          // closes the cut frame with an all-ones filler word
        end
      end
    end
  end
endmodule
