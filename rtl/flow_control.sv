// flow_control: whole-frame admission into the frame FIFO of a PCIe-board channel.
//
// The data arriving from the ADC link cannot be stalled. When the host or the PCIe link falls
// behind, the frame FIFO fills; instead of letting it overflow in the middle of a frame, this
// block decides at each start of frame: if the FIFO has room for a whole frame (MAXFRAME
// words, plus a margin of two words for the words already in flight) the frame is admitted,
// otherwise the whole frame is dropped and counted. The host therefore only ever receives
// complete frames. The block is only named in the source material; this rule is this
// design's choice.
// Timing: one registered stage; `free_words` is the FIFO's free space, which may lag by a
// clock (covered by the margin).
module flow_control #(
  parameter int MAXFRAME = 2050,     // header + N/4+1 data words
  parameter int LW       = 14
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          in_valid,
  input  logic          in_sop,
  input  logic          in_eop,
  input  logic [63:0]   in_data,
  input  logic [LW-1:0] free_words,
  output logic          out_valid,
  output logic          out_sop,
  output logic          out_eop,
  output logic [63:0]   out_data,
  output logic [31:0]   admitted,
  output logic [31:0]   dropped
);
  logic accepting;

  wire room = 32'(free_words) >= 32'(MAXFRAME + 2);

  always_ff @(posedge clk) begin
    if (rst) begin
      accepting <= 1'b0;
      out_valid <= 1'b0;
      out_sop   <= 1'b0;
      out_eop   <= 1'b0;
      out_data  <= '0;
      admitted  <= '0;
      dropped   <= '0;
    end else begin
      out_valid <= 1'b0;
      out_sop   <= 1'b0;
      out_eop   <= 1'b0;
      out_data  <= in_data;
      if (in_valid && in_sop) begin
        accepting <= room && !in_eop;
        if (room) admitted <= admitted + 1;
        else      dropped  <= dropped + 1;
        out_valid <= room;
        out_sop   <= room;
        out_eop   <= room && in_eop;
      end else if (in_valid && accepting) begin
        out_valid <= 1'b1;
        out_eop   <= in_eop;
        if (in_eop) accepting <= 1'b0;
      end
    end
  end
endmodule
