// pattern_source: test-pattern generator and source multiplexer of one PCIe-board channel.
//
// The channel can take its data from the ADC link or from an internal pattern, so that the
// DMA and host software can be tested without an ADC board (the ADC/PATTERN multiplexer is
// the source material's; the pattern itself is this design's own). The pattern is a stream
// of link-format frames: a header word {LINK_MAGIC, frame number, NWORDS}, then NWORDS data
// words {frame number, word index}, then GAP idle clocks. sel = 1 picks the pattern; a change
// of sel takes effect only when both sources are between frames, so no frame is cut.
// Timing: combinational multiplexer plus a registered output stage; no backpressure.
module pattern_source
  import bao_pkg::*;
#(
  parameter int NWORDS = 2049,       // data words per frame (N/4+1 for N = 8192)
  parameter int GAP    = 16          // idle clocks between pattern frames
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        sel,           // 0: ADC link, 1: pattern
  input  logic        link_valid,
  input  logic        link_sop,
  input  logic        link_eop,
  input  logic [63:0] link_data,
  output logic        out_valid,
  output logic        out_sop,
  output logic        out_eop,
  output logic [63:0] out_data,
  output logic        cur_sel        // source currently switched through
);
  // pattern generator
  typedef enum logic [1:0] {P_HDR, P_DATA, P_GAP} pstate_e;
  pstate_e     ps;
  logic [31:0] pframe, pidx;
  logic        p_valid, p_sop, p_eop;
  logic [63:0] p_data;

  always_comb begin
    p_valid = (ps != P_GAP);
    p_sop   = (ps == P_HDR);
    p_eop   = (ps == P_DATA) && (pidx == 32'(NWORDS - 1));
    p_data  = (ps == P_HDR) ? link_header(pframe, 16'(NWORDS)) : {pframe, pidx};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ps <= P_HDR; pframe <= '0; pidx <= '0;
    end else begin
      unique case (ps)
        P_HDR:  begin pidx <= '0; ps <= P_DATA; end
        P_DATA: if (pidx == 32'(NWORDS - 1)) begin pidx <= '0; ps <= P_GAP; end
                else pidx <= pidx + 1;
        P_GAP:  if (pidx == 32'(GAP - 1)) begin
                  pidx <= '0; pframe <= pframe + 1; ps <= P_HDR;
                end else pidx <= pidx + 1;
        default: ps <= P_HDR;
      endcase
    end
  end

  // frame-safe source switch: cur_sel follows sel only while neither source is inside a
  // frame (the link between its eop and its next sop, the pattern in its gap)
  logic in_frame, link_in_frame;
  logic s_valid, s_sop, s_eop;
  logic [63:0] s_data;
  always_comb begin
    if (cur_sel) begin s_valid = p_valid; s_sop = p_sop; s_eop = p_eop; s_data = p_data; end
    else begin s_valid = link_valid; s_sop = link_sop; s_eop = link_eop; s_data = link_data; end
  end

  logic may_switch;
  assign may_switch = !in_frame && !(s_valid && s_sop) && (ps == P_GAP)
                      && !link_in_frame && !(link_valid && link_sop);

  always_ff @(posedge clk) begin
    if (rst) begin
      cur_sel   <= 1'b0;
      in_frame  <= 1'b0;
      link_in_frame <= 1'b0;
      out_valid <= 1'b0;
      out_sop   <= 1'b0;
      out_eop   <= 1'b0;
      out_data  <= '0;
    end else begin
      if (may_switch) cur_sel <= sel;
      if (link_valid && link_sop && !link_eop) link_in_frame <= 1'b1;
      else if (link_valid && link_eop)         link_in_frame <= 1'b0;
      if (s_valid && s_sop && !s_eop) in_frame <= 1'b1;
      else if (s_valid && s_eop)      in_frame <= 1'b0;
      out_valid <= s_valid;
      out_sop   <= s_valid && s_sop;
      out_eop   <= s_valid && s_eop;
      out_data  <= s_data;
    end
  end
endmodule
