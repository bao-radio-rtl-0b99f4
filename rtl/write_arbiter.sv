// write_arbiter: merges the write masters of the DMA channels onto the single write port of
// the PCIe endpoint.
//
// Avalon-MM style: a master holds write, address and data until waitrequest is low. The grant
// stays with a master for the whole of one write and then passes round-robin to the next
// requesting master, so each channel gets at least every NM-th transfer. Non-granted masters
// see waitrequest high. Two channels share the endpoint in the source material; the
// round-robin policy is this design's choice.
// Timing: combinational path from the granted master to the slave port; grant is a register.
module write_arbiter #(
  parameter int NM = 2
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic [NM-1:0]         m_write,
  input  logic [NM-1:0][31:0]   m_address,
  input  logic [NM-1:0][63:0]   m_writedata,
  output logic [NM-1:0]         m_waitrequest,
  output logic                  s_write,
  output logic [31:0]           s_address,
  output logic [63:0]           s_writedata,
  output logic [$clog2(NM)-1:0] s_master,      // which master owns the current write
  input  logic                  s_waitrequest
);
  localparam int GW = $clog2(NM);
  logic [GW-1:0] grant, next;

  always_comb begin
    next = grant;
    for (int i = 1; i <= NM; i++) begin
      automatic int c = (int'(grant) + i) % NM;
      if (m_write[c]) begin next = GW'(c); break; end
    end
  end

  assign s_write     = m_write[grant];
  assign s_address   = m_address[grant];
  assign s_writedata = m_writedata[grant];
  assign s_master    = grant;

  always_comb begin
    m_waitrequest        = '1;
    m_waitrequest[grant] = s_waitrequest;
  end

  // move on after a completed write, or when the owner is idle
  always_ff @(posedge clk) begin
    if (rst) grant <= '0;
    else if (!m_write[grant] || !s_waitrequest) grant <= next;
  end

  // a master that is kept waiting must hold its request steady
  for (genvar i = 0; i < NM; i++) begin : g_chk
    property p_hold;
      @(posedge clk) disable iff (rst)
        (m_write[i] && m_waitrequest[i]) |=> (m_write[i] && $stable(m_address[i]) && $stable(m_writedata[i]));
    endproperty
    a_hold: assert property (p_hold) else $error("master %0d changed a pending write", i);
  end
endmodule
