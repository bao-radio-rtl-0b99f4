// sync_fifo: single-clock first-in first-out buffer with fill level.
//
// Used on the PCIe board as the 32 KiB input FIFO and the 64 KiB frame FIFO of each channel
// (sizes from the source material; 64-bit words, so 4096 and 8192 entries). Valid/ready on
// both sides; a write while full is dropped and sets the sticky overflow flag, so a source
// without backpressure can be connected. Storage is a plain array (block RAM); the read side
// has a one-entry output register so the data is registered (show-ahead: out_data is valid
// whenever out_valid is high).
// Timing: a word written in clock t can be read in clock t+2; one word per clock each way.
module sync_fifo #(
  parameter int W     = 66,
  parameter int DEPTH = 4096,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data,
  output logic [AW:0]  level,        // words held, output register included
  output logic         overflow
);
  logic [W-1:0] mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic [AW:0]   cnt;                // words in the array

  wire full  = (cnt == (AW+1)'(DEPTH));
  wire empty = (cnt == '0);
  assign in_ready = !full;

  wire wr   = in_valid && !full;
  wire load = !empty && (!out_valid || out_ready);   // move array head to output register

  always_ff @(posedge clk) begin
    if (wr) mem[wptr] <= in_data;
    if (load) out_data <= mem[rptr];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr <= '0; rptr <= '0; cnt <= '0; out_valid <= 1'b0; overflow <= 1'b0;
    end else begin
      if (wr)   wptr <= wptr + 1'b1;
      if (load) rptr <= rptr + 1'b1;
      cnt <= cnt + (AW+1)'(wr) - (AW+1)'(load);
      if (load)           out_valid <= 1'b1;
      else if (out_ready) out_valid <= 1'b0;
      if (in_valid && full) overflow <= 1'b1;
    end
  end

  assign level = cnt + (AW+1)'(out_valid);
endmodule
