// adc_framer: turns the ADC stream of one channel into frames for the N/2-point complex FFT.
//
// Each 250 MHz clock the ADC delivers 16 bits holding two consecutive 8-bit time samples.
// The real signal s is packed into the complex signal c[i] = s[2i] + j*s[2i+1], so one ADC
// word gives one complex FFT input (this packing is the source material's; the low byte being
// the earlier sample is this design's choice). Samples are counted 0..N/2-1 within a frame
// and c_sop/c_eop mark the first and last one.
// Acquisition is gated by start/stop pulses: a start arms the channel and the next frame
// begins with the next ADC word; a stop lets the current frame finish and then no new frame
// begins, so the FFT core only ever sees whole frames (this frame-boundary rule is this
// design's choice; the board only names start/stop control ports).
// Timing: one registered stage, one complex sample out per valid ADC word, no backpressure.
module adc_framer #(
  parameter int N  = 8192,           // real-FFT length (complex frame is N/2 samples)
  parameter int SW = 8               // bits per time sample
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [2*SW-1:0]      adc_data,   // {s[2i+1], s[2i]}
  input  logic                 adc_valid,
  input  logic                 start,
  input  logic                 stop,
  output logic signed [SW-1:0] c_re,
  output logic signed [SW-1:0] c_im,
  output logic                 c_valid,
  output logic                 c_sop,
  output logic                 c_eop,
  output logic                 running,    // a frame is in progress or will start
  output logic [31:0]          frames      // completed frames
);
  localparam int M  = N / 2;
  localparam int IW = $clog2(M);

  logic [IW-1:0] idx;
  logic          armed;        // acquisition enabled
  logic          in_frame;     // idx > 0: inside a frame

  assign running = armed | in_frame;

  always_ff @(posedge clk) begin
    if (rst) begin
      idx      <= '0;
      armed    <= 1'b0;
      in_frame <= 1'b0;
      c_valid  <= 1'b0;
      c_sop    <= 1'b0;
      c_eop    <= 1'b0;
      c_re     <= '0;
      c_im     <= '0;
      frames   <= '0;
    end else begin
      if (start)     armed <= 1'b1;
      else if (stop) armed <= 1'b0;
      c_valid <= 1'b0;
      c_sop   <= 1'b0;
      c_eop   <= 1'b0;
      if (adc_valid && (in_frame || armed)) begin
        c_re    <= adc_data[SW-1:0];
        c_im    <= adc_data[2*SW-1:SW];
        c_valid <= 1'b1;
        c_sop   <= (idx == '0);
        c_eop   <= (idx == IW'(M - 1));
        if (idx == IW'(M - 1)) begin
          idx      <= '0;
          in_frame <= 1'b0;
          frames   <= frames + 1;
        end else begin
          idx      <= idx + 1'b1;
          in_frame <= 1'b1;
        end
      end
    end
  end
endmodule
