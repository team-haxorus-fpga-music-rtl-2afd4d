// fft_model: behavioural stand-in for the streaming FFT core, for
// simulation only. It is not a Fourier transform: after every BLOCK input
// samples it streams 4096 bins in natural order, one per clock, whose real
// part falls linearly over the first 512 bins from 2^13 times the block's
// mean absolute sample, with the imaginary part minus half of it, and zero
// above bin 511. done marks bin 4095. This gives the magnitude and
// frequency-wave logic a spectrum that follows the music's loudness.
module fft_model #(
  parameter int BLOCK = 4096
) (
  input  logic              clk,
  input  logic              in_valid,
  input  logic signed [15:0] in_re,
  output logic              out_valid,
  output logic signed [28:0] out_re,
  output logic signed [28:0] out_im,
  output logic [11:0]       out_index,
  output logic              out_done,
  output int                frames
);
  int n = 0, acc = 0, level = 0, b = -1;
  initial begin out_valid = 0; out_re = 0; out_im = 0; out_index = 0; out_done = 0; frames = 0; end

  always @(posedge clk) begin
    if (in_valid) begin
      acc += (in_re < 0) ? -int'(in_re) : int'(in_re);
      n++;
      if (n == BLOCK) begin
        level = acc / BLOCK; acc = 0; n = 0;
        if (b < 0) b = 0;
      end
    end
    if (b >= 0) begin
      longint v;
      v = (b < 512) ? (longint'(level) * (512 - b) * 16) : 0;
      out_valid <= 1; out_index <= 12'(b);
      out_re <= 29'(v); out_im <= 29'(-(v / 2));
      out_done <= (b == 4095);
      if (b == 4095) begin b = -1; frames++; end else b++;
    end else begin
      out_valid <= 0; out_done <= 0;
    end
  end
endmodule
