// fft_mag_est: magnitude estimate of the FFT output bins.
// The FFT gives two's complement real and imaginary parts. Both are made
// absolute and the magnitude is estimated without a square root as
//   mag = 15/16 * max(|re|,|im|) + 15/32 * min(|re|,|im|)
// computed with shifts, one comparator and adders:
//   (max - max>>4) + (min>>1 - min>>5).
// The estimate is below 1.41 * 2^(W-1), so it fits W unsigned bits.
// One register stage: mag, index and last appear one cycle after the bin.
// W = 29 is the output width of an unscaled 4096-point FFT of 16-bit
// samples (16 + 12 + 1); the pipelining is this design's own choice.
module fft_mag_est #(
  parameter int unsigned W = 29,
  parameter int unsigned IDX_W = 12
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               in_valid,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  input  logic [IDX_W-1:0]   in_index,
  input  logic               in_last,
  output logic               out_valid,
  output logic [W-1:0]       out_mag,
  output logic [IDX_W-1:0]   out_index,
  output logic               out_last
);
  logic [W-1:0] abs_re, abs_im, mx, mn, est;

  always_comb begin
    abs_re = in_re[W-1] ? W'(-in_re) : W'(in_re);
    abs_im = in_im[W-1] ? W'(-in_im) : W'(in_im);
    if (abs_re >= abs_im) begin mx = abs_re; mn = abs_im; end
    else                  begin mx = abs_im; mn = abs_re; end
    est = (mx - (mx >> 4)) + ((mn >> 1) - (mn >> 5));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0; out_mag <= '0; out_index <= '0; out_last <= 1'b0;
    end else begin
      out_valid <= in_valid;
      out_last  <= in_valid && in_last;
      if (in_valid) begin
        out_mag   <= est;
        out_index <= in_index;
      end
    end
  end
endmodule
