// dvi_out: pixel interface to the Chrontel 7301C DVI transmitter.
// The transmitter takes a 24-bit pixel as two 12-bit halves, one on each
// edge of its pixel clock XCLK. The system clock is twice the pixel clock,
// so each half is driven for one system cycle: in the cycle after pix_en
// (first cycle of a pixel) dvi_d = {G[3:0], B[7:0]} with XCLK low, in the
// next dvi_d = {R[7:0], G[7:4]} with XCLK high. de/hsync/vsync are
// registered with the first half. XCLK-N is the inverse of XCLK-P.
// The half order is the transmitter's 12-bit multiplexed input format and
// the edge alignment is this design's choice (the transmitter's clock delay
// setting is expected to centre the sampling point).
module dvi_out (
  input  logic              clk,
  input  logic              rst,
  input  logic              pix_en,
  input  haxorus_pkg::rgb_t pixel,
  input  logic              de,
  input  logic              hsync_n,
  input  logic              vsync_n,
  output logic [11:0]       dvi_d,
  output logic              dvi_de,
  output logic              dvi_hsync_n,
  output logic              dvi_vsync_n,
  output logic              dvi_xclk_p,
  output logic              dvi_xclk_n,
  output logic              dvi_reset_n
);
  logic [11:0] hold;   // second half of the pixel
  logic second;

  always_ff @(posedge clk) begin
    if (rst) begin
      hold <= '0; second <= 1'b0; dvi_d <= '0; dvi_de <= 1'b0;
      dvi_hsync_n <= 1'b1; dvi_vsync_n <= 1'b1;
      dvi_xclk_p <= 1'b0; dvi_xclk_n <= 1'b1; dvi_reset_n <= 1'b0;
    end else begin
      dvi_reset_n <= 1'b1;
      if (pix_en) begin
        hold        <= {pixel.r, pixel.g[7:4]};
        dvi_d       <= {pixel.g[3:0], pixel.b};
        dvi_de      <= de;
        dvi_hsync_n <= hsync_n;
        dvi_vsync_n <= vsync_n;
        dvi_xclk_p  <= 1'b0;
        dvi_xclk_n  <= 1'b1;
        second      <= 1'b1;
      end else if (second) begin
        dvi_d      <= hold;
        dvi_xclk_p <= 1'b1;
        dvi_xclk_n <= 1'b0;
        second     <= 1'b0;
      end
    end
  end
endmodule
