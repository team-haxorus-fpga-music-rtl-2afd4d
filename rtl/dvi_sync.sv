// dvi_sync: sync generator of the DVI output.
// Produces the horizontal and vertical sync (active low) for the monitor and
// the current pixel position X/Y for the graphics engine. The system clock
// runs CLK_DIV times faster than the pixel clock (100 MHz against 50 MHz):
// each pixel lasts CLK_DIV system cycles, and pix_en is high in the first of
// them, the cycle in which X/Y have just changed. X counts 0..H_TOTAL-1 and
// Y 0..V_TOTAL-1; de marks the 640x480 visible area. Visible pixels are
// counted, and switch_buf pulses for one cycle every 307,200 (640x480)
// pixels, at the last visible pixel of the frame, telling the graphics
// engine to swap its double buffers.
// Porch and sync widths are the standard 640x480 ones (own choice); at a
// 50 MHz pixel clock they give a 119 Hz frame rate.
module dvi_sync #(
  parameter int unsigned CLK_DIV  = 2,
  parameter int unsigned H_ACTIVE = 640,
  parameter int unsigned H_FP     = 16,
  parameter int unsigned H_SYNC   = 96,
  parameter int unsigned H_BP     = 48,
  parameter int unsigned V_ACTIVE = 480,
  parameter int unsigned V_FP     = 10,
  parameter int unsigned V_SYNC   = 2,
  parameter int unsigned V_BP     = 33
) (
  input  logic       clk,
  input  logic       rst,
  output logic       pix_en,
  output logic [9:0] x,
  output logic [9:0] y,
  output logic       de,
  output logic       hsync_n,
  output logic       vsync_n,
  output logic       switch_buf
);
  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;
  localparam int unsigned FRAME_PIXELS = H_ACTIVE * V_ACTIVE;

  logic [$clog2(CLK_DIV+1)-1:0] ph;
  logic [18:0] pix_cnt;
  logic        last_ph;

  assign last_ph = (ph == ($bits(ph))'(CLK_DIV - 1));
  assign pix_en  = (ph == '0);
  assign de      = (x < 10'(H_ACTIVE)) && (y < 10'(V_ACTIVE));
  assign hsync_n = !((x >= 10'(H_ACTIVE + H_FP)) && (x < 10'(H_ACTIVE + H_FP + H_SYNC)));
  assign vsync_n = !((y >= 10'(V_ACTIVE + V_FP)) && (y < 10'(V_ACTIVE + V_FP + V_SYNC)));

  always_ff @(posedge clk) begin
    if (rst) begin
      ph <= '0; x <= '0; y <= '0; pix_cnt <= '0; switch_buf <= 1'b0;
    end else begin
      switch_buf <= 1'b0;
      ph <= last_ph ? '0 : ph + 1'b1;
      if (pix_en && de) begin
        if (pix_cnt == 19'(FRAME_PIXELS - 1)) begin
          pix_cnt    <= '0;
          switch_buf <= 1'b1;
        end else pix_cnt <= pix_cnt + 1'b1;
      end
      if (last_ph) begin
        if (x == 10'(H_TOTAL - 1)) begin
          x <= '0;
          y <= (y == 10'(V_TOTAL - 1)) ? '0 : y + 1'b1;
        end else x <= x + 1'b1;
      end
    end
  end
endmodule
