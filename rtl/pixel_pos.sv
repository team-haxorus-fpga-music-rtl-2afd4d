// pixel_pos: pixel position monitor for the Kinect depth stream.
// Every non-zero byte from the serial reader is one depth pixel of a
// FRAME_W x FRAME_H frame sent in raster order; a zero byte is never a depth
// value and marks the end of a frame. The monitor keeps the position of the
// next pixel and, one cycle after each byte, presents the byte as pix_depth
// with its pix_x/pix_y and a one-cycle pix_valid, or a one-cycle frame_end
// for the zero byte, which also returns the position to (0,0).
// The host sends one quarter of the 640x480 depth pixels; this design takes
// that to be every second pixel of every second row, 320x240 (own choice).
module pixel_pos #(
  parameter int unsigned FRAME_W = 320,
  parameter int unsigned FRAME_H = 240
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       byte_valid,
  input  logic [7:0] byte_in,
  output logic       pix_valid,
  output logic [9:0] pix_x,
  output logic [9:0] pix_y,
  output logic [7:0] pix_depth,
  output logic       frame_end
);
  logic [9:0] nx, ny;

  always_ff @(posedge clk) begin
    if (rst) begin
      nx <= '0; ny <= '0;
      pix_valid <= 1'b0; frame_end <= 1'b0;
      pix_x <= '0; pix_y <= '0; pix_depth <= '0;
    end else begin
      pix_valid <= 1'b0;
      frame_end <= 1'b0;
      if (byte_valid) begin
        if (byte_in == 8'd0) begin
          frame_end <= 1'b1;
          nx <= '0; ny <= '0;
        end else begin
          pix_valid <= 1'b1;
          pix_x     <= nx;
          pix_y     <= ny;
          pix_depth <= byte_in;
          if (nx == 10'(FRAME_W - 1)) begin
            nx <= '0;
            ny <= (ny == 10'(FRAME_H - 1)) ? '0 : ny + 1'b1;
          end else nx <= nx + 1'b1;
        end
      end
    end
  end
endmodule
