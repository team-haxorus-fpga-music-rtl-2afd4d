// kinect_in: the Kinect input path of the visualizer.
// Depth bytes arrive on serial_in from the host computer (one quarter of the
// pixels of each 640x480 depth frame, 8 most significant bits each, a zero
// byte after each frame). uart_byte_rx turns the line into bytes,
// pixel_pos gives each byte its x/y, and two sets of g_monitor areas watch
// the frame: a DANCE_COLS x DANCE_ROWS grid of dance areas (bit
// row*DANCE_COLS+col of dance_areas) shown on screen, and the eight hand
// areas of gesture_rec, which produce gesture and volume pulses at the end
// of each frame. depth_thresh comes from the board switches.
// The 10x10 dance grid follows the 100-bit dance_areas bus of the graphics
// engine; its cell layout and count threshold are this design's own.
module kinect_in #(
  parameter int unsigned CLKS_PER_BIT = 200,
  parameter int unsigned FRAME_W = 320,
  parameter int unsigned FRAME_H = 240,
  parameter int unsigned DANCE_COLS = 10,
  parameter int unsigned DANCE_ROWS = 10,
  parameter int unsigned HAND_COUNT_THRESH = 800,
  parameter int unsigned DANCE_COUNT_THRESH = 100
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        serial_in,
  input  logic [7:0]  depth_thresh,
  output logic [DANCE_COLS*DANCE_ROWS-1:0] dance_areas,
  output logic [7:0]  hand_areas,
  output logic [haxorus_pkg::N_GESTURES-1:0] gestures,
  output logic        vol_up,
  output logic        vol_down
);
  localparam int unsigned CW = FRAME_W / DANCE_COLS;
  localparam int unsigned CH = FRAME_H / DANCE_ROWS;

  logic [7:0] rx_byte;
  logic       rx_valid;
  logic       pix_valid, frame_end;
  logic [9:0] pix_x, pix_y;
  logic [7:0] pix_depth;

  uart_byte_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst, .serial_in, .byte_out(rx_byte), .byte_valid(rx_valid));

  pixel_pos #(.FRAME_W(FRAME_W), .FRAME_H(FRAME_H)) u_pos (
    .clk, .rst, .byte_valid(rx_valid), .byte_in(rx_byte),
    .pix_valid, .pix_x, .pix_y, .pix_depth, .frame_end);

  for (genvar r = 0; r < DANCE_ROWS; r++) begin : g_row
    for (genvar c = 0; c < DANCE_COLS; c++) begin : g_col
      g_monitor #(
        .X_LO(c * CW), .X_HI((c + 1) * CW), .Y_LO(r * CH), .Y_HI((r + 1) * CH),
        .COUNT_THRESH(DANCE_COUNT_THRESH)
      ) u_mon (
        .clk, .rst, .pix_valid, .pix_x, .pix_y, .pix_depth, .depth_thresh,
        .active(dance_areas[r*DANCE_COLS + c])
      );
    end
  end

  gesture_rec #(
    .FRAME_W(FRAME_W), .FRAME_H(FRAME_H), .COUNT_THRESH(HAND_COUNT_THRESH)
  ) u_gest (
    .clk, .rst, .pix_valid, .pix_x, .pix_y, .pix_depth, .depth_thresh,
    .frame_end, .hand_areas, .gestures, .vol_up, .vol_down);
endmodule
