// kinect_area_det: shows the user which screen areas the Kinect sees active.
// The depth frame is divided into a DANCE_COLS x DANCE_ROWS grid of dance
// areas and a HAND_COLS x HAND_ROWS grid of hand areas; both grids are
// stretched over the 640x480 screen. For a pixel in an active area this
// layer is valid and gives the area's highlight colour: each hand area its
// own colour from HAND_COLORS, dance areas DANCE_COLOR. Hand areas win.
// Timing: valid/color for (x, y) come two clock cycles later.
// Grid shapes follow the 100-bit dance_areas and 8-bit hand_areas buses;
// the colours are this design's own choice.
module kinect_area_det #(
  parameter int unsigned DANCE_COLS = 10,
  parameter int unsigned DANCE_ROWS = 10,
  parameter int unsigned HAND_COLS = 4,
  parameter int unsigned HAND_ROWS = 2,
  parameter logic [23:0] DANCE_COLOR = 24'hFFFFFF,
  parameter logic [7:0][23:0] HAND_COLORS = {24'hFF00FF, 24'h00FFFF, 24'hFFFF00, 24'h0000FF,
                                             24'h00FF00, 24'hFF0000, 24'hFF8000, 24'h8000FF}
) (
  input  logic                 clk,
  input  logic [DANCE_COLS*DANCE_ROWS-1:0] dance_areas,
  input  logic [7:0]           hand_areas,
  input  haxorus_pkg::coord_t  x,
  input  haxorus_pkg::coord_t  y,
  output logic                 valid,
  output haxorus_pkg::rgb_t    color
);
  import haxorus_pkg::*;
  localparam int unsigned DCW = H_ACTIVE / DANCE_COLS;
  localparam int unsigned DCH = V_ACTIVE / DANCE_ROWS;
  localparam int unsigned HCW = H_ACTIVE / HAND_COLS;
  localparam int unsigned HCH = V_ACTIVE / HAND_ROWS;

  logic       d_on1, h_on1, onscreen1;
  logic [2:0] h_idx1;

  // stage 1: find the areas containing (x, y)
  always_ff @(posedge clk) begin
    logic [15:0] di, hi;
    logic [7:0]  dcol, drow, hcol, hrow;
    dcol = 8'(x / 10'(DCW)); drow = 8'(y / 10'(DCH));
    hcol = 8'(x / 10'(HCW)); hrow = 8'(y / 10'(HCH));
    di = 16'(drow) * 16'(DANCE_COLS) + 16'(dcol);
    hi = 16'(hrow) * 16'(HAND_COLS) + 16'(hcol);
    onscreen1 <= (x < 10'(H_ACTIVE)) && (y < 10'(V_ACTIVE));
    d_on1     <= (di < 16'(DANCE_COLS*DANCE_ROWS)) ? dance_areas[7'(di)] : 1'b0;
    h_on1     <= (hi < 16'd8) ? hand_areas[hi[2:0]] : 1'b0;
    h_idx1    <= hi[2:0];
  end

  // stage 2: colour
  always_ff @(posedge clk) begin
    valid <= onscreen1 && (d_on1 || h_on1);
    color <= h_on1 ? rgb_t'(HAND_COLORS[h_idx1]) : rgb_t'(DANCE_COLOR);
  end
endmodule
