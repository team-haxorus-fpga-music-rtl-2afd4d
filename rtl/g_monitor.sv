// g_monitor: activity monitor for one rectangular area of the depth frame.
// Each depth pixel inside [X_LO,X_HI) x [Y_LO,Y_HI) whose value is below
// depth_thresh (set by board switches; smaller means closer) increments
// pixel_count. When the count reaches COUNT_THRESH the area is held active
// until the same area comes across the line again: the first pixel of the
// area in the next frame clears the count and the active flag.
// Timing: active rises the cycle after the pixel that reaches the threshold.
// The window and both thresholds follow the description; the default
// COUNT_THRESH is this design's own number.
module g_monitor #(
  parameter int unsigned X_LO = 0,
  parameter int unsigned X_HI = 80,
  parameter int unsigned Y_LO = 0,
  parameter int unsigned Y_HI = 120,
  parameter int unsigned COUNT_THRESH = 800
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       pix_valid,
  input  logic [9:0] pix_x,
  input  logic [9:0] pix_y,
  input  logic [7:0] pix_depth,
  input  logic [7:0] depth_thresh,
  output logic       active
);
  localparam int unsigned CW = $clog2(COUNT_THRESH + 1);
  logic [CW-1:0] pixel_count;
  logic in_area, first, close;

  // one unsigned compare per axis: x - X_LO wraps to a large value when x < X_LO
  assign in_area = (10'(pix_x - 10'(X_LO)) < 10'(X_HI - X_LO)) &&
                   (10'(pix_y - 10'(Y_LO)) < 10'(Y_HI - Y_LO));
  assign first   = (pix_x == 10'(X_LO)) && (pix_y == 10'(Y_LO));
  assign close   = pix_depth < depth_thresh;

  always_ff @(posedge clk) begin
    if (rst) begin
      pixel_count <= '0;
      active      <= 1'b0;
    end else if (pix_valid && in_area) begin
      if (first) begin
        pixel_count <= CW'(close);
        active      <= close && (COUNT_THRESH <= 1);
      end else if (close && !active) begin
        pixel_count <= pixel_count + 1'b1;
        if (pixel_count + 1'b1 >= CW'(COUNT_THRESH)) active <= 1'b1;
      end
    end
  end
endmodule
