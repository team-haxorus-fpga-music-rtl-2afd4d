// gesture_rec: final gesture recognition from eight hand areas.
// Eight g_monitor instances watch eight equally sized portions of the depth
// frame, laid out HAND_COLS x HAND_ROWS (area k is column k % HAND_COLS,
// row k / HAND_COLS). A gesture is two monitors holding their area active
// when the zero byte (frame_end) comes across the line. Every pair (i<j) of
// areas is one gesture, numbered in order (0,1),(0,2),...,(6,7), 28 in all.
// Pairs 0..25 go out as the gestures vector for the graphics engine; pair 26
// is volume up and pair 27 volume down. All outputs are one-cycle pulses,
// one cycle after frame_end. hand_areas shows the monitors' live state.
// This design's own choices: the 4x2 layout, that exactly two active areas
// are required (three or more give no gesture), and the pair numbering.
module gesture_rec #(
  parameter int unsigned FRAME_W = 320,
  parameter int unsigned FRAME_H = 240,
  parameter int unsigned HAND_COLS = 4,
  parameter int unsigned HAND_ROWS = 2,
  parameter int unsigned COUNT_THRESH = 800
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        pix_valid,
  input  logic [9:0]  pix_x,
  input  logic [9:0]  pix_y,
  input  logic [7:0]  pix_depth,
  input  logic [7:0]  depth_thresh,
  input  logic        frame_end,
  output logic [7:0]  hand_areas,
  output logic [haxorus_pkg::N_GESTURES-1:0] gestures,
  output logic        vol_up,
  output logic        vol_down
);
  localparam int unsigned N_AREAS = 8;
  localparam int unsigned N_PAIRS = N_AREAS * (N_AREAS - 1) / 2;
  localparam int unsigned AW = FRAME_W / HAND_COLS;
  localparam int unsigned AH = FRAME_H / HAND_ROWS;

  for (genvar k = 0; k < N_AREAS; k++) begin : g_area
    g_monitor #(
      .X_LO((k % HAND_COLS) * AW), .X_HI((k % HAND_COLS + 1) * AW),
      .Y_LO((k / HAND_COLS) * AH), .Y_HI((k / HAND_COLS + 1) * AH),
      .COUNT_THRESH(COUNT_THRESH)
    ) u_mon (
      .clk, .rst, .pix_valid, .pix_x, .pix_y, .pix_depth, .depth_thresh,
      .active(hand_areas[k])
    );
  end

  logic [N_PAIRS-1:0] pair_now;
  always_comb begin
    int unsigned p;
    p = 0;
    pair_now = '0;
    for (int i = 0; i < N_AREAS; i++)
      for (int j = i + 1; j < N_AREAS; j++) begin
        pair_now[p] = hand_areas[i] && hand_areas[j] && ($countones(hand_areas) == 2);
        p++;
      end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      gestures <= '0; vol_up <= 1'b0; vol_down <= 1'b0;
    end else begin
      gestures <= frame_end ? pair_now[haxorus_pkg::N_GESTURES-1:0] : '0;
      vol_up   <= frame_end && pair_now[26];
      vol_down <= frame_end && pair_now[27];
    end
  end
endmodule
