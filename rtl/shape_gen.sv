// shape_gen: bouncing shapes, unrelated to the music.
// N_SHAPES shapes, all circles or all squares, each with a random centre,
// radius, colour, speed and a horizontal and vertical direction. Once per
// frame (frame_tick) each shape moves by its speed; when it hits the left or
// right wall its horizontal direction turns, and likewise the top and bottom
// walls turn the vertical direction. A circle covers the pixels with
//   (X-cx)^2 + (Y-cy)^2 <= r^2     (one multiplier per term),
// a square those with |X-cx| <= r and |Y-cy| <= r. The first shape that
// covers the pixel gives its colour.
// Gestures: cmd_rand gives every shape new random parameters, cmd_type
// switches circles/squares, cmd_onoff turns the shapes on or off. After reset
// the shapes take random parameters at the first frame.
// Timing: valid/color for (x, y) come two clock cycles later.
// Shape count, radius range (8..71) and speed range (1..4) are own choices.
module shape_gen #(
  parameter int unsigned N_SHAPES = 4
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 frame_tick,
  input  logic [7:0][7:0]      rnd,
  input  logic                 cmd_rand,
  input  logic                 cmd_type,
  input  logic                 cmd_onoff,
  input  haxorus_pkg::coord_t  x,
  input  haxorus_pkg::coord_t  y,
  output logic                 valid,
  output haxorus_pkg::rgb_t    color
);
  import haxorus_pkg::*;

  typedef struct packed {
    logic [9:0] cx;
    logic [9:0] cy;
    logic [6:0] r;
    logic [2:0] speed;
    logic       left;   // moving towards smaller x
    logic       up;     // moving towards smaller y
    rgb_t       color;
  } shape_t;

  shape_t [N_SHAPES-1:0] sh;
  logic   is_square, enabled, need_init;
  logic [N_SHAPES-1:0] hit1;
  rgb_t   [N_SHAPES-1:0] col1;
  logic   en1;

  function automatic shape_t rand_shape(input logic [7:0][7:0] r, input int unsigned i);
    shape_t s;
    logic [7:0] a, b, c, d;
    a = r[i % 8]; b = r[(i + 3) % 8]; c = r[(i + 5) % 8]; d = r[(i + 6) % 8];
    s.r     = 7'd8 + 7'(a[5:0]);
    s.cx    = 10'd80 + 10'({b, 1'b0});       // 80..590
    s.cy    = 10'd80 + 10'(c) + 10'(c[7:2]); // 80..398
    s.speed = 3'd1 + 3'(d[1:0]);
    s.left  = d[2];
    s.up    = d[3];
    s.color = '{r: a ^ 8'h80, g: b ^ c, b: d};
    return s;
  endfunction

  function automatic shape_t move(input shape_t s);
    shape_t n;
    logic [10:0] lo, hi;
    n = s;
    lo = 11'(s.cx) - 11'(s.speed);
    hi = 11'(s.cx) + 11'(s.speed);
    if (s.left) begin
      if (lo[10] || lo <= 11'(s.r)) n.left = 1'b0; else n.cx = lo[9:0];
    end else begin
      if (hi + 11'(s.r) >= 11'(H_ACTIVE - 1)) n.left = 1'b1; else n.cx = hi[9:0];
    end
    lo = 11'(s.cy) - 11'(s.speed);
    hi = 11'(s.cy) + 11'(s.speed);
    if (s.up) begin
      if (lo[10] || lo <= 11'(s.r)) n.up = 1'b0; else n.cy = lo[9:0];
    end else begin
      if (hi + 11'(s.r) >= 11'(V_ACTIVE - 1)) n.up = 1'b1; else n.cy = hi[9:0];
    end
    return n;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      sh <= '0; is_square <= 1'b0; enabled <= 1'b1; need_init <= 1'b1;
    end else begin
      if (cmd_rand || (need_init && frame_tick)) begin
        for (int i = 0; i < N_SHAPES; i++) sh[i] <= rand_shape(rnd, i);
        need_init <= 1'b0;
      end else if (frame_tick) begin
        for (int i = 0; i < N_SHAPES; i++) sh[i] <= move(sh[i]);
      end
      if (cmd_type)  is_square <= ~is_square;
      if (cmd_onoff) enabled   <= ~enabled;
    end
  end

  // stage 1: per-shape distance test
  always_ff @(posedge clk) begin
    for (int i = 0; i < N_SHAPES; i++) begin
      logic signed [11:0] dx, dy;
      logic [21:0] d2, r2;
      logic [10:0] adx, ady;
      dx  = 12'(x) - 12'(sh[i].cx);
      dy  = 12'(y) - 12'(sh[i].cy);
      adx = dx[11] ? 11'(-dx) : 11'(dx);
      ady = dy[11] ? 11'(-dy) : 11'(dy);
      d2  = 22'(adx * adx) + 22'(ady * ady);
      r2  = 22'(sh[i].r * sh[i].r);
      hit1[i] <= is_square ? (adx <= 11'(sh[i].r) && ady <= 11'(sh[i].r)) : (d2 <= r2);
      col1[i] <= sh[i].color;
    end
    en1 <= enabled && !need_init;
  end

  // stage 2: first covering shape wins
  always_ff @(posedge clk) begin
    valid <= 1'b0;
    color <= '0;
    for (int i = N_SHAPES - 1; i >= 0; i--)
      if (hit1[i] && en1) begin
        valid <= 1'b1;
        color <= col1[i];
      end
  end
endmodule
