// bg_ctrl: background controller.
// The background starts at a random colour and drifts: every DRIFT_FRAMES
// frames each component moves one step towards a random target, and takes a
// new target once it gets there. The strongest of R, G, B is shaded
// horizontally and the second strongest vertically:
//   c * (256 - x/4) / 256  and  c * (256 - y/4) / 256,
// so they fade to about 38% and 53% across the 640x480 screen.
// Gestures: cmd_rand loads a new random colour, cmd_invert inverts it, and
// cmd_checker toggles a checkerboard of 32x32 squares in the inverted colour.
// frame_tick (switch_buf) is the once-per-frame update strobe.
// Timing: the colour for (x, y) is valid two clock cycles later.
// Drift rule, shading ramps and checker size are this design's own choices.
// The ramps use X/4 and Y/4 and keep the high byte of the product, so the
// two low coordinate bits and the low product byte are unused.
module bg_ctrl #(
  parameter int unsigned DRIFT_FRAMES = 4
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 frame_tick,
  input  logic [2:0][7:0]      rnd,
  input  logic                 cmd_rand,
  input  logic                 cmd_invert,
  input  logic                 cmd_checker,
  input  haxorus_pkg::coord_t  x,
  input  haxorus_pkg::coord_t  y,
  output haxorus_pkg::rgb_t    color
);
  import haxorus_pkg::*;
  rgb_t   base, target;
  logic   chk_on, need_init;
  logic [7:0] frame_cnt;
  coord_t x1, y1;
  rgb_t   base1;
  logic   chk1;

  function automatic logic [7:0] toward(input logic [7:0] c, input logic [7:0] t);
    if (c < t) return c + 1'b1;
    if (c > t) return c - 1'b1;
    return c;
  endfunction

  function automatic logic [7:0] shade(input logic [7:0] c, input logic [7:0] p4);
    logic [15:0] prod;   // c * (256 - p4) / 256 = c - c * p4 / 256
    prod = {c, 8'd0} - c * p4;
    return prod[15:8];
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      base <= '0; target <= '0; chk_on <= 1'b0; need_init <= 1'b1; frame_cnt <= '0;
    end else begin
      if (cmd_rand || (need_init && frame_tick)) begin
        base      <= '{r: rnd[0], g: rnd[1], b: rnd[2]};
        target    <= '{r: rnd[2], g: rnd[0], b: rnd[1]};
        need_init <= 1'b0;
      end else if (cmd_invert) begin
        base   <= ~base;
        target <= ~target;
      end else if (frame_tick) begin
        if (frame_cnt == 8'(DRIFT_FRAMES - 1)) begin
          frame_cnt <= '0;
          if (base == target) target <= '{r: rnd[1], g: rnd[2], b: rnd[0]};
          else base <= '{r: toward(base.r, target.r), g: toward(base.g, target.g),
                         b: toward(base.b, target.b)};
        end else frame_cnt <= frame_cnt + 1'b1;
      end
      if (cmd_checker) chk_on <= ~chk_on;
    end
  end

  // stage 1: register position and state
  always_ff @(posedge clk) begin
    x1 <= x; y1 <= y;
    base1 <= base;
    chk1  <= chk_on && (x[5] ^ y[5]);
  end

  // stage 2: shading
  always_ff @(posedge clk) begin
    rgb_t c, s;
    c = chk1 ? ~base1 : base1;
    s = c;
    if (c.r >= c.g && c.r >= c.b) begin
      s.r = shade(c.r, x1[9:2]);
      if (c.g >= c.b) s.g = shade(c.g, y1[9:2]); else s.b = shade(c.b, y1[9:2]);
    end else if (c.g >= c.b) begin
      s.g = shade(c.g, x1[9:2]);
      if (c.r >= c.b) s.r = shade(c.r, y1[9:2]); else s.b = shade(c.b, y1[9:2]);
    end else begin
      s.b = shade(c.b, x1[9:2]);
      if (c.r >= c.g) s.r = shade(c.r, y1[9:2]); else s.g = shade(c.g, y1[9:2]);
    end
    color <= s;
  end
endmodule
