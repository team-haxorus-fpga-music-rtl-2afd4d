// tb_shape_gen: one shape with fixed random inputs. The testbench derives
// the shape's centre, radius, speed and direction from the random bytes,
// moves it every frame and bounces it off the walls, and checks points
// around it: inside iff (X-cx)^2+(Y-cy)^2 <= r^2 for a circle, and iff
// |X-cx|,|Y-cy| <= r for a square. Also checks on/off and that both walls
// of each axis were hit.
module tb_shape_gen;
  import haxorus_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic tick = 0, crand = 0, ctype = 0, conoff = 0;
  logic [7:0][7:0] rnd = {8'h11, 8'h4E, 8'h9C, 8'h23, 8'h90, 8'h05, 8'h77, 8'h2B};
  coord_t x = 0, y = 0;
  logic valid;
  rgb_t color;
  int checks = 0, failures = 0;

  shape_gen #(.N_SHAPES(1)) dut (.clk, .rst, .frame_tick(tick), .rnd, .cmd_rand(crand),
    .cmd_type(ctype), .cmd_onoff(conoff), .x, .y, .valid, .color);

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic pulse(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0;
  endtask

  int cx, cy, r, sp, bounce_l = 0, bounce_r = 0, bounce_t = 0, bounce_b = 0;
  bit left, up;
  rgb_t col;

  task automatic probe(input bit square, input bit on, input int n);
    for (int k = 0; k < n; k++) begin
      int xx, yy, dx, dy;
      bit e;
      xx = cx + $urandom_range(0, 2 * r + 8) - r - 4;
      yy = cy + $urandom_range(0, 2 * r + 8) - r - 4;
      if (xx < 0) xx = 0;
      if (yy < 0) yy = 0;
      @(negedge clk); x = 10'(xx); y = 10'(yy);
      @(negedge clk); @(negedge clk);
      dx = xx - cx; dy = yy - cy;
      e = on && (square ? (dx <= r && -dx <= r && dy <= r && -dy <= r) : (dx * dx + dy * dy <= r * r));
      check(valid == e, $sformatf("shape at (%0d,%0d) r=%0d, point (%0d,%0d): %0d expected %0d", cx, cy, r, xx, yy, valid, e));
      if (e) check(color == col, "colour");
    end
  endtask

  task automatic frame_move();
    pulse(tick);
    if (left) begin if (cx - sp <= r) begin left = 0; bounce_l++; end else cx -= sp; end
    else begin if (cx + sp + r >= 639) begin left = 1; bounce_r++; end else cx += sp; end
    if (up) begin if (cy - sp <= r) begin up = 0; bounce_t++; end else cy -= sp; end
    else begin if (cy + sp + r >= 479) begin up = 1; bounce_b++; end else cy += sp; end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] a, b, c, d;
    repeat (3) @(posedge clk);
    rst = 0;
    a = rnd[0]; b = rnd[3]; c = rnd[5]; d = rnd[6];
    r = 8 + a[5:0]; cx = 80 + 2 * b; cy = 80 + c + c[7:2];
    sp = 1 + d[1:0]; left = d[2]; up = d[3];
    col = '{r: a ^ 8'h80, g: b ^ c, b: d};
    pulse(tick);                 // first frame: random parameters taken
    probe(0, 1, 100);
    for (int f = 0; f < 400; f++) begin
      frame_move();
      if (f % 20 == 0) probe(0, 1, 20);
    end
    pulse(ctype);
    probe(1, 1, 200);
    pulse(conoff);
    probe(1, 0, 50);
    pulse(conoff);
    probe(1, 1, 50);
    check(bounce_l > 0 && bounce_r > 0 && bounce_t > 0 && bounce_b > 0,
          $sformatf("bounces l%0d r%0d t%0d b%0d", bounce_l, bounce_r, bounce_t, bounce_b));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
