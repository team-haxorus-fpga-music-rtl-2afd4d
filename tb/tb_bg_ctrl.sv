// tb_bg_ctrl: fixed random inputs (C8, 50, 20). After the first frame the
// background must be (C8,50,20); each later frame (DRIFT_FRAMES = 1) moves
// every component one step towards the target (20,C8,50). Random screen
// points are checked two cycles later against c*(256 - pos/4)/256 shading:
// strongest component along X, second along Y, third flat. Then invert
// (all components inverted) and checker (32x32 squares inverted) are
// checked the same way.
module tb_bg_ctrl;
  import haxorus_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic tick = 0, crand = 0, cinv = 0, cchk = 0;
  logic [2:0][7:0] rnd = {8'h20, 8'h50, 8'hC8};
  coord_t x = 0, y = 0;
  rgb_t color;
  int checks = 0, failures = 0;

  bg_ctrl #(.DRIFT_FRAMES(1)) dut (.clk, .rst, .frame_tick(tick), .rnd, .cmd_rand(crand),
    .cmd_invert(cinv), .cmd_checker(cchk), .x, .y, .color);

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic int sh(input int c, input int p); return c * (256 - p / 4) / 256; endfunction

  function automatic rgb_t ref_px(input int r, input int g, input int b, input int xx, input int yy, input bit chk);
    int c [3];
    int o [3];
    int s1, s2;
    c[0] = r; c[1] = g; c[2] = b;
    if (chk && (((xx / 32) % 2) != ((yy / 32) % 2))) for (int i = 0; i < 3; i++) c[i] = 255 - c[i];
    o = c;
    // strongest (ties: r before g before b), then second strongest
    s1 = 0;
    for (int i = 1; i < 3; i++) if (c[i] > c[s1]) s1 = i;
    s2 = -1;
    for (int i = 0; i < 3; i++) if (i != s1 && (s2 < 0 || c[i] > c[s2])) s2 = i;
    o[s1] = sh(c[s1], xx);
    o[s2] = sh(c[s2], yy);
    return '{r: 8'(o[0]), g: 8'(o[1]), b: 8'(o[2])};
  endfunction

  task automatic pulse(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0;
  endtask

  task automatic probe(input int r, input int g, input int b, input bit chk, input string what);
    for (int n = 0; n < 200; n++) begin
      int xx, yy;
      rgb_t e;
      xx = $urandom_range(0, 639); yy = $urandom_range(0, 479);
      @(negedge clk); x = 10'(xx); y = 10'(yy);
      @(negedge clk); @(negedge clk);
      e = ref_px(r, g, b, xx, yy, chk);
      check(color == e, $sformatf("%s (%0d,%0d): %h expected %h", what, xx, yy, color, e));
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r, g, b;
    repeat (3) @(posedge clk);
    rst = 0;
    pulse(tick);
    r = 'hC8; g = 'h50; b = 'h20;
    probe(r, g, b, 0, "initial");
    for (int f = 0; f < 5; f++) begin
      pulse(tick);
      r--; g++; b++;
    end
    probe(r, g, b, 0, "after drift");
    pulse(cinv);
    r = 255 - r; g = 255 - g; b = 255 - b;
    probe(r, g, b, 0, "inverted");
    pulse(cchk);
    probe(r, g, b, 1, "checker");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
