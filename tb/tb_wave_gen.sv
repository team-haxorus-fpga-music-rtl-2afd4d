// tb_wave_gen: keeps its own model of the wave: a 640-entry array that is
// shifted one column left each frame with the new Y appended, the new Y
// following the UP / DOWN / CONST phase rule with the given speed and
// amplitude, and the displayed copy lagging one frame (double buffering).
// After every frame it probes random columns a few pixels above and below
// the modelled Y and checks the valid bit against the loudness-derived
// thickness, and checks that the buffer update finishes within 645 cycles.
module tb_wave_gen;
  import haxorus_pkg::*;
  localparam int C = 240, MAXA = 200, FLAT = 4;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic tick = 0, crand = 0, ctype = 0;
  logic [2:0][7:0] rnd = {8'h5C, 8'hA1, 8'h03};   // speed 1 + 3 = 4
  logic [9:0] amp_in = 10'd30;
  logic signed [15:0] audio = 16'sh1800;          // thickness 1 + 3
  coord_t x = 0, y = 0;
  logic valid, busy;
  rgb_t color;
  int checks = 0, failures = 0;

  wave_gen #(.CENTER_Y(C), .MAX_AMP(MAXA), .FLAT_COLS(FLAT)) dut (.clk, .rst, .frame_tick(tick),
    .rnd, .cmd_rand(crand), .cmd_type(ctype), .amp_in, .audio_ampl(audio), .x, .y,
    .valid, .color, .busy);

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int disp [640], pend [640];
  int cur = C, amp = 0, sp = 1, ph = 0, flat = 0, width = 1, wtype = 0;
  int n_up = 0, n_down = 0, n_const = 0;
  rgb_t col;

  task automatic frame(input bit first);
    int ny, w;
    @(negedge clk); tick = 1; @(negedge clk); tick = 0;
    disp = pend;
    case (ph)
      0: begin ny = cur - sp; if (ny <= C - amp) ph = 1; cur = ny < 0 ? 0 : ny; n_up++; end
      1: begin ny = cur + sp; if (ny >= C + amp) begin ph = wtype ? 2 : 0; flat = 0; end
               cur = ny > 479 ? 479 : ny; n_down++; end
      default: begin if (flat == FLAT - 1) ph = 0; flat++; n_const++; end
    endcase
    amp = amp_in > MAXA ? MAXA : amp_in;
    w = audio < 0 ? -audio : audio;
    width = 1 + w / 2048;
    if (first) sp = 1 + rnd[0][2:0];
    for (int i = 0; i < 639; i++) pend[i] = disp[i + 1];
    pend[639] = cur;
    w = 0;
    while (busy) begin @(negedge clk); w++; end
    check(w <= 645, $sformatf("buffer update took %0d cycles", w));
  endtask

  task automatic probe(input int n);
    for (int k = 0; k < n; k++) begin
      int xx, yy, dy;
      bit e;
      xx = $urandom_range(0, 639);
      dy = $urandom_range(0, 14) - 7;
      yy = disp[xx] + dy;
      if (yy < 0 || yy > 479) continue;
      @(negedge clk); x = 10'(xx); y = 10'(yy);
      @(negedge clk); @(negedge clk);
      e = (dy <= width && -dy <= width);
      check(valid == e, $sformatf("column %0d y %0d (wave %0d, width %0d): %0d expected %0d", xx, yy, disp[xx], width, valid, e));
      if (e) check(color == col, "colour");
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 640; i++) begin disp[i] = C; pend[i] = C; end
    col = '{r: rnd[1], g: rnd[2], b: rnd[0] | 8'h40};
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (1100) @(posedge clk);
    check(!busy, "buffers cleared after reset");
    frame(1);
    for (int f = 0; f < 120; f++) begin
      if (f == 60) begin
        @(negedge clk); ctype = 1; @(negedge clk); ctype = 0; wtype = 1;
        audio = -16'sd9000;
        amp_in = 10'd300;     // limited to MAX_AMP
      end
      frame(0);
      probe(25);
    end
    check(n_up > 0 && n_down > 0 && n_const > 0, $sformatf("phases up %0d down %0d const %0d", n_up, n_down, n_const));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
