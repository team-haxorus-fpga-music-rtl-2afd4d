// tb_graphics_engine: scans whole 640x480 frames (two cycles per pixel,
// switch_buf after the last pixel) with FFT frames and gestures in between.
// Checks: every pixel_out equals the weighted average of the layer outputs
// of the cycle before (weights 1,2,4,4,4,3,3,3,4); with one hand area active
// the Kinect layer covers exactly that screen quarter; shapes, all three
// waves and all three frequency waves draw pixels; the shapes-off gesture
// removes the shapes; the background-invert gesture inverts the background.
module tb_graphics_engine;
  import haxorus_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  coord_t x = 0, y = 0;
  logic sb = 0;
  logic signed [15:0] audio = 16'sd4000;
  logic [25:0] gest = 0;
  logic [99:0] dance = 0;
  logic [7:0] hand = 0;
  logic fv = 0, fl = 0;
  logic [11:0] fi = 0;
  logic [28:0] fm = 0;
  rgb_t pix;
  int checks = 0, failures = 0;
  localparam int WT [9] = '{1, 2, 4, 4, 4, 3, 3, 3, 4};

  graphics_engine dut (.clk, .rst, .x, .y, .switch_buf(sb), .audio_ampl(audio), .gestures(gest),
    .dance_areas(dance), .hand_areas(hand), .fft_valid(fv), .fft_index(fi), .fft_mag(fm),
    .fft_last(fl), .pixel_out(pix));

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // blend check and per-layer pixel counts
  rgb_t exp_q;
  bit   exp_ok = 0;
  int   blend_err = 0, blend_n = 0;
  int   layer_cnt [9];
  always @(posedge clk) begin
    int sr, sg, sb_, sw;
    if (exp_ok) begin
      blend_n++;
      if (pix != exp_q) blend_err++;
    end
    sr = 0; sg = 0; sb_ = 0; sw = 0;
    for (int i = 0; i < 9; i++) if (dut.lv[i]) begin
      sr += WT[i] * dut.lc[i].r; sg += WT[i] * dut.lc[i].g; sb_ += WT[i] * dut.lc[i].b; sw += WT[i];
      layer_cnt[i]++;
    end
    exp_q = sw == 0 ? '0 : '{r: 8'(sr / sw), g: 8'(sg / sw), b: 8'(sb_ / sw)};
    exp_ok = !rst;
  end

  task automatic scan_frame();
    for (int i = 0; i < 9; i++) layer_cnt[i] = 0;
    for (int yy = 0; yy < 480; yy++)
      for (int xx = 0; xx < 640; xx++) begin
        @(negedge clk); x = 10'(xx); y = 10'(yy);
        @(negedge clk);
      end
    @(negedge clk); x = 10'd700;
    repeat (4) @(negedge clk);
    sb = 1; @(negedge clk); sb = 0;
    repeat (700) @(negedge clk);
  endtask

  task automatic fft_frame(input int level);
    for (int b = 0; b < 4096; b++) begin
      @(negedge clk);
      fv = 1; fi = 12'(b); fl = (b == 4095);
      fm = 29'((b < 512 ? level : 0) << 16);
    end
    @(negedge clk); fv = 0; fl = 0;
  endtask

  task automatic gesture(input int k);
    @(negedge clk); gest[k] = 1; @(negedge clk); gest = 0;
  endtask

  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rgb_t bg_before;
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (1100) @(posedge clk);
    fft_frame(100);
    scan_frame();                  // first frame: random parameters taken
    hand = 8'b0000_0100;           // hand area 2: x 320..479, y 0..239
    fft_frame(150);
    scan_frame();
    check(layer_cnt[8] == 160 * 240 * 2, $sformatf("Kinect layer %0d cycles, expected %0d", layer_cnt[8], 160 * 240 * 2));
    check(layer_cnt[1] > 0, "shapes drawn");
    for (int i = 0; i < 3; i++) check(layer_cnt[2 + i] > 0, $sformatf("wave %0d drawn", i + 1));
    for (int i = 0; i < 3; i++) check(layer_cnt[5 + i] > 0, $sformatf("frequency wave %0d drawn", i + 1));
    check(layer_cnt[0] == 640 * 480 * 2 + 12 || layer_cnt[0] > 640 * 480 * 2, "background everywhere");
    gesture(GST_SHAPE_ONOFF);
    bg_before = dut.u_bg.base;
    gesture(GST_BG_INVERT);
    check(dut.u_bg.base == ~bg_before, "background inverted");
    hand = 0;
    scan_frame();
    check(layer_cnt[1] == 0, "shapes off");
    check(layer_cnt[8] == 0, "no Kinect area");
    check(blend_err == 0 && blend_n > 1_000_000, $sformatf("blend mismatches %0d of %0d", blend_err, blend_n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
