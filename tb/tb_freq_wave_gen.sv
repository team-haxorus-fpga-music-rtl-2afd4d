// tb_freq_wave_gen: streams FFT frames of 4096 bins with random magnitudes
// into the bass range (bins 5..20, MAG_SHIFT 14). After each frame's last
// bin it checks band_avg = sum(min(mag>>14, 400)) / 16, and probes columns:
// the line must be at Y = 470 - height of bin 5 + (X*SCALE >> 16), where
// SCALE = floor(16*65536/640), 3 pixels thick. Before the first frame the
// heights are zero. The display must keep the previous spectrum while the
// next one is being written (double buffering).
module tb_freq_wave_gen;
  import haxorus_pkg::*;
  localparam int LO = 5, HI = 21, SH = 14, MAXH = 400, BASE = 470;
  localparam int SCALE = ((HI - LO) * 65536) / 640;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic iv = 0, il = 0;
  logic [11:0] idx = 0;
  logic [28:0] mag = 0;
  coord_t x = 0, y = 0;
  logic valid;
  rgb_t color;
  logic [9:0] band_avg;
  int checks = 0, failures = 0;

  freq_wave_gen #(.MAG_W(29), .BIN_LO(LO), .BIN_HI(HI), .MAG_SHIFT(SH), .MAX_H(MAXH),
                  .BASE_Y(BASE), .THICK(1)) dut (
    .clk, .rst, .in_valid(iv), .in_index(idx), .in_mag(mag), .in_last(il), .x, .y,
    .valid, .color, .band_avg);

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int shown [16];

  task automatic probe(input int n);
    for (int k = 0; k < n; k++) begin
      int xx, yy, dy, h;
      bit e;
      xx = $urandom_range(0, 639);
      h = shown[(xx * SCALE) >> 16];
      dy = $urandom_range(0, 8) - 4;
      yy = BASE - h + dy;
      @(negedge clk); x = 10'(xx); y = 10'(yy);
      @(negedge clk); @(negedge clk);
      e = dy >= -1 && dy <= 1;
      check(valid == e, $sformatf("column %0d y %0d (height %0d): %0d expected %0d", xx, yy, h, valid, e));
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
    for (int i = 0; i < 16; i++) shown[i] = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (1100) @(posedge clk);
    probe(50);
    for (int f = 0; f < 6; f++) begin
      int hts [16];
      int sum;
      sum = 0;
      for (int b = 0; b < 4096; b++) begin
        int h;
        h = $urandom_range(0, 470);
        @(negedge clk);
        iv = 1; idx = 12'(b); il = (b == 4095);
        mag = 29'((h << SH) + $urandom_range(0, (1 << SH) - 1));
        if (b >= LO && b < HI) begin hts[b - LO] = h > MAXH ? MAXH : h; sum += hts[b - LO]; end
        if (b == 2000) begin
          // mid-frame: the old spectrum is still displayed
          @(negedge clk); iv = 0;
          probe(10);
        end
      end
      @(negedge clk); iv = 0; il = 0;
      @(negedge clk);
      check(int'(band_avg) == sum / (HI - LO), $sformatf("band_avg %0d expected %0d", band_avg, sum / (HI - LO)));
      shown = hts;
      probe(60);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
