// tb_haxorus_top_full: one complete operation of the visualizer with every
// parameter at its default: 500,000 bit/s serial line (200 clocks per bit),
// 100 kHz I2C, a 12.5 MHz codec bit clock and a full 4096-sample FFT block.
// The Chrontel is configured; the codec is set up and loops its ADC samples
// to the DAC; one FFT spectrum of 4096 bins is computed by the stand-in
// model and swaps the frequency-wave buffers; several video frames go out
// on the DVI pins; and a short Kinect frame (12 rows, then the zero byte)
// with hand areas 0 and 1 close gives the "randomize background" gesture.
module tb_haxorus_top_full;
  import haxorus_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic bit_clk, sdi, sdo, sync, ac_rst_n;
  logic fft_in_valid, fft_out_valid, fft_out_done;
  logic signed [15:0] fft_in_re;
  logic signed [28:0] fft_out_re, fft_out_im;
  logic [11:0] fft_out_index;
  logic serial = 1;
  logic [11:0] dvi_d;
  logic dvi_de, dvi_hs, dvi_vs, xp, xn, dvi_rst_n, scl, sdl, sda_in, init_done;
  logic [4:0] vol;
  int frames_rx, frames_tx, sync_errors, reg_writes, n_trans, n_starts, fft_frames;
  logic [15:0] last_pcm_l, last_pcm_r, last_wr_data;
  logic [6:0] last_wr_addr;
  int checks = 0, failures = 0;

  haxorus_top dut (
    .clk, .rst, .ac97_bit_clk(bit_clk), .ac97_sdata_in(sdi), .ac97_sdata_out(sdo),
    .ac97_sync(sync), .ac97_reset_n(ac_rst_n),
    .fft_in_valid, .fft_in_re, .fft_out_valid, .fft_out_re, .fft_out_im, .fft_out_index, .fft_out_done,
    .serial_rx(serial), .sw_depth_thresh(8'd100),
    .dvi_d, .dvi_de, .dvi_hsync_n(dvi_hs), .dvi_vsync_n(dvi_vs), .dvi_xclk_p(xp), .dvi_xclk_n(xn),
    .dvi_reset_n(dvi_rst_n), .i2c_scl(scl), .i2c_sda_drive_low(sdl), .i2c_sda_in(sda_in),
    .dvi_init_done(init_done), .vol_atten(vol));

  ac97_codec_model #(.HALF_NS(40), .READY_FRAMES(2)) codec (.bit_clk, .sdata_in(sdi), .sdata_out(sdo), .sync,
    .frames_rx, .frames_tx, .sync_errors, .reg_writes, .last_pcm_l, .last_pcm_r, .last_wr_addr, .last_wr_data);
  fft_model #(.BLOCK(4096)) fft (.clk, .in_valid(fft_in_valid), .in_re(fft_in_re), .out_valid(fft_out_valid),
    .out_re(fft_out_re), .out_im(fft_out_im), .out_index(fft_out_index), .out_done(fft_out_done), .frames(fft_frames));
  i2c_slave_model #(.ACK_ENABLE(1)) chrontel (.scl, .sda_drive_low(sdl), .sda_in, .n_trans, .n_starts);

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int n_swap_freq = 0, n_vs = 0, de_pix = 0, n_gest = 0, n_switch_buf = 0;
  logic vs_q = 1, fs_q = 0;
  logic [25:0] gest_seen = 0;
  always @(posedge clk) if (!rst) begin
    if (dut.u_gfx.g_freq[2].u_freq.fsel != fs_q) n_swap_freq++;
    fs_q = dut.u_gfx.g_freq[2].u_freq.fsel;
    if (vs_q && !dvi_vs) n_vs++;
    vs_q = dvi_vs;
    if (dvi_de && !xp && dut.u_dvi.second) de_pix++;
    if (dut.gestures != 0) n_gest++;
    gest_seen |= dut.gestures;
    if (dut.switch_buf) n_switch_buf++;
  end

  task automatic send(input logic [7:0] b);
    serial = 0; repeat (200) @(negedge clk);
    for (int i = 0; i < 8; i++) begin serial = b[i]; repeat (200) @(negedge clk); end
    serial = 1; repeat (200) @(negedge clk);
  endtask

  initial begin
    repeat (30_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int yy = 0; yy < 12; yy++)
      for (int xx = 0; xx < 320; xx++) send(xx < 160 ? 8'd30 : 8'd250);
    send(8'd0);
    repeat (10) @(negedge clk);
    check(n_gest == 1 && gest_seen == 26'(1 << GST_BG_RAND), $sformatf("gesture %b", gest_seen));
    wait (fft_frames >= 1);
    repeat (5000) @(negedge clk);
    check(n_swap_freq == 1, $sformatf("frequency buffer swaps %0d", n_swap_freq));
    check(dut.u_gfx.band_avg[0] != 0, "bass band average");
    check(init_done && n_trans == 5, "Chrontel configured");
    check(codec.regs[7'h10] == 16'h8808 && codec.regs[7'h02] == 16'h0808, "codec registers");
    check(sync_errors == 0, "AC-Link SYNC");
    check(n_vs >= 5 && de_pix >= 5 * 307200 && de_pix <= (n_vs + 1) * 307200,
          $sformatf("DVI frames %0d, visible pixels %0d", n_vs, de_pix));
    check(n_switch_buf >= 5, "switch_buf");
    $display("frames: video %0d, FFT %0d, AC-Link %0d", n_vs, fft_frames, frames_rx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
