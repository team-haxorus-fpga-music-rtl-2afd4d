// tb_haxorus_top: end-to-end run of the visualizer with the serial line at
// 4 clocks per bit and I2C quarter bits of 4 clocks (all else at defaults).
// Around it: the behavioural AC'97 codec, the FFT stand-in (one spectrum
// per 8 samples), an I2C slave for the DVI transmitter, and a serial driver
// sending full 320x240 depth frames. Three Kinect frames are sent: hand
// areas 0 and 3 close (gesture "checker background"), hand areas 5 and 7
// close (volume up), and one frame with nobody close.
// Each mechanism is counted and must occur: codec register writes with
// line-in muted, ADC-to-DAC loopback, FFT input samples equal to the mean of
// left and right, spectra received and frequency-wave buffer swaps, video
// frames with 307,200 visible pixels at the DVI pins and wave buffer swaps,
// Chrontel register writes, dance areas lit, the gesture taking effect, and
// the volume change reaching the codec.
module tb_haxorus_top;
  import haxorus_pkg::*;
  localparam int CPB = 4;
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

  haxorus_top #(.CLKS_PER_BIT(CPB), .I2C_Q_CYCLES(4)) dut (
    .clk, .rst, .ac97_bit_clk(bit_clk), .ac97_sdata_in(sdi), .ac97_sdata_out(sdo),
    .ac97_sync(sync), .ac97_reset_n(ac_rst_n),
    .fft_in_valid, .fft_in_re, .fft_out_valid, .fft_out_re, .fft_out_im, .fft_out_index, .fft_out_done,
    .serial_rx(serial), .sw_depth_thresh(8'd100),
    .dvi_d, .dvi_de, .dvi_hsync_n(dvi_hs), .dvi_vsync_n(dvi_vs), .dvi_xclk_p(xp), .dvi_xclk_n(xn),
    .dvi_reset_n(dvi_rst_n), .i2c_scl(scl), .i2c_sda_drive_low(sdl), .i2c_sda_in(sda_in),
    .dvi_init_done(init_done), .vol_atten(vol));

  ac97_codec_model #(.HALF_NS(40), .READY_FRAMES(2)) codec (.bit_clk, .sdata_in(sdi), .sdata_out(sdo), .sync,
    .frames_rx, .frames_tx, .sync_errors, .reg_writes, .last_pcm_l, .last_pcm_r, .last_wr_addr, .last_wr_data);
  fft_model #(.BLOCK(8)) fft (.clk, .in_valid(fft_in_valid), .in_re(fft_in_re), .out_valid(fft_out_valid),
    .out_re(fft_out_re), .out_im(fft_out_im), .out_index(fft_out_index), .out_done(fft_out_done), .frames(fft_frames));
  i2c_slave_model #(.ACK_ENABLE(1)) chrontel (.scl, .sda_drive_low(sdl), .sda_in, .n_trans, .n_starts);

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- mechanism counters ----------------
  int n_fft_in = 0, fft_in_err = 0, n_loop = 0, n_swap_freq = 0, n_switch_buf = 0, n_wave_swap = 0;
  int n_vs = 0, de_pix = 0, n_gest = 0, n_volup = 0, n_dance_cycles = 0;
  logic vs_q = 1, fs_q = 0, ws_q = 0;
  always @(posedge clk) if (!rst) begin
    if (fft_in_valid) begin
      logic signed [16:0] s;
      s = 17'(signed'(dut.u_link.pcm_in_l)) + 17'(signed'(dut.u_link.pcm_in_r));
      n_fft_in++;
      if (fft_in_re != 16'(s >>> 1)) fft_in_err++;
    end
    if (dut.u_gfx.g_freq[0].u_freq.fsel != fs_q) n_swap_freq++;
    fs_q = dut.u_gfx.g_freq[0].u_freq.fsel;
    if (dut.u_gfx.g_wave[1].u_wave.fsel != ws_q) n_wave_swap++;
    ws_q = dut.u_gfx.g_wave[1].u_wave.fsel;
    if (dut.switch_buf) n_switch_buf++;
    if (vs_q && !dvi_vs) n_vs++;
    vs_q = dvi_vs;
    if (dvi_de && !xp && dut.u_dvi.second) de_pix++;
    if (dut.gestures != 0) n_gest++;
    if (dut.vol_up) n_volup++;
    if (dut.dance_areas != 0) n_dance_cycles++;
  end
  // loopback: what the codec's DAC receives is an ADC sample sent earlier
  int last_rx = 0;
  always @(posedge clk) if (frames_rx != last_rx) begin
    last_rx = frames_rx;
    for (int k = 1; k < 5; k++)
      if (frames_tx - k >= 2 && last_pcm_l == 16'((frames_tx - k) * 97 + 3) && last_pcm_r == ~16'((frames_tx - k) * 31)) begin
        n_loop++;
        break;
      end
  end

  // ---------------- Kinect serial driver ----------------
  task automatic send(input logic [7:0] b);
    serial = 0; repeat (CPB) @(negedge clk);
    for (int i = 0; i < 8; i++) begin serial = b[i]; repeat (CPB) @(negedge clk); end
    serial = 1; repeat (CPB) @(negedge clk);
  endtask
  task automatic kinect_frame(input logic [7:0] hands);
    for (int yy = 0; yy < 240; yy++)
      for (int xx = 0; xx < 320; xx++)
        send(hands[(yy / 120) * 4 + xx / 80] ? 8'd30 : 8'd250);
    send(8'd0);
    repeat (10) @(negedge clk);
  endtask

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int g0;
    repeat (10) @(posedge clk);
    @(negedge clk); rst = 0;
    kinect_frame(8'b0000_1001);             // hand areas 0 and 3: checker gesture
    check(dut.u_gfx.u_bg.chk_on, "checker gesture reached the background");
    check(dut.hand_areas == 8'b0000_1001, "hand areas seen");
    kinect_frame(8'b1010_0000);             // hand areas 5 and 7: volume up
    check(vol == 5'd7, $sformatf("volume attenuation %0d expected 7", vol));
    kinect_frame(8'b0000_0000);
    repeat (40000) @(negedge clk);
    check(codec.regs[7'h02] == 16'h0707, $sformatf("codec master volume %h", codec.regs[7'h02]));
    check(codec.regs[7'h10] == 16'h8808, "line-in muted at the codec");
    check(codec.regs[7'h1A] == 16'h0404, "record select line-in");
    check(sync_errors == 0, "AC-Link SYNC");
    check(n_trans == 5 && init_done, $sformatf("Chrontel writes %0d", n_trans));
    check(n_fft_in > 100 && fft_in_err == 0, $sformatf("FFT input samples %0d, %0d wrong", n_fft_in, fft_in_err));
    check(n_loop > 100, $sformatf("ADC to DAC loopback %0d frames", n_loop));
    check(fft_frames > 10 && n_swap_freq >= fft_frames - 1, $sformatf("spectra %0d, freq buffer swaps %0d", fft_frames, n_swap_freq));
    check(n_switch_buf >= 5 && n_wave_swap >= n_switch_buf - 1, $sformatf("switch_buf %0d, wave swaps %0d", n_switch_buf, n_wave_swap));
    check(n_vs >= 5 && de_pix >= 5 * 307200 && de_pix <= (n_vs + 1) * 307200,
          $sformatf("DVI frames %0d, visible pixels %0d", n_vs, de_pix));
    check(n_gest == 1 && n_volup == 1, $sformatf("gesture pulses %0d, volume-up pulses %0d", n_gest, n_volup));
    check(n_dance_cycles > 0, "dance areas lit");
    $display("mechanisms: codec writes %0d, loopback %0d, FFT in %0d, spectra %0d, freq swaps %0d, switch_buf %0d, wave swaps %0d, DVI frames %0d, I2C writes %0d, gestures %0d, volume up %0d, dance-area cycles %0d",
             reg_writes, n_loop, n_fft_in, fft_frames, n_swap_freq, n_switch_buf, n_wave_swap, n_vs, n_trans, n_gest, n_volup, n_dance_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
