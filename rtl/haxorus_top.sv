// haxorus_top: FPGA music visualizer.
// Music from line-in is digitised by the AC'97 codec and arrives over the
// AC-Link (ac97_link); the samples go straight back to the codec's DAC for
// audio out, to the graphics engine as loudness, and to an external FFT
// core. The FFT bins come back through fft_mag_est, whose magnitudes drive
// the frequency waves and the wave amplitudes. The Kinect depth stream
// arrives on a serial line (kinect_in): active dance and hand areas are
// shown on screen, hand gestures change the picture, and the volume
// gestures change the codec's master volume (ac97_cmd). dvi_sync scans the
// 640x480 screen, the graphics engine answers each X/Y with a pixel, and
// dvi_out hands pixels and syncs to the Chrontel DVI transmitter, which
// chrontel_i2c_init configures after reset.
// One 100 MHz system clock runs everything; the codec bit clock is sampled,
// and the 50 MHz pixel rate is a clock enable.
// The FFT is a vendor core outside this RTL: fft_in_* carry the audio
// samples (mean of left and right, one per 48 kHz frame) to it and
// fft_out_* bring its natural-order bins back. The I2C data line is split
// into sda_drive_low/sda_in for an open-drain pad.
// Left open on purpose: the link's register read-back (status_*) and
// frame_start, since nothing here reads codec registers back, and the I2C
// ack_error, which the design cannot act on. The halving of L+R drops the
// sum's low bit.
module haxorus_top #(
  parameter int unsigned FFT_W = 29,
  parameter int unsigned CLKS_PER_BIT = 200,
  parameter int unsigned I2C_Q_CYCLES = 250,
  parameter int unsigned RELOAD_CYCLES = 1 << 24,
  parameter int unsigned HAND_COUNT_THRESH = 800,
  parameter int unsigned DANCE_COUNT_THRESH = 100
) (
  input  logic        clk,
  input  logic        rst,
  // AC'97 codec
  input  logic        ac97_bit_clk,
  input  logic        ac97_sdata_in,
  output logic        ac97_sdata_out,
  output logic        ac97_sync,
  output logic        ac97_reset_n,
  // FFT core
  output logic        fft_in_valid,
  output logic signed [15:0] fft_in_re,
  input  logic        fft_out_valid,
  input  logic signed [FFT_W-1:0] fft_out_re,
  input  logic signed [FFT_W-1:0] fft_out_im,
  input  logic [11:0] fft_out_index,
  input  logic        fft_out_done,
  // Kinect serial line and depth threshold switches
  input  logic        serial_rx,
  input  logic [7:0]  sw_depth_thresh,
  // Chrontel DVI transmitter
  output logic [11:0] dvi_d,
  output logic        dvi_de,
  output logic        dvi_hsync_n,
  output logic        dvi_vsync_n,
  output logic        dvi_xclk_p,
  output logic        dvi_xclk_n,
  output logic        dvi_reset_n,
  output logic        i2c_scl,
  output logic        i2c_sda_drive_low,
  input  logic        i2c_sda_in,
  output logic        dvi_init_done,
  output logic [4:0]  vol_atten
);
  import haxorus_pkg::*;
  localparam int unsigned GFX_LATENCY = 3;

  // ---------------- audio ----------------
  logic        cmd_valid, cmd_read, cmd_ack, codec_ready;
  logic [6:0]  cmd_addr;
  logic [15:0] cmd_data;
  logic [15:0] pcm_l, pcm_r;
  logic        pcm_valid;
  logic [15:0] out_l, out_r;
  logic        vol_up, vol_down;

  ac97_link u_link (
    .clk, .rst, .ac97_bit_clk, .ac97_sdata_in, .ac97_sdata_out, .ac97_sync, .ac97_reset_n,
    .cmd_valid, .cmd_read, .cmd_addr, .cmd_data, .cmd_ack,
    .status_valid(), .status_addr(), .status_data(),
    .pcm_out_l(out_l), .pcm_out_r(out_r),
    .pcm_in_l(pcm_l), .pcm_in_r(pcm_r), .pcm_in_valid(pcm_valid),
    .codec_ready, .frame_start());

  ac97_cmd u_cmd (
    .clk, .rst, .codec_ready, .vol_up, .vol_down,
    .cmd_valid, .cmd_read, .cmd_addr, .cmd_data, .cmd_ack, .vol_atten);

  // ADC samples go to the DAC in the next frame, and to the FFT
  always_ff @(posedge clk) begin
    if (rst) begin
      out_l <= '0; out_r <= '0; fft_in_valid <= 1'b0; fft_in_re <= '0;
    end else begin
      fft_in_valid <= pcm_valid;
      if (pcm_valid) begin
        logic signed [16:0] sum;
        out_l <= pcm_l;
        out_r <= pcm_r;
        sum = 17'(signed'(pcm_l)) + 17'(signed'(pcm_r));
        fft_in_re <= sum[16:1];
      end
    end
  end

  // ---------------- FFT magnitude ----------------
  logic             mag_valid, mag_last;
  logic [FFT_W-1:0] mag;
  logic [11:0]      mag_index;

  fft_mag_est #(.W(FFT_W), .IDX_W(12)) u_mag (
    .clk, .rst, .in_valid(fft_out_valid), .in_re(fft_out_re), .in_im(fft_out_im),
    .in_index(fft_out_index), .in_last(fft_out_done),
    .out_valid(mag_valid), .out_mag(mag), .out_index(mag_index), .out_last(mag_last));

  // ---------------- Kinect ----------------
  logic [99:0] dance_areas;
  logic [7:0]  hand_areas;
  logic [N_GESTURES-1:0] gestures;

  kinect_in #(
    .CLKS_PER_BIT(CLKS_PER_BIT), .HAND_COUNT_THRESH(HAND_COUNT_THRESH),
    .DANCE_COUNT_THRESH(DANCE_COUNT_THRESH)
  ) u_kinect (
    .clk, .rst, .serial_in(serial_rx), .depth_thresh(sw_depth_thresh),
    .dance_areas, .hand_areas, .gestures, .vol_up, .vol_down);

  // ---------------- video ----------------
  logic       pix_en, de, hs_n, vs_n, switch_buf;
  coord_t     x, y;
  rgb_t       pixel;
  logic [GFX_LATENCY-1:0] pe_d, de_d, hs_d, vs_d;

  dvi_sync u_sync (
    .clk, .rst, .pix_en, .x, .y, .de, .hsync_n(hs_n), .vsync_n(vs_n), .switch_buf);

  graphics_engine #(.MAG_W(FFT_W), .RELOAD_CYCLES(RELOAD_CYCLES)) u_gfx (
    .clk, .rst, .x, .y, .switch_buf, .audio_ampl(signed'(out_l)), .gestures,
    .dance_areas, .hand_areas, .fft_valid(mag_valid), .fft_index(mag_index),
    .fft_mag(mag), .fft_last(mag_last), .pixel_out(pixel));

  // align the syncs with the graphics pipeline
  always_ff @(posedge clk) begin
    if (rst) begin
      pe_d <= '0; de_d <= '0; hs_d <= '1; vs_d <= '1;
    end else begin
      pe_d <= {pe_d[GFX_LATENCY-2:0], pix_en};
      de_d <= {de_d[GFX_LATENCY-2:0], de};
      hs_d <= {hs_d[GFX_LATENCY-2:0], hs_n};
      vs_d <= {vs_d[GFX_LATENCY-2:0], vs_n};
    end
  end

  dvi_out u_dvi (
    .clk, .rst, .pix_en(pe_d[GFX_LATENCY-1]), .pixel, .de(de_d[GFX_LATENCY-1]),
    .hsync_n(hs_d[GFX_LATENCY-1]), .vsync_n(vs_d[GFX_LATENCY-1]),
    .dvi_d, .dvi_de, .dvi_hsync_n, .dvi_vsync_n, .dvi_xclk_p, .dvi_xclk_n, .dvi_reset_n);

  chrontel_i2c_init #(.Q_CYCLES(I2C_Q_CYCLES)) u_i2c (
    .clk, .rst, .scl(i2c_scl), .sda_drive_low(i2c_sda_drive_low), .sda_in(i2c_sda_in),
    .done(dvi_init_done), .ack_error());
endmodule
