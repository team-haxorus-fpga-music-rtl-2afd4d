// graphics_engine: draws the visualizer picture, one pixel per X/Y request.
// Layers, each with a colour and a valid bit for the requested position:
//   0 background (bg_ctrl), always valid
//   1 bouncing shapes (shape_gen)
//   2-4 three music waves (wave_gen), amplitudes from the average FFT
//       magnitude of the bass, middle and high ranges, thickness from the
//       loudness audio_ampl
//   5-7 three frequency waves (freq_wave_gen) for the ranges 60-250 Hz,
//       250-2,000 Hz and 2,000-6,000 Hz
//   8 Kinect areas (kinect_area_det)
// color_blender averages the valid layers with weights background 1,
// shapes 2, frequency waves 3, waves 4 and Kinect areas 4. lfsr_rng supplies
// randomness. switch_buf (once per frame) moves the shapes and waves and
// swaps the wave buffers; the FFT's last-bin signal swaps the frequency
// wave buffers. Gesture pulses (see haxorus_pkg) change the background,
// waves and shapes.
// Timing: the engine runs at the system clock, twice the pixel clock, so a
// pixel is requested for two cycles: the first cycle reads the layers'
// memories and the second computes; pixel_out for (x, y) appears three
// cycles after the request (two layer stages and the blender).
// Layer order, weights and wave placement are this design's own choices.
// The waves' busy flags are not needed: a buffer copy ends long before the
// next switch_buf.
module graphics_engine #(
  parameter int unsigned MAG_W = 29,
  parameter int unsigned MAG_SHIFT = 16,
  parameter int unsigned RELOAD_CYCLES = 1 << 24
) (
  input  logic                 clk,
  input  logic                 rst,
  input  haxorus_pkg::coord_t  x,
  input  haxorus_pkg::coord_t  y,
  input  logic                 switch_buf,
  input  logic signed [15:0]   audio_ampl,
  input  logic [haxorus_pkg::N_GESTURES-1:0] gestures,
  input  logic [99:0]          dance_areas,
  input  logic [7:0]           hand_areas,
  input  logic                 fft_valid,
  input  logic [11:0]          fft_index,
  input  logic [MAG_W-1:0]     fft_mag,
  input  logic                 fft_last,
  output haxorus_pkg::rgb_t    pixel_out
);
  import haxorus_pkg::*;
  localparam int unsigned N_LAYERS = 9;
  localparam int unsigned BIN_EDGES [4] = '{5, 21, 171, 512};   // 60, 250, 2000, 6000 Hz
  localparam logic [2:0][23:0] FREQ_COLORS = {24'h40A0FF, 24'hFFD000, 24'hFF3000};

  logic [7:0][7:0]     rnd;
  logic [N_LAYERS-1:0] lv;
  rgb_t [N_LAYERS-1:0] lc;
  logic [2:0][9:0]     band_avg;

  lfsr_rng #(.N_LFSR(8), .RELOAD_CYCLES(RELOAD_CYCLES)) u_rng (.clk, .rst, .rnd);

  bg_ctrl u_bg (
    .clk, .rst, .frame_tick(switch_buf), .rnd(rnd[2:0]),
    .cmd_rand(gestures[GST_BG_RAND]), .cmd_invert(gestures[GST_BG_INVERT]),
    .cmd_checker(gestures[GST_BG_CHECKER]), .x, .y, .color(lc[0]));
  assign lv[0] = 1'b1;

  shape_gen #(.N_SHAPES(4)) u_shapes (
    .clk, .rst, .frame_tick(switch_buf), .rnd,
    .cmd_rand(gestures[GST_SHAPE_RAND]), .cmd_type(gestures[GST_SHAPE_TYPE]),
    .cmd_onoff(gestures[GST_SHAPE_ONOFF]), .x, .y, .valid(lv[1]), .color(lc[1]));

  for (genvar i = 0; i < 3; i++) begin : g_wave
    logic busy;
    wave_gen #(.CENTER_Y(120 * (i + 1))) u_wave (
      .clk, .rst, .frame_tick(switch_buf),
      .rnd({rnd[(i + 5) % 8], rnd[(i + 4) % 8], rnd[i + 3]}),
      .cmd_rand(gestures[GST_WAVE_RAND + i]), .cmd_type(gestures[GST_WAVE_TYPE + i]),
      .amp_in(band_avg[i]), .audio_ampl, .x, .y,
      .valid(lv[2 + i]), .color(lc[2 + i]), .busy);
  end

  for (genvar i = 0; i < 3; i++) begin : g_freq
    freq_wave_gen #(
      .MAG_W(MAG_W), .BIN_LO(BIN_EDGES[i]), .BIN_HI(BIN_EDGES[i + 1]),
      .MAG_SHIFT(MAG_SHIFT), .BASE_Y(470 - 20 * i), .COLOR(FREQ_COLORS[i])
    ) u_freq (
      .clk, .rst, .in_valid(fft_valid), .in_index(fft_index), .in_mag(fft_mag),
      .in_last(fft_last), .x, .y, .valid(lv[5 + i]), .color(lc[5 + i]),
      .band_avg(band_avg[i]));
  end

  kinect_area_det u_kinect (
    .clk, .dance_areas, .hand_areas, .x, .y, .valid(lv[8]), .color(lc[8]));

  color_blender #(.N(N_LAYERS)) u_blend (
    .clk, .in_valid(lv), .in_color(lc), .pixel_out);
endmodule
