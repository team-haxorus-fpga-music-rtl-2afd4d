// haxorus_pkg: types and constants shared by the music visualizer.
// The screen is 640x480 with 10-bit X/Y coordinates. A pixel is 24-bit RGB,
// 8 bits per component, packed {r, g, b} so that pixel_out[23:16] is red.
// The gesture vector carries one pulse per recognised gesture. It has 26 bits:
// the 28 possible pairs of the eight hand areas less the two pairs that are
// used for volume up/down and go to the audio side instead. The graphics
// engine uses the first twelve bits; which pair means which command is this
// design's own assignment.
// Compiled alone, lint reports these constants as unused; the modules use them.
package haxorus_pkg;

  localparam int unsigned H_ACTIVE = 640;
  localparam int unsigned V_ACTIVE = 480;
  localparam int unsigned COORD_W  = 10;

  typedef logic [COORD_W-1:0] coord_t;

  typedef struct packed {
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } rgb_t;

  // Gesture vector bit positions (commands of the graphics engine)
  localparam int unsigned N_GESTURES     = 26;
  localparam int unsigned GST_BG_RAND    = 0;
  localparam int unsigned GST_BG_INVERT  = 1;
  localparam int unsigned GST_BG_CHECKER = 2;
  localparam int unsigned GST_WAVE_RAND  = 3;   // 3, 4, 5: waves 1, 2, 3
  localparam int unsigned GST_WAVE_TYPE  = 6;   // 6, 7, 8: waves 1, 2, 3
  localparam int unsigned GST_SHAPE_RAND = 9;
  localparam int unsigned GST_SHAPE_TYPE = 10;
  localparam int unsigned GST_SHAPE_ONOFF = 11;

  // AC'97 mixer register addresses (AC'97 revision 2.x register map)
  localparam logic [6:0] AC97_REG_MASTER_VOL = 7'h02;
  localparam logic [6:0] AC97_REG_HP_VOL     = 7'h04;
  localparam logic [6:0] AC97_REG_LINEIN_VOL = 7'h10;
  localparam logic [6:0] AC97_REG_PCMOUT_VOL = 7'h18;
  localparam logic [6:0] AC97_REG_REC_SELECT = 7'h1A;
  localparam logic [6:0] AC97_REG_REC_GAIN   = 7'h1C;

endpackage
