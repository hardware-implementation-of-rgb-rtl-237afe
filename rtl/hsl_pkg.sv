// Shared types and constants of the RGB-to-HSL converters.
//
// A pixel enters as three unsigned colour channels of CHAN_W bits each and
// leaves as hue in whole degrees (0..359, HUE_W bits), saturation and
// luminance on the same full scale as the input channels (0..2**CHAN_W-1).
// Expressing hue in degrees follows the converter's purpose of giving "colour
// in degree"; the 8-bit channel width and the full-scale encoding of S and L
// are this design's own choices.
package hsl_pkg;

  // Width of one colour channel (R, G or B) and of S and L.
  localparam int unsigned CHAN_W = 8;
  // Hue is an integer number of degrees below 360.
  localparam int unsigned HUE_W  = 9;
  localparam int unsigned HUE_FULL = 360;
  localparam int unsigned HUE_SECTOR = 60;

  // Which channel holds the maximum; ties resolve R before G before B.
  typedef enum logic [1:0] {
    MAX_R = 2'd0,
    MAX_G = 2'd1,
    MAX_B = 2'd2
  } max_sel_e;

  typedef struct packed {
    logic [CHAN_W-1:0] r;
    logic [CHAN_W-1:0] g;
    logic [CHAN_W-1:0] b;
  } rgb_t;

  typedef struct packed {
    logic [HUE_W-1:0]  h;
    logic [CHAN_W-1:0] s;
    logic [CHAN_W-1:0] l;
  } hsl_t;

endpackage
