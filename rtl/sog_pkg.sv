// sog_pkg: constants and types shared by the system-on-glass interface.
//
// The panel is qVGA (240 x 320 pixels, portrait) with 6-bit grey levels per
// sub-pixel. The graphics controller sends the three colours of a line one
// after the other. Each colour period carries 240 sub-pixels, one per MCLK,
// as 6 bits on six LVDS lanes (TX0..TX5). Two more lanes carry MCLK and DE.
// The panel-size numbers follow the qVGA, 6-bit target. The blanking lengths
// are this design's choice: they fill one 60 frame/s frame at 15 MHz exactly
// (320 lines x 780 clocks + 400 clocks = 250,000 clocks).
package sog_pkg;

  localparam int unsigned H_ACTIVE   = 240;  // data-driver channels = pixels per line
  localparam int unsigned V_LINES    = 320;  // gate lines
  localparam int unsigned GRAY_BITS  = 6;    // bits per sub-pixel = data lanes
  localparam int unsigned N_LANES    = GRAY_BITS + 2; // data lanes + MCLK + DE
  localparam int unsigned H_GAP      = 20;   // no-data MCLKs after each colour
  localparam int unsigned V_BLANK    = 400;  // extra no-data MCLKs per frame
  localparam int unsigned VBLANK_DET = 64;   // DE-low length that marks a new frame
  localparam int unsigned TRIM_BITS  = 7;    // LVDS receiver offset-trim code width

  // Colour being transferred; also the PSC (pixel switch) code.
  typedef enum logic [1:0] {
    COL_R = 2'd0,
    COL_G = 2'd1,
    COL_B = 2'd2
  } color_e;

  typedef logic [GRAY_BITS-1:0] gray_t;

endpackage
