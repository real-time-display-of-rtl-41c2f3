// Board selection, colours and screen layout of the display.
//
// Colours are 24-bit RGB, red in [23:16]. The layout is chosen for the 1920x1080 screen and also
// fits 1680x1050: the 1024 time stamps of the plots start at x = PLOT_X0; the normal raster plot
// (at most 200 neurons) sits at the top, the four 180-line potential plots below it, separated by
// 2-line borders; the extended raster plot ends at line EXT_BOTTOM.
package plot_pkg;

  typedef enum logic { BOARD_ZEDBOARD = 1'b0, BOARD_ZC706 = 1'b1 } board_e;

  typedef logic [23:0] rgb_t;

  localparam rgb_t C_WHITE  = 24'hFFFFFF;
  localparam rgb_t C_BLACK  = 24'h000000;
  localparam rgb_t C_BLUE   = 24'h0000FF;
  localparam rgb_t C_RED    = 24'hFF0000;
  localparam rgb_t C_GREEN  = 24'h00A000;
  localparam rgb_t C_ORANGE = 24'hFF8000;
  localparam rgb_t C_GREY   = 24'h808080;

  localparam int PLOT_X0     = 448;   // first time-stamp column
  localparam int PLOT_W      = 1024;
  localparam int RASTER_TOP  = 40;    // top line of the normal raster plot
  localparam int POT_TOP     = 300;   // top line of the first potential plot
  localparam int POT_PITCH   = 182;   // 180 lines + 2-line border
  localparam int EXT_BOTTOM  = 1000;  // bottom line of the extended raster plot
  localparam int INFO_X      = 16;    // left edge of the text columns

endpackage
