// System testbench of snn_display_top on the ZC706 variant (RGB pins), with a short I2C bit
// period (8 clocks), a fast button sampler (64 clocks) and 5 time steps per displayed second so
// that every mechanism is reached within 9 frames: transmitter configuration with the bus
// switch, spike and potential reading, buffer transfers at frame end, normal plots, extended
// raster after a button press (frame 4), colour bands (from frame 7), execution-time display.
// The stimulus, the reference and all checks are in display_tb_body.svh.
module tb_snn_display_top;
  localparam plot_pkg::board_e BOARD = plot_pkg::BOARD_ZC706;
  localparam int CLK_DIV = 3, BTN_DIV = 6, MS_PS = 5;
  localparam int NFRAMES = 9, PRESS_F = 4, PRESS_CLKS = 1000, BANDS_F = 7;
  localparam string NAME = "system test (ZC706, fast settings)";
  `include "display_tb_body.svh"
endmodule
