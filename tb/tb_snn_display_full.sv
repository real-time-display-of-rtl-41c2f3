// Full-size testbench of snn_display_top with every parameter at its default: ZedBoard
// (YCbCr 4:2:2 pins), 1920x1080 at 150 MHz, 512-clock I2C bit period, 2^21-clock button
// sampling, 1000 time steps per second, 968-bit x 1024 spike memory. The button is held for
// 7 million pixel clocks from frame 2, so the extended raster shows from about frame 4; colour
// bands from frame 7; 9 frames in all. The execution-time text does not change within this
// run (less than one emulated second). Stimulus and checks are in display_tb_body.svh.
module tb_snn_display_full;
  localparam plot_pkg::board_e BOARD = plot_pkg::BOARD_ZEDBOARD;
  localparam int CLK_DIV = 9, BTN_DIV = 21, MS_PS = 1000;
  localparam int NFRAMES = 9, PRESS_F = 2, PRESS_CLKS = 7000000, BANDS_F = 7;
  localparam string NAME = "full-size test (ZedBoard, default parameters)";
  `include "display_tb_body.svh"
endmodule
