// HDMI link of the display: position counters out, colour in, transmitter pins out.
//
// position_counters scan the raster; the picture generator answers each position with a colour
// one clock later and hands back the counters it used (i_hcounter/i_vcounter), so colour and
// position stay aligned. rgb_generator turns them into DE, syncs and blanked RGB (one clock).
// On ZedBoard the RGB stream goes through the two-stage RGB-to-YCbCr pipeline and then to the
// 4:2:2 pin mapping; on ZC706 RGB goes to the pins directly. config_hdmi_chip_i2c programs the
// transmitter after reset. Everything runs on the pixel clock (150 MHz).
// Latency from i_color to the pins: 1 clock on ZC706, 3 clocks on ZedBoard.
module hdmi_connection
  import hdmi_resolution_pkg::*;
  import plot_pkg::*;
#(
  parameter board_e BOARD        = BOARD_ZEDBOARD,
  parameter res_e   RES          = RES_1920X1080,
  parameter int     CLK_DIV_LOG2 = 9
) (
  input  logic        i_clk,
  input  logic        i_rst,
  input  logic [23:0] i_color,
  input  logic [11:0] i_hcounter,
  input  logic [11:0] i_vcounter,
  output logic [11:0] o_hcounter,
  output logic [11:0] o_vcounter,
  output logic        o_hdmi_clk,
  output logic [35:0] o_hdmi_d,
  output logic        o_hdmi_de,
  output logic        o_hdmi_hsync,
  output logic        o_hdmi_vsync,
  output logic        o_hdmi_scl,
  output logic        o_hdmi_sda,
  output logic        o_hdmi_sda_release,
  output logic        o_config_done
);
  logic [7:0] r, g, b, y, cb, cr;
  logic       de, hs, vs, de_c, hs_c, vs_c;

  position_counters #(.RES(RES)) u_position_counters (
    .i_clk, .i_rst, .o_hcounter, .o_vcounter
  );

  rgb_generator #(.RES(RES)) u_rgb_generator (
    .i_clk, .i_color, .i_hcounter, .i_vcounter,
    .o_r(r), .o_g(g), .o_b(b), .o_de(de), .o_hsync(hs), .o_vsync(vs)
  );

  convert_rgb_ycbcr u_convert_rgb_ycbcr (
    .i_clk, .i_r(r), .i_g(g), .i_b(b), .i_de(de), .i_hsync(hs), .i_vsync(vs),
    .o_y(y), .o_cb(cb), .o_cr(cr), .o_de(de_c), .o_hsync(hs_c), .o_vsync(vs_c)
  );

  localparam logic ZB = (BOARD == BOARD_ZEDBOARD);

  hdmi_output #(.BOARD(BOARD)) u_hdmi_output (
    .i_clk, .i_r(r), .i_g(g), .i_b(b), .i_y(y), .i_cb(cb), .i_cr(cr),
    .i_de   (ZB ? de_c : de),
    .i_hsync(ZB ? hs_c : hs),
    .i_vsync(ZB ? vs_c : vs),
    .o_hdmi_clk, .o_hdmi_d, .o_hdmi_de, .o_hdmi_hsync, .o_hdmi_vsync
  );

  config_hdmi_chip_i2c #(.BOARD(BOARD), .CLK_DIV_LOG2(CLK_DIV_LOG2)) u_config (
    .i_clk, .i_rst,
    .o_scl(o_hdmi_scl), .o_sda(o_hdmi_sda), .o_sda_release(o_hdmi_sda_release), .o_done(o_config_done)
  );

endmodule
