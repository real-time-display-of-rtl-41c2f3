// Drives the ADV7511 input pins for the chosen board.
//
// ZC706 (24-bit RGB 4:4:4): R on D[35:28], G on D[23:16], B on D[11:4].
// ZedBoard (16-bit YCbCr 4:2:2, style 3): Y on D[23:16] every pixel; D[15:8] alternates between
// Cb and Cr. A ping-pong bit is cleared while data enable is 0 and toggles on every enabled pixel,
// so each line starts with Cb. Unused data pins are 0. The pixel clock is forwarded as hdmi_clk;
// data enable and syncs are passed through. Data outputs are combinational from the inputs and the
// ping-pong register.
module hdmi_output
  import plot_pkg::*;
#(
  parameter board_e BOARD = BOARD_ZEDBOARD
) (
  input  logic        i_clk,
  input  logic [7:0]  i_r,
  input  logic [7:0]  i_g,
  input  logic [7:0]  i_b,
  input  logic [7:0]  i_y,
  input  logic [7:0]  i_cb,
  input  logic [7:0]  i_cr,
  input  logic        i_de,
  input  logic        i_hsync,
  input  logic        i_vsync,
  output logic        o_hdmi_clk,
  output logic [35:0] o_hdmi_d,
  output logic        o_hdmi_de,
  output logic        o_hdmi_hsync,
  output logic        o_hdmi_vsync
);
  logic cr_turn;   // 0: Cb on this pixel, 1: Cr

  always_ff @(posedge i_clk) cr_turn <= i_de ? ~cr_turn : 1'b0;

  always_comb begin
    o_hdmi_d = '0;
    if (BOARD == BOARD_ZC706) begin
      o_hdmi_d[35:28] = i_r;
      o_hdmi_d[23:16] = i_g;
      o_hdmi_d[11:4]  = i_b;
    end else begin
      o_hdmi_d[23:16] = i_y;
      o_hdmi_d[15:8]  = cr_turn ? i_cr : i_cb;
    end
  end

  assign o_hdmi_clk   = i_clk;
  assign o_hdmi_de    = i_de;
  assign o_hdmi_hsync = i_hsync;
  assign o_hdmi_vsync = i_vsync;

endmodule
