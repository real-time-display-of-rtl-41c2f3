// Builds the HDMI video signals from a colour and the position of the pixel it belongs to.
//
// Data enable is 1 inside the visible area. Each sync output carries the resolution's pulse
// polarity while the counters are inside the sync area and the opposite level elsewhere. R, G and
// B repeat the incoming colour (red in i_color[23:16]) inside the visible area and are 0 in the
// blanking interval. Every output is registered: one clock of latency, all outputs aligned.
module rgb_generator
  import hdmi_resolution_pkg::*;
#(
  parameter res_e RES = RES_1920X1080
) (
  input  logic        i_clk,
  input  logic [23:0] i_color,
  input  logic [11:0] i_hcounter,
  input  logic [11:0] i_vcounter,
  output logic [7:0]  o_r,
  output logic [7:0]  o_g,
  output logic [7:0]  o_b,
  output logic        o_de,
  output logic        o_hsync,
  output logic        o_vsync
);
  localparam timing_t T = res_timing(RES);
  localparam logic [11:0] HS_START = T.h_visible + T.h_front;
  localparam logic [11:0] HS_END   = T.h_visible + T.h_front + T.h_sync;
  localparam logic [11:0] VS_START = T.v_visible + T.v_front;
  localparam logic [11:0] VS_END   = T.v_visible + T.v_front + T.v_sync;

  logic visible, in_hs, in_vs;
  assign visible = (i_hcounter < T.h_visible) && (i_vcounter < T.v_visible);
  assign in_hs   = (i_hcounter >= HS_START) && (i_hcounter < HS_END);
  assign in_vs   = (i_vcounter >= VS_START) && (i_vcounter < VS_END);

  always_ff @(posedge i_clk) begin
    o_de    <= visible;
    o_hsync <= in_hs ? T.h_pol : ~T.h_pol;
    o_vsync <= in_vs ? T.v_pol : ~T.v_pol;
    {o_r, o_g, o_b} <= visible ? i_color : 24'h0;
  end

endmodule
