// Horizontal and vertical position counters of the video raster.
//
// The horizontal counter runs 0 .. H_TOTAL-1 and the vertical one advances when it wraps,
// running 0 .. V_TOTAL-1. Values below the visible width/height are the active picture
// (0..1919 x 0..1079 at 1920x1080); front porch, sync and back porch follow in that order.
// Both counters are registered and reset to the top-left pixel.
module position_counters
  import hdmi_resolution_pkg::*;
#(
  parameter res_e RES = RES_1920X1080
) (
  input  logic        i_clk,
  input  logic        i_rst,
  output logic [11:0] o_hcounter,
  output logic [11:0] o_vcounter
);
  localparam logic [11:0] H_TOT = h_total(RES);
  localparam logic [11:0] V_TOT = v_total(RES);

  always_ff @(posedge i_clk) begin
    if (i_rst) begin
      o_hcounter <= '0;
      o_vcounter <= '0;
    end else if (o_hcounter == H_TOT - 1'b1) begin
      o_hcounter <= '0;
      o_vcounter <= (o_vcounter == V_TOT - 1'b1) ? '0 : o_vcounter + 1'b1;
    end else begin
      o_hcounter <= o_hcounter + 1'b1;
    end
  end

endmodule
