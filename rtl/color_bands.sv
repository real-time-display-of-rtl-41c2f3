// Test picture for the HDMI link: vertical colour bands 256 pixels wide.
//
// From the left: red, yellow, green, cyan, blue, magenta, then white to the right edge, all
// components at 0 or 0xFF. The colour is registered, one clock after the counters, the same
// latency as the plot picture generator.
module color_bands (
  input  logic        i_clk,
  input  logic [11:0] i_hcounter,
  output logic [23:0] o_color
);
  always_ff @(posedge i_clk) begin
    case (i_hcounter[11:8])
      4'd0:    o_color <= 24'hFF0000;
      4'd1:    o_color <= 24'hFFFF00;
      4'd2:    o_color <= 24'h00FF00;
      4'd3:    o_color <= 24'h00FFFF;
      4'd4:    o_color <= 24'h0000FF;
      4'd5:    o_color <= 24'hFF00FF;
      default: o_color <= 24'hFFFFFF;
    endcase
  end

endmodule
