// Turns the middle push button into an on/off switch (normal / extended raster plot).
//
// A free-running 2^DIV_LOG2 counter (2^21 clocks, about 14 ms at 150 MHz) gives a slow sampling
// tick; the button is sampled only on that tick, so contact bounce is not seen. Each rising edge
// of the sampled button flips o_switch. Press-to-change latency is up to one sampling period.
module button_switch #(
  parameter int DIV_LOG2 = 21
) (
  input  logic i_clk,
  input  logic i_rst,
  input  logic i_button,
  output logic o_switch
);
  logic [DIV_LOG2-1:0] div;
  logic                sampled, sampled_d;

  always_ff @(posedge i_clk) begin
    if (i_rst) begin
      div       <= '0;
      sampled   <= 1'b0;
      sampled_d <= 1'b0;
      o_switch  <= 1'b0;
    end else begin
      div <= div + 1'b1;
      if (&div) begin
        sampled   <= i_button;
        sampled_d <= sampled;
        if (sampled && !sampled_d) o_switch <= ~o_switch;
      end
    end
  end

endmodule
