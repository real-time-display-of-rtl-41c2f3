// Carries an event and a data word from one clock domain to another.
//
// The source flips a toggle flag and captures i_data on every i_pulse. The flag crosses through
// three flip-flops in the destination domain; a change of the last two gives one o_pulse and
// copies the captured word, which has been stable since the flip, into o_data. Events must be
// further apart than about four destination clocks plus two source clocks; the display sends one
// per video frame in each direction. Latency: 3 to 4 destination clocks.
module cdc_sync #(
  parameter int WIDTH = 1
) (
  input  logic             i_src_clk,
  input  logic             i_src_rst,
  input  logic             i_pulse,
  input  logic [WIDTH-1:0] i_data,
  input  logic             i_dst_clk,
  input  logic             i_dst_rst,
  output logic             o_pulse,
  output logic [WIDTH-1:0] o_data
);
  logic             toggle;
  logic [WIDTH-1:0] hold;
  logic [2:0]       sync;

  always_ff @(posedge i_src_clk) begin
    if (i_src_rst) begin
      toggle <= 1'b0;
      hold   <= '0;
    end else if (i_pulse) begin
      toggle <= ~toggle;
      hold   <= i_data;
    end
  end

  always_ff @(posedge i_dst_clk) begin
    if (i_dst_rst) begin
      sync    <= '0;
      o_pulse <= 1'b0;
      o_data  <= '0;
    end else begin
      sync    <= {sync[1:0], toggle};
      o_pulse <= sync[2] ^ sync[1];
      if (sync[2] ^ sync[1]) o_data <= hold;
    end
  end

endmodule
