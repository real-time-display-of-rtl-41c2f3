// Test helper: behavioural model of an emulator output FIFO (spike or potential FIFO) as seen
// by the display's FIFO readers.
//
// The test pushes words with i_push/i_data. On the rising edge of the reader's ready signal the
// model pops one word; the word appears on o_dout with o_valid high for one clock on the next
// clock. o_empty is the registered fill state (after the pop it already reflects the new count).
module fifo_model #(
  parameter int WIDTH = 18,
  parameter int DEPTH = 4096
) (
  input  logic             i_clk,
  input  logic             i_rst,
  input  logic             i_push,
  input  logic [WIDTH-1:0] i_data,
  input  logic             i_ready,
  output logic [WIDTH-1:0] o_dout,
  output logic             o_valid,
  output logic             o_empty,
  output int               o_count,
  output int               o_pops
);
  logic [WIDTH-1:0] q [$];
  logic ready_q;

  always_ff @(posedge i_clk) begin
    if (i_rst) begin
      q.delete();
      ready_q <= 1'b0;
      o_dout  <= '0;
      o_valid <= 1'b0;
      o_pops  <= 0;
    end else begin
      ready_q <= i_ready;
      o_valid <= 1'b0;
      if (i_ready && !ready_q && q.size() > 0) begin
        o_dout  <= q.pop_front();
        o_valid <= 1'b1;
        o_pops  <= o_pops + 1;
      end
      if (i_push && q.size() < DEPTH) q.push_back(i_data);
    end
  end

  assign o_count = q.size();
  assign o_empty = (q.size() == 0);
endmodule
