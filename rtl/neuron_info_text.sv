// Text block naming one monitored neuron, placed at the left of its potential plot.
//
// Five lines, 20 pixels apart, from (i_x0, i_y0): "Neuron in <COLOUR>" (reported on o_title so it
// can take the plot's colour), then "Virtualization level: v", "Row: rr", "Column: cc" and
// "Identifier value: iii", where the identifier is the neuron's row in the raster plot,
// col + NB_COLUMN*(row + NB_ROW*virt) on chip 0. Numbers have blank leading zeros.
// Outputs are combinational in (i_h, i_v).
module neuron_info_text
  import neurons_pkg::*;
#(
  parameter int                  NB_COLUMN = 5,
  parameter int                  NB_ROW    = 5,
  parameter int                  NB_VIRT   = 8,
  parameter int                  TLEN      = 14,
  parameter logic [8*TLEN-1:0]   TITLE     = "Neuron in BLUE"
) (
  input  logic [11:0]  i_h,
  input  logic [11:0]  i_v,
  input  logic [11:0]  i_x0,
  input  logic [11:0]  i_y0,
  input  logic         i_enable,
  input  mon_neuron_t  i_neuron,
  output logic         o_title,
  output logic         o_black
);
  logic [31:0] id;
  logic [0:0][3:0] d_virt;
  logic [1:0][3:0] d_row, d_col;
  logic [2:0][3:0] d_id;
  logic [7:0] on;

  always_comb begin
    id        = id_value(neuron_id_t'({7'd0, i_neuron.virt, i_neuron.row, i_neuron.col}), NB_COLUMN, NB_ROW, NB_VIRT);
    d_virt[0] = 4'(i_neuron.virt);
    d_row[1]  = (i_neuron.row >= 4'd10) ? 4'd1 : 4'hF;
    d_row[0]  = 4'(i_neuron.row % 4'd10);
    d_col[1]  = (i_neuron.col >= 4'd10) ? 4'd1 : 4'hF;
    d_col[0]  = 4'(i_neuron.col % 4'd10);
    d_id[2]   = (id >= 100) ? 4'(id / 100) : 4'hF;
    d_id[1]   = (id >= 10) ? 4'((id / 10) % 10) : 4'hF;
    d_id[0]   = 4'(id % 10);
  end

  text_generator #(.LEN(TLEN), .TEXT(TITLE)) u_t0 (
    .i_h, .i_v, .i_x0, .i_y0, .i_enable, .o_on(on[0]));
  text_generator #(.LEN(22), .TEXT("Virtualization level: ")) u_t1 (
    .i_h, .i_v, .i_x0, .i_y0(i_y0 + 12'd20), .i_enable, .o_on(on[1]));
  integer_text_generator #(.NDIG(1)) u_n1 (
    .i_h, .i_v, .i_x0(i_x0 + 12'(8 * 22)), .i_y0(i_y0 + 12'd20), .i_enable, .i_digits(d_virt), .o_on(on[2]));
  text_generator #(.LEN(5), .TEXT("Row: ")) u_t2 (
    .i_h, .i_v, .i_x0, .i_y0(i_y0 + 12'd40), .i_enable, .o_on(on[3]));
  integer_text_generator #(.NDIG(2)) u_n2 (
    .i_h, .i_v, .i_x0(i_x0 + 12'(8 * 5)), .i_y0(i_y0 + 12'd40), .i_enable, .i_digits(d_row), .o_on(on[4]));
  text_generator #(.LEN(8), .TEXT("Column: ")) u_t3 (
    .i_h, .i_v, .i_x0, .i_y0(i_y0 + 12'd60), .i_enable, .o_on(on[5]));
  integer_text_generator #(.NDIG(2)) u_n3 (
    .i_h, .i_v, .i_x0(i_x0 + 12'(8 * 8)), .i_y0(i_y0 + 12'd60), .i_enable, .i_digits(d_col), .o_on(on[6]));

  logic id_t, id_n;
  text_generator #(.LEN(18), .TEXT("Identifier value: ")) u_t4 (
    .i_h, .i_v, .i_x0, .i_y0(i_y0 + 12'd80), .i_enable, .o_on(id_t));
  integer_text_generator #(.NDIG(3)) u_n4 (
    .i_h, .i_v, .i_x0(i_x0 + 12'(8 * 18)), .i_y0(i_y0 + 12'd80), .i_enable, .i_digits(d_id), .o_on(id_n));
  assign on[7] = id_t | id_n;

  assign o_title = on[0];
  assign o_black = |on[7:1];

endmodule
