// Lights the pixels of a constant string turned a quarter turn anticlockwise, read bottom to top
// (vertical axis labels).
//
// The box is 16 pixels wide and 8*LEN pixels high, top-left corner at (i_x0, i_y0). Horizontal
// and vertical roles swap: the glyph row is dx, the character is counted from the end of the
// string, LEN-1 - dy/8, and the glyph column is 7 - dy%8, so bit dy%8 of the row is tested.
// o_on is combinational.
module text_generator_rotated #(
  parameter int               LEN  = 7,
  parameter logic [8*LEN-1:0] TEXT = "neurons"
) (
  input  logic [11:0] i_h,
  input  logic [11:0] i_v,
  input  logic [11:0] i_x0,
  input  logic [11:0] i_y0,
  input  logic        i_enable,
  output logic        o_on
);
  logic        in_box;
  logic [11:0] dx, dy;
  logic [6:0]  code;
  logic [7:0]  row;
  logic [31:0] idx;

  assign in_box = i_enable && (i_h >= i_x0) && (i_v >= i_y0)
               && (i_h < i_x0 + 12'd16) && (i_v < i_y0 + 12'(8 * LEN));
  assign dx   = i_h - i_x0;
  assign dy   = i_v - i_y0;
  assign idx  = in_box ? (LEN - 1 - int'(dy[11:3])) : 0;
  assign code = 7'(TEXT[8*(LEN-1-idx) +: 8]);

  font_rom u_font (.i_addr({code, dx[3:0]}), .o_row(row));

  assign o_on = in_box && row[dy[2:0]];

endmodule
