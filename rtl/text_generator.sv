// Lights the pixels of a constant character string.
//
// TEXT is an LEN-character string (first character in the most significant byte) drawn in 8x16
// cells with its top-left corner at (i_x0, i_y0). For a pixel in_box the box, its offset from the
// corner selects character dx/8, glyph row dy, and glyph bit 7 - dx%8; the font is looked up as
// {ASCII code, dy[3:0]}. Both corner tests are done before subtracting, so no signed arithmetic
// is needed. o_on is combinational; i_enable = 0 hides the text.
module text_generator #(
  parameter int               LEN  = 8,
  parameter logic [8*LEN-1:0] TEXT = "ZedBoard"
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
               && (i_h < i_x0 + 12'(8 * LEN)) && (i_v < i_y0 + 12'd16);
  assign dx   = i_h - i_x0;
  assign dy   = i_v - i_y0;
  assign idx  = in_box ? int'(dx[11:3]) : 0;
  assign code = 7'(TEXT[8*(LEN-1-idx) +: 8]);

  font_rom u_font (.i_addr({code, dy[3:0]}), .o_row(row));

  assign o_on = in_box && row[3'd7 - dx[2:0]];

endmodule
