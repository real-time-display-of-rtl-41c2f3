// Lights the pixels of a number given as a digit array.
//
// i_digits holds NDIG digits, index 0 on the right; a digit is 0..9, or 4'hF for a blank
// (a suppressed leading zero). The ASCII code of a digit is 0x30 + digit. Placement and glyph
// lookup are those of the constant-string generator; o_on is combinational.
module integer_text_generator #(
  parameter int NDIG = 2
) (
  input  logic [11:0]           i_h,
  input  logic [11:0]           i_v,
  input  logic [11:0]           i_x0,
  input  logic [11:0]           i_y0,
  input  logic                  i_enable,
  input  logic [NDIG-1:0][3:0]  i_digits,
  output logic                  o_on
);
  logic        in_box;
  logic [11:0] dx, dy;
  logic [3:0]  dig;
  logic [7:0]  row;
  logic [31:0] idx;

  assign in_box = i_enable && (i_h >= i_x0) && (i_v >= i_y0)
               && (i_h < i_x0 + 12'(8 * NDIG)) && (i_v < i_y0 + 12'd16);
  assign dx   = i_h - i_x0;
  assign dy   = i_v - i_y0;
  assign idx  = in_box ? (NDIG - 1 - int'(dx[11:3])) : 0;
  assign dig  = i_digits[idx];

  font_rom u_font (.i_addr({7'h30 + 7'(dig), dy[3:0]}), .o_row(row));

  assign o_on = in_box && (dig <= 4'd9) && row[3'd7 - dx[2:0]];

endmodule
