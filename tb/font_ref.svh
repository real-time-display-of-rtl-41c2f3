// Test helper: reference glyph lookup for the text testbenches. Loads the character table
// into a testbench array and answers whether pixel (column c, row r) of character code ch is
// lit (column 0 = leftmost = bit 7 of the row byte).
logic [7:0] ref_font [2048];
initial $readmemh("rtl/font8x16.hex", ref_font);
function automatic bit glyph(int ch, int c, int r);
  logic [7:0] row;
  row = ref_font[(ch % 128) * 16 + r];
  return row[7 - c];
endfunction
