// Testbench for font_rom: checks the 'A' glyph row by row against the character drawing of the
// document (code 0x41, rows 0..15), that the space is blank, that every character used by the
// display (digits, letters, ':', '(', ')', '-', '.') has at least one lit pixel in rows 2..12
// and none in rows 0 and 14..15 (so stacked text lines do not touch), for every address.
module tb_font_rom;
  logic [10:0] addr = '0;
  logic [7:0] row;
  int checks = 0, failures = 0;
  font_rom dut (.i_addr(addr), .o_row(row));
  localparam logic [7:0] A_ROWS [16] = '{8'h00, 8'h00, 8'h10, 8'h38, 8'h6C, 8'hC6, 8'hC6, 8'hFE,
                                         8'hC6, 8'hC6, 8'hC6, 8'hC6, 8'h00, 8'h00, 8'h00, 8'h00};
  initial begin
    #1000000 $display("FAIL watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    string used;
    used = "0123456789ABCDEFGHIJKLMNOPQRSTUVWXYZabcdefghijklmnopqrstuvwxyz:()-.";
    for (int r = 0; r < 16; r++) begin
      addr = 11'(8'h41 * 16 + r); #1;
      checks++; if (row !== A_ROWS[r]) begin failures++; $display("FAIL A row %0d: %h", r, row); end
      addr = 11'(8'h20 * 16 + r); #1;
      checks++; if (row !== 0) begin failures++; $display("FAIL space row %0d", r); end
    end
    for (int k = 0; k < used.len(); k++) begin
      int lit, edge_lit;
      lit = 0; edge_lit = 0;
      for (int r = 0; r < 16; r++) begin
        addr = 11'(used[k] * 16 + r); #1;
        if (r >= 2 && r <= 12 && row != 0) lit++;
        if ((r == 0 || r >= 14) && row != 0) edge_lit++;
      end
      checks++;
      if (lit == 0 || edge_lit !== 0) begin failures++; $display("FAIL glyph '%s'", used[k]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
