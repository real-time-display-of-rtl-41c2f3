// Testbench for text_generator_rotated: "neurons" written upwards (turned a quarter turn
// anticlockwise) in a 16 x 56 box. Expected: box pixel (dx, dy) shows character
// k = 6 - dy / 8 at glyph row dx and glyph column 7 - dy % 8 of the reference table; off outside
// the box and when disabled. Combinational.
module tb_text_generator_rotated;
  int checks = 0, failures = 0;
  logic [11:0] h = 0, v = 0, x0 = 0, y0 = 0;
  logic en = 1, on;
  localparam string S = "neurons";
  text_generator_rotated #(.LEN(7), .TEXT("neurons")) dut (.i_h(h), .i_v(v), .i_x0(x0),
    .i_y0(y0), .i_enable(en), .o_on(on));
  `include "font_ref.svh"
  initial begin
    #10000000 $display("FAIL watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int lit;
    lit = 0;
    #1;
    for (int p = 0; p < 10; p++) begin
      x0 = 12'($urandom_range(0, 1800)); y0 = 12'($urandom_range(0, 1000));
      en = (p != 3);
      for (int y = int'(y0) - 5; y < int'(y0) + 61; y++)
        for (int x = int'(x0) - 5; x < int'(x0) + 21; x++) begin
          bit e;
          if (x < 0 || y < 0) continue;
          h = 12'(x); v = 12'(y); #1;
          e = en && x >= x0 && x < x0 + 16 && y >= y0 && y < y0 + 56
              && glyph(S[6 - (y - y0) / 8], 7 - (y - y0) % 8, x - x0);
          if (e) lit++;
          checks++;
          if (on !== e) begin failures++; if (failures < 10) $display("FAIL at %0d,%0d", x, y); end
        end
    end
    checks++; if (lit < 100) begin failures++; $display("FAIL too few lit pixels"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
