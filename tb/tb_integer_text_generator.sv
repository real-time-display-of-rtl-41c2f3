// Testbench for integer_text_generator with 4 digits: random digit vectors (index 0 = rightmost
// digit, 4'hF = blank, values 10..14 also drawn blank) at random positions. Expected: digit
// glyph from the reference table ('0' + value) or nothing for blanks; off outside the 32 x 16
// box and when disabled. Combinational.
module tb_integer_text_generator;
  int checks = 0, failures = 0;
  logic [11:0] h = 0, v = 0, x0 = 0, y0 = 0;
  logic en = 1, on;
  logic [3:0][3:0] d = '0;
  integer_text_generator #(.NDIG(4)) dut (.i_h(h), .i_v(v), .i_x0(x0), .i_y0(y0), .i_enable(en),
    .i_digits(d), .o_on(on));
  `include "font_ref.svh"
  initial begin
    #10000000 $display("FAIL watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    #1;
    for (int p = 0; p < 40; p++) begin
      x0 = 12'($urandom_range(0, 1800)); y0 = 12'($urandom_range(0, 1000));
      en = (p % 9 != 4);
      for (int k = 0; k < 4; k++) d[k] = ($urandom_range(0, 4) == 0) ? 4'($urandom_range(10, 15)) : 4'($urandom_range(0, 9));
      for (int y = int'(y0) - 3; y < int'(y0) + 19; y++)
        for (int x = int'(x0) - 3; x < int'(x0) + 35; x++) begin
          bit e;
          int k;
          if (x < 0 || y < 0) continue;
          h = 12'(x); v = 12'(y); #1;
          k = 3 - (x - int'(x0)) / 8;
          e = en && x >= x0 && x < x0 + 32 && y >= y0 && y < y0 + 16 && d[k] <= 9
              && glyph(48 + d[k], (x - x0) % 8, y - y0);
          checks++;
          if (on !== e) begin failures++; if (failures < 10) $display("FAIL at %0d,%0d", x, y); end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
