// Testbench for text_generator: a 10-character instance ("Columns: 5") at random positions,
// scanned over its box plus a 6-pixel margin. Expected: inside the 80 x 16 box, the pixel of
// character k = dx / 8 at column dx % 8 and row dy of the reference glyph table; outside the
// box and when disabled, off. The generator is combinational (no latency).
module tb_text_generator;
  int checks = 0, failures = 0;
  logic [11:0] h = 0, v = 0, x0 = 0, y0 = 0;
  logic en = 1, on;
  localparam string S = "Columns: 5";
  text_generator #(.LEN(10), .TEXT("Columns: 5")) dut (.i_h(h), .i_v(v), .i_x0(x0), .i_y0(y0),
    .i_enable(en), .o_on(on));
  `include "font_ref.svh"
  initial begin
    #10000000 $display("FAIL watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int lit;
    lit = 0;
    #1;
    for (int p = 0; p < 12; p++) begin
      x0 = (p == 0) ? 12'd0 : 12'($urandom_range(0, 1800));
      y0 = (p == 0) ? 12'd0 : 12'($urandom_range(0, 1000));
      en = (p != 5);
      for (int y = int'(y0) - 6; y < int'(y0) + 22; y++)
        for (int x = int'(x0) - 6; x < int'(x0) + 86; x++) begin
          bit e;
          if (x < 0 || y < 0) continue;
          h = 12'(x); v = 12'(y); #1;
          e = en && x >= x0 && x < x0 + 80 && y >= y0 && y < y0 + 16
              && glyph(S[(x - x0) / 8], (x - x0) % 8, y - y0);
          if (e) lit++;
          checks++;
          if (on !== e) begin failures++; if (failures < 10) $display("FAIL at %0d,%0d box %0d,%0d", x, y, x0, y0); end
        end
    end
    checks++; if (lit < 200) begin failures++; $display("FAIL too few lit pixels"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
