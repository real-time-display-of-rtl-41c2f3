// Testbench for neuron_info_text (5 columns x 5 rows x 8 levels): for random monitored neurons
// (including row/column 10..15 for two-digit values) at random positions, scans the 5-line text
// block and compares every pixel with the reference glyphs of the expected lines:
//   "Neuron in BLUE" (o_title), "Virtualization level: v", "Row: rr", "Column: cc",
//   "Identifier value: iii" (o_black), numbers right-aligned, identifier = col + 5*(row + 5*virt).
// Lines are 20 pixels apart; nothing is lit when disabled.
module tb_neuron_info_text;
  import neurons_pkg::*;
  int checks = 0, failures = 0;
  logic [11:0] h = 0, v = 0, x0 = 0, y0 = 0;
  logic en = 1, title, black;
  mon_neuron_t nrn;
  neuron_info_text #(.NB_COLUMN(5), .NB_ROW(5), .NB_VIRT(8), .TLEN(14), .TITLE("Neuron in BLUE")) dut (
    .i_h(h), .i_v(v), .i_x0(x0), .i_y0(y0), .i_enable(en), .i_neuron(nrn), .o_title(title), .o_black(black));
  `include "font_ref.svh"

  function automatic string num(int val, int w);
    string s;
    s = $sformatf("%0d", val);
    while (s.len() < w) s = {" ", s};
    return s;
  endfunction

  int lit = 0;

  initial begin
    #100000000 $display("FAIL watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    string lines [5];
    for (int p = 0; p < 12; p++) begin
      nrn.virt = 3'($urandom); nrn.row = 4'($urandom); nrn.col = 4'($urandom);
      x0 = 12'($urandom_range(0, 1600)); y0 = 12'($urandom_range(0, 900));
      en = (p != 4);
      lines[0] = "Neuron in BLUE";
      lines[1] = {"Virtualization level: ", num(nrn.virt, 1)};
      lines[2] = {"Row: ", num(nrn.row, 2)};
      lines[3] = {"Column: ", num(nrn.col, 2)};
      lines[4] = {"Identifier value: ", num(nrn.col + 5 * (nrn.row + 5 * nrn.virt), 3)};
      for (int y = int'(y0) - 2; y < int'(y0) + 100; y++)
        for (int x = int'(x0) - 2; x < int'(x0) + 200; x++) begin
          bit et, eb;
          int ln, dy, dx;
          if (x < 0 || y < 0) continue;
          h = 12'(x); v = 12'(y); #1;
          et = 0; eb = 0;
          dy = y - int'(y0); dx = x - int'(x0);
          ln = dy / 20;
          if (en && dy >= 0 && dx >= 0 && ln < 5 && dy % 20 < 16 && dx / 8 < lines[ln].len()) begin
            bit g;
            g = glyph(lines[ln][dx / 8], dx % 8, dy % 20);
            if (ln == 0) et = g; else eb = g;
          end
          if (et || eb) lit++;
          checks++;
          if (title !== et || black !== eb) begin
            failures++;
            if (failures < 10) $display("FAIL at %0d,%0d line %0d", dx, dy, ln);
          end
        end
    end
    checks++; if (lit < 1000) begin failures++; $display("FAIL too few lit pixels: %0d", lit); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
