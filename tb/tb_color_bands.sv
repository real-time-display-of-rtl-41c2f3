// Testbench for color_bands: for random and boundary columns checks the registered colour
// one clock later: 256-pixel bands red, yellow, green, cyan, blue, magenta, then white.
module tb_color_bands;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  logic [11:0] h = '0;
  logic [23:0] c;
  color_bands dut (.i_clk(clk), .i_hcounter(h), .o_color(c));
  localparam logic [23:0] EXP [7] = '{24'hFF0000, 24'hFFFF00, 24'h00FF00, 24'h00FFFF,
                                      24'h0000FF, 24'hFF00FF, 24'hFFFFFF};
  initial begin
    #10000000 $display("FAIL watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int x, band;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      x = (n < 16) ? (n / 2) * 256 + (n % 2) * 255 : $urandom_range(0, 2199);
      h = 12'(x);
      @(posedge clk); #1;
      band = x / 256; if (band > 6) band = 6;
      checks++;
      if (c !== EXP[band]) begin failures++; $display("FAIL column %0d colour %h", x, c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
