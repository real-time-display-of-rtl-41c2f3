// Testbench for rgb_generator (1920x1080): feeds a reference raster scan and a random colour
// and checks, one clock later, DE (visible area only), HSYNC active high on columns 2008..2051,
// VSYNC active high on lines 1084..1088, RGB equal to the colour of the previous clock inside the
// visible area and black outside. Counts DE clocks per frame (1920 x 1080).
module tb_rgb_generator;
  import hdmi_resolution_pkg::*;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  logic [11:0] h = '0, v = '0;
  logic [23:0] color = '0;
  logic [7:0] r, g, b;
  logic de, hs, vs;
  rgb_generator #(.RES(RES_1920X1080)) dut (.i_clk(clk), .i_color(color), .i_hcounter(h),
    .i_vcounter(v), .o_r(r), .o_g(g), .o_b(b), .o_de(de), .o_hsync(hs), .o_vsync(vs));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    #100000000 $display("FAIL watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int ph, pv, de_count;
    logic [23:0] pc;
    de_count = 0;
    @(negedge clk);
    for (int n = 0; n < 2200 * 1125 + 5; n++) begin
      ph = h; pv = v; pc = color;
      @(posedge clk);
      #1;
      begin
        bit vis;
        vis = ph < 1920 && pv < 1080;
        if (de !== vis) check(0, $sformatf("de at %0d,%0d", ph, pv));
        if (hs !== (ph >= 2008 && ph < 2052)) check(0, $sformatf("hsync at %0d", ph));
        if (vs !== (pv >= 1084 && pv < 1089)) check(0, $sformatf("vsync at line %0d", pv));
        if ({r, g, b} !== (vis ? pc : 24'h0)) check(0, $sformatf("rgb at %0d,%0d", ph, pv));
        if (de && n < 2200 * 1125) de_count++;
        if (ph === 0) check(1, "line");
      end
      @(negedge clk);
      color = 24'($urandom);
      if (h == 2199) begin h = 0; v = (v == 1124) ? 12'd0 : v + 1'b1; end else h = h + 1'b1;
    end
    check(de_count === 1920 * 1080, $sformatf("DE clocks %0d", de_count));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
