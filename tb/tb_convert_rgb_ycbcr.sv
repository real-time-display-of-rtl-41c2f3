// Testbench for convert_rgb_ycbcr: random and corner colours, one per clock.
// Reference: Y = 16 + floor((47R + 157G + 16B) / 256), Cb = 128 + floor((-26R - 87G + 112B) / 256),
// Cr = 128 + floor((112R - 102G - 10B) / 256), computed with integers in the testbench.
// Checks value and the 2-clock latency of data and of DE/HSYNC/VSYNC.
module tb_convert_rgb_ycbcr;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  logic [7:0] r = '0, g = '0, b = '0, y, cb, cr;
  logic de = 1'b0, hs = 1'b0, vs = 1'b0, ode, ohs, ovs;
  convert_rgb_ycbcr dut (.i_clk(clk), .i_r(r), .i_g(g), .i_b(b), .i_de(de), .i_hsync(hs),
    .i_vsync(vs), .o_y(y), .o_cb(cb), .o_cr(cr), .o_de(ode), .o_hsync(ohs), .o_vsync(ovs));

  function automatic int fdiv(int x);   // floor(x / 256)
    return x >>> 8;
  endfunction

  initial begin
    #10000000 $display("FAIL watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [26:0] hist [3];
    int ey, ecb, ecr;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (n >= 2) begin
        ey  = 16  + fdiv(47 * hist[1][26:19] + 157 * hist[1][18:11] + 16 * hist[1][10:3]);
        ecb = 128 + fdiv(-26 * hist[1][26:19] - 87 * hist[1][18:11] + 112 * hist[1][10:3]);
        ecr = 128 + fdiv(112 * hist[1][26:19] - 102 * hist[1][18:11] - 10 * hist[1][10:3]);
        checks++;
        if (y !== 8'(ey) || cb !== 8'(ecb) || cr !== 8'(ecr) || {ode, ohs, ovs} !== hist[1][2:0]) begin
          failures++;
          if (failures < 10) $display("FAIL rgb %h: got %h %h %h exp %h %h %h", hist[1][26:3], y, cb, cr, 8'(ey), 8'(ecb), 8'(ecr));
        end
      end
      hist[1] = hist[0];
      case (n)
        0: {r, g, b} = 24'h000000;
        1: {r, g, b} = 24'hFFFFFF;
        2: {r, g, b} = 24'hFF0000;
        3: {r, g, b} = 24'h00FF00;
        4: {r, g, b} = 24'h0000FF;
        default: {r, g, b} = 24'($urandom);
      endcase
      {de, hs, vs} = 3'($urandom);
      hist[0] = {r, g, b, de, hs, vs};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
