// Testbench for hdmi_output: one ZedBoard and one ZC706 instance on the same random stream.
// ZC706: R on D[35:28], G on D[23:16], B on D[11:4], other pins 0. ZedBoard: Y on D[23:16],
// Cb on D[15:8] for the 1st, 3rd, ... pixel of each active line and Cr for the 2nd, 4th, ...,
// other pins 0 (chroma pins are don't-care while DE is low). Control signals and clock pass through unchanged (combinational).
// Lines of random length (odd and even) separated by blanking; the first line is skipped,
// as the Cb/Cr phase is defined from the first blanking on.
module tb_hdmi_output;
  import plot_pkg::*;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  logic [7:0] r = 0, g = 0, b = 0, y = 0, cb = 0, cr = 0;
  logic de = 0, hs = 0, vs = 0;
  logic [35:0] d0, d1;
  logic c0, c1, de0, de1, hs0, hs1, vs0, vs1;
  hdmi_output #(.BOARD(BOARD_ZEDBOARD)) dut0 (.i_clk(clk), .i_r(r), .i_g(g), .i_b(b), .i_y(y),
    .i_cb(cb), .i_cr(cr), .i_de(de), .i_hsync(hs), .i_vsync(vs), .o_hdmi_clk(c0), .o_hdmi_d(d0),
    .o_hdmi_de(de0), .o_hdmi_hsync(hs0), .o_hdmi_vsync(vs0));
  hdmi_output #(.BOARD(BOARD_ZC706)) dut1 (.i_clk(clk), .i_r(r), .i_g(g), .i_b(b), .i_y(y),
    .i_cb(cb), .i_cr(cr), .i_de(de), .i_hsync(hs), .i_vsync(vs), .o_hdmi_clk(c1), .o_hdmi_d(d1),
    .o_hdmi_de(de1), .o_hdmi_hsync(hs1), .o_hdmi_vsync(vs1));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    #10000000 $display("FAIL watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int len;
    for (int line = 0; line < 40; line++) begin
      len = $urandom_range(1, 40);
      for (int p = 0; p < len + 5; p++) begin
        @(negedge clk);
        de = (p < len);
        {r, g, b, y, cb, cr} = {$urandom, $urandom};
        hs = 1'($urandom); vs = 1'($urandom);
        #1;
        check(d1 === {r, 4'h0, g, 4'h0, b, 4'h0}, "ZC706 pins");
        check(de1 === de && hs1 === hs && vs1 === vs && de0 === de && hs0 === hs && vs0 === vs, "controls");
        check(c0 === clk && c1 === clk, "clock");
        if (line > 0) begin
          logic [7:0] chroma;
          chroma = (p % 2 == 1) ? cr : cb;
          if (de) check(d0 === {12'h0, y, chroma, 8'h0}, $sformatf("ZedBoard pins line %0d pixel %0d", line, p));
          else    check(d0[35:24] === 0 && d0[23:16] === y && d0[7:0] === 0, "ZedBoard pins in blanking");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
