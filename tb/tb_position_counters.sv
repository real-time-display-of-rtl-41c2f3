// Testbench for position_counters: 1920x1080 and 1280x720 instances side by side.
// Checks every clock against a reference scan (h counts to total-1 then wraps and advances v,
// v wraps after the last line), both counters 0 right after reset, and the frame length in
// clocks (2200 x 1125 and 1650 x 750) measured between two returns to (0,0).
module tb_position_counters;
  import hdmi_resolution_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  logic [11:0] h0, v0, h1, v1;
  position_counters #(.RES(RES_1920X1080)) dut0 (.i_clk(clk), .i_rst(rst), .o_hcounter(h0), .o_vcounter(v0));
  position_counters #(.RES(RES_1280X720))  dut1 (.i_clk(clk), .i_rst(rst), .o_hcounter(h1), .o_vcounter(v1));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    #100000000 $display("FAIL watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int eh0, ev0, eh1, ev1, n, f0, f1, last0, last1;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(negedge clk);
    check(h0 === 0 && v0 === 0 && h1 === 0 && v1 === 0, "zero after reset");
    eh0 = 0; ev0 = 0; eh1 = 0; ev1 = 0; f0 = 0; f1 = 0; last0 = 0; last1 = 0;
    for (n = 1; n <= 2 * 2200 * 1125 + 10; n++) begin
      @(negedge clk);
      eh0++; if (eh0 == 2200) begin eh0 = 0; ev0++; if (ev0 == 1125) ev0 = 0; end
      eh1++; if (eh1 == 1650) begin eh1 = 0; ev1++; if (ev1 == 750) ev1 = 0; end
      if (h0 !== eh0 || v0 !== ev0) check(0, $sformatf("1080p at %0d: %0d,%0d exp %0d,%0d", n, h0, v0, eh0, ev0));
      if (h1 !== eh1 || v1 !== ev1) check(0, $sformatf("720p at %0d: %0d,%0d exp %0d,%0d", n, h1, v1, eh1, ev1));
      if (h0 === 0 && v0 === 0) begin if (f0 > 0) check(n - last0 === 2200 * 1125, "1080p frame length"); f0++; last0 = n; end
      if (h1 === 0 && v1 === 0) begin if (f1 > 0) check(n - last1 === 1650 * 750, "720p frame length"); f1++; last1 = n; end
      if (n % 100000 === 0) check(1, "scan");
    end
    check(f0 === 2 && f1 === 4, $sformatf("frames %0d %0d", f0, f1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
