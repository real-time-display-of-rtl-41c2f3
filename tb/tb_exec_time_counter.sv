// Testbench for exec_time_counter with MS_PER_S = 2 (two phase ticks per second) so that the
// whole range is reached: seconds, minutes, hours wrap and days wrap from 63 to 0.
// A reference counter in seconds gives the expected digits; leading tens digit must be 4'hF
// (blank) for values below 10. Ticks arrive on random clocks. Checks after every second.
module tb_exec_time_counter;
  logic clk = 1'b0, rst = 1'b1, tick = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  logic [1:0][3:0] s, m, h, d;
  exec_time_counter #(.MS_PER_S(2)) dut (.i_clk(clk), .i_rst(rst), .i_tick(tick),
    .o_sec(s), .o_min(m), .o_hour(h), .o_day(d));

  function automatic logic [1:0][3:0] dig(int v);
    return {(v >= 10) ? 4'(v / 10) : 4'hF, 4'(v % 10)};
  endfunction

  initial begin
    #1000000000 $display("FAIL watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    longint secs;
    int es, em, eh, ed, errs;
    repeat (3) @(negedge clk);
    rst = 0;
    errs = 0;
    secs = 0;
    checks++;
    if ({s, m, h, d} !== {dig(0), dig(0), dig(0), dig(0)}) failures++;
    // 64 days + 1 hour of seconds
    for (longint n = 0; n < 64 * 86400 + 3700; n++) begin
      for (int t = 0; t < 2; t++) begin
        if (n < 2000) repeat ($urandom_range(0, 2)) @(negedge clk);
        tick = 1; @(negedge clk); tick = 0;
      end
      secs++;
      es = secs % 60; em = (secs / 60) % 60; eh = (secs / 3600) % 24; ed = (secs / 86400) % 64;
      if (n < 5000 || n % 997 == 0 || es == 0) begin
        checks++;
        if ({s, m, h, d} !== {dig(es), dig(em), dig(eh), dig(ed)}) begin
          failures++;
          if (failures < 10) $display("FAIL at %0d s: %h %h %h %h", secs, d, h, m, s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
