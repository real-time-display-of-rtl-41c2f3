// Testbench for button_switch with DIV_LOG2 = 4 (button sampled every 16 clocks).
// Presses with contact bounce shorter than the sampling period must toggle the switch exactly
// once; holding the button must not toggle again; release bounce must not toggle. Checks the
// switch after reset (off) and after each press, and that it changes only on a sampling clock
// at most 2 sampling periods after the bounce settles.
module tb_button_switch;
  logic clk = 1'b0, rst = 1'b1, btn = 0, sw;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  button_switch #(.DIV_LOG2(4)) dut (.i_clk(clk), .i_rst(rst), .i_button(btn), .o_switch(sw));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  int toggles = 0;
  logic sw_q = 0;
  always @(posedge clk) begin sw_q <= sw; if (!rst && sw != sw_q) toggles++; end

  initial begin
    #10000000 $display("FAIL watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic exp_sw;
    repeat (3) @(negedge clk);
    rst = 0;
    exp_sw = 0;
    repeat (40) @(negedge clk);
    check(sw === 0, "off after reset");
    for (int p = 0; p < 30; p++) begin
      // press: bounce for up to 12 clocks (shorter than a sampling period), then hold
      for (int b = 0; b < 6; b++) begin btn = ~btn; repeat ($urandom_range(1, 2)) @(negedge clk); end
      btn = 1;
      repeat (48) @(negedge clk);
      exp_sw = ~exp_sw;
      check(sw === exp_sw, $sformatf("after press %0d", p));
      repeat ($urandom_range(50, 200)) @(negedge clk);
      check(sw === exp_sw, "holding keeps state");
      for (int b = 0; b < 6; b++) begin btn = ~btn; repeat ($urandom_range(1, 2)) @(negedge clk); end
      btn = 0;
      repeat ($urandom_range(48, 100)) @(negedge clk);
      check(sw === exp_sw, "release keeps state");
    end
    check(toggles === 30, $sformatf("toggles %0d", toggles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
