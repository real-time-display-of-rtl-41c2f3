// Testbench for cdc_sync: source clock 7 ns, destination clock 10 ns (and the reverse in a second
// instance). Random pulses at least 12 destination clocks apart, each with random 65-bit data.
// Checks: one output pulse per input pulse, data equal to the data sent with it, latency between
// 2 and 5 destination clocks, no output pulse without an input pulse.
module tb_cdc_sync;
  logic sclk = 1'b0, dclk = 1'b0, rst = 1'b1;
  int checks = 0, failures = 0;
  always #3.5 sclk = ~sclk;
  always #5 dclk = ~dclk;
  logic pulse = 0, opulse, pulse2 = 0, opulse2;
  logic [64:0] data = '0, odata, data2 = '0, odata2;
  cdc_sync #(.WIDTH(65)) dut (.i_src_clk(sclk), .i_src_rst(rst), .i_pulse(pulse), .i_data(data),
    .i_dst_clk(dclk), .i_dst_rst(rst), .o_pulse(opulse), .o_data(odata));
  cdc_sync #(.WIDTH(65)) dut2 (.i_src_clk(dclk), .i_src_rst(rst), .i_pulse(pulse2), .i_data(data2),
    .i_dst_clk(sclk), .i_dst_rst(rst), .o_pulse(opulse2), .o_data(odata2));

  int sent = 0, got = 0, sent2 = 0, got2 = 0;
  logic [64:0] last_sent, last_sent2;
  realtime t_sent, t_sent2;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  always @(posedge dclk) if (!rst && opulse) begin
    got++;
    check(got === sent, "pulse count slow side");
    check(odata === last_sent, "data slow side");
    check($realtime - t_sent >= 20 && $realtime - t_sent <= 55, $sformatf("latency %0t", $realtime - t_sent));
  end
  always @(posedge sclk) if (!rst && opulse2) begin
    got2++;
    check(got2 === sent2, "pulse count fast side");
    check(odata2 === last_sent2, "data fast side");
    check($realtime - t_sent2 >= 14 && $realtime - t_sent2 <= 40, $sformatf("latency2 %0t", $realtime - t_sent2));
  end

  initial begin
    #10000000 $display("FAIL watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (4) @(posedge dclk);
    rst = 0;
    fork
      for (int n = 0; n < 300; n++) begin
        repeat ($urandom_range(20, 40)) @(negedge sclk);
        data = {$urandom, $urandom, 1'($urandom)};
        pulse = 1; last_sent = data; sent++;
        @(posedge sclk); t_sent = $realtime; @(negedge sclk); pulse = 0;
      end
      for (int n = 0; n < 300; n++) begin
        repeat ($urandom_range(12, 30)) @(negedge dclk);
        data2 = {$urandom, $urandom, 1'($urandom)};
        pulse2 = 1; last_sent2 = data2; sent2++;
        @(posedge dclk); t_sent2 = $realtime; @(negedge dclk); pulse2 = 0;
      end
    join
    repeat (20) @(posedge dclk);
    check(got === 300 && got2 === 300, $sformatf("pulses %0d %0d", got, got2));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
