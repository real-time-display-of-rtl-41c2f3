// Testbench for i2c_sender: sends random frames and decodes them with a bus monitor.
//
// Checks per frame: address, R/W = 0, both data bytes, 28 sampled bits (27 frame bits plus the
// STOP bit's low level), SDA released exactly in the three ACK slots, o_ready low for exactly
// 30 bit periods (set + 29 shifting periods), SCL and SDA idle high when ready.
// Uses a short bit period (CLK_DIV_LOG2 = 4) so the run is quick; the structure is the same.
module tb_i2c_sender;
  localparam int DIV = 4;
  localparam int PERIOD = 1 << DIV;
  logic clk = 1'b0, rst = 1'b1;
  logic start = 1'b0;
  logic [6:0] addr = '0;
  logic [15:0] data = '0;
  logic ready, scl, sda, rel;
  logic frame, rw, ack_ok, start_seen;
  logic [6:0] m_addr;
  logic [15:0] m_data;
  logic [5:0] m_n;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  i2c_sender #(.CLK_DIV_LOG2(DIV)) dut (
    .i_clk(clk), .i_rst(rst), .i_start(start), .i_addr(addr), .i_data(data),
    .o_ready(ready), .o_scl(scl), .o_sda(sda), .o_sda_release(rel));

  i2c_monitor mon (.i_clk(clk), .i_rst(rst), .i_scl(scl), .i_sda(sda), .i_sda_release(rel),
    .o_frame(frame), .o_addr(m_addr), .o_rw(rw), .o_data(m_data), .o_nbits(m_n),
    .o_ack_ok(ack_ok), .o_start_seen(start_seen));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #200000000 $display("FAIL watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int busy;
    logic [6:0] a;
    logic [15:0] d;
    repeat (5) @(posedge clk);
    rst <= 1'b0;
    repeat (3 * PERIOD) @(posedge clk);
    check(ready && scl && sda && !rel, "idle lines");
    for (int f = 0; f < 20; f++) begin
      a = 7'($urandom); d = 16'($urandom);
      if (f == 0) begin a = 7'b0111001; d = 16'h4110; end
      @(posedge clk);
      addr <= a; data <= d; start <= 1'b1;
      // wait for the sender to accept
      busy = 0;
      while (ready) @(posedge clk);
      start <= 1'b0;
      while (!ready) begin @(posedge clk); busy++; end
      check(busy === 30 * PERIOD, $sformatf("busy time %0d", busy));
      // monitor reports STOP shortly after
      repeat (PERIOD) begin
        @(posedge clk);
        if (frame) begin
          check(m_addr === a && rw === 1'b0, $sformatf("addr %h exp %h", m_addr, a));
          check(m_data === d, $sformatf("data %h exp %h", m_data, d));
          check(m_n === 6'd28, $sformatf("bits %0d", m_n));
          check(ack_ok, "ack slots released, others driven");
        end
      end
      check(scl && sda && !rel, "idle lines after frame");
      repeat ($urandom_range(0, 3 * PERIOD)) @(posedge clk);
    end
    check(start_seen, "start condition seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
