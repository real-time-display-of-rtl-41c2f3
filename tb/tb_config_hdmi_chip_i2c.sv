// Testbench for config_hdmi_chip_i2c: runs the configuration for both boards side by side and
// decodes every I2C frame with a bus monitor.
//
// Expected frames come from the register tables of the ADV7511 set-up (fixed registers, power,
// input mode, DVI output, colour-space conversion); ZC706 must first send the bus-switch frame
// (address 0x74, mask 0x02 twice). Checks: frame count, addresses, register/value pairs in
// order, ACK slots released, o_done raised only after the last frame and held.
// Short bit period (CLK_DIV_LOG2 = 3) to keep the run short.
module tb_config_hdmi_chip_i2c;
  import plot_pkg::*;
  localparam int DIV = 3;
  logic clk = 1'b0, rst = 1'b1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  // register, ZedBoard value, ZC706 value
  localparam logic [23:0] TABLE [38] = '{
    24'h98_03_03, 24'h9A_E0_E0, 24'h9C_30_30, 24'h9D_61_61, 24'hA2_A4_A4, 24'hA3_A4_A4,
    24'hE0_D0_D0, 24'hF9_00_00, 24'h41_10_10, 24'h15_01_00, 24'h16_3C_30, 24'h17_00_00,
    24'h48_08_00, 24'hAF_04_04,
    24'h18_E7_A8, 24'h19_34_00, 24'h1A_04_00, 24'h1B_AD_00, 24'h1C_00_00, 24'h1D_00_00,
    24'h1E_1C_00, 24'h1F_1B_00, 24'h20_1D_00, 24'h21_DC_00, 24'h22_04_08, 24'h23_1D_00,
    24'h24_1F_00, 24'h25_24_00, 24'h26_01_00, 24'h27_35_00, 24'h28_00_00, 24'h29_00_00,
    24'h2A_04_00, 24'h2B_AD_00, 24'h2C_08_08, 24'h2D_7C_00, 24'h2E_1B_00, 24'h2F_77_00
  };

  logic [1:0] scl, sda, rel, done, frame, rw, ack_ok, sseen;
  logic [6:0] addr [2];
  logic [15:0] data [2];
  logic [5:0] nb [2];
  int nframes [2];

  config_hdmi_chip_i2c #(.BOARD(BOARD_ZEDBOARD), .CLK_DIV_LOG2(DIV)) dut_zb (
    .i_clk(clk), .i_rst(rst), .o_scl(scl[0]), .o_sda(sda[0]), .o_sda_release(rel[0]), .o_done(done[0]));
  config_hdmi_chip_i2c #(.BOARD(BOARD_ZC706), .CLK_DIV_LOG2(DIV)) dut_zc (
    .i_clk(clk), .i_rst(rst), .o_scl(scl[1]), .o_sda(sda[1]), .o_sda_release(rel[1]), .o_done(done[1]));

  for (genvar b = 0; b < 2; b++) begin : g_mon
    i2c_monitor mon (.i_clk(clk), .i_rst(rst), .i_scl(scl[b]), .i_sda(sda[b]),
      .i_sda_release(rel[b]), .o_frame(frame[b]), .o_addr(addr[b]), .o_rw(rw[b]),
      .o_data(data[b]), .o_nbits(nb[b]), .o_ack_ok(ack_ok[b]), .o_start_seen(sseen[b]));
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) begin
    for (int b = 0; b < 2; b++) begin
      if (!rst && frame[b]) begin
        int k;
        logic [15:0] exp_d;
        logic [6:0] exp_a;
        k = nframes[b] - b;    // ZC706: frame 0 is the bus switch
        if (b == 1 && nframes[b] == 0) begin
          exp_a = 7'h74; exp_d = 16'h0202;
        end else begin
          exp_a = 7'h39;
          exp_d = (k < 38) ? {TABLE[k][23:16], (b == 0) ? TABLE[k][15:8] : TABLE[k][7:0]} : 16'hxxxx;
        end
        check(k < 38, $sformatf("board %0d too many frames", b));
        check(addr[b] === exp_a && !rw[b], $sformatf("board %0d frame %0d addr %h", b, nframes[b], addr[b]));
        check(data[b] === exp_d, $sformatf("board %0d frame %0d data %h exp %h", b, nframes[b], data[b], exp_d));
        check(ack_ok[b] && nb[b] === 6'd28, $sformatf("board %0d frame %0d acks/bits", b, nframes[b]));
        check(done[b] === (k === 37), $sformatf("board %0d done must rise with the last frame only", b));
        nframes[b]++;
      end
    end
  end

  initial begin
    #100000000 $display("FAIL watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    nframes[0] = 0; nframes[1] = 0;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    check(done === 2'b00, "done low after reset");
    // 39 frames x 30 bit periods x 8 clocks plus slack
    fork
      wait (done[0]);
      wait (done[1]);
    join
    repeat (200) @(posedge clk);
    check(nframes[0] === 38, $sformatf("ZedBoard frames %0d", nframes[0]));
    check(nframes[1] === 39, $sformatf("ZC706 frames %0d", nframes[1]));
    check(done === 2'b11, "done held");
    check(scl === 2'b11 && sda === 2'b11 && rel === 2'b00, "bus idle after configuration");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
