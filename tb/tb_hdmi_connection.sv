// Testbench for hdmi_connection at 1280x720 with a short I2C bit period (8 clocks), ZedBoard
// and ZC706 instances side by side. A test picture generator answers each position with the
// colour {x[7:0], y[7:0], x^y} one clock later (registered, handing back the counters it used),
// as the real picture generator does. The pins are decoded by counting DE pixels (lines reset
// by VSYNC). Checks over two frames: every pixel's colour (ZC706: RGB pins; ZedBoard: Y and
// alternating Cb/Cr against the conversion equations), 1280 pixels per line, 720 lines,
// HSYNC width 40 and VSYNC width 5 lines (in clocks/lines), and both transmitters configured
// (38 frames, plus the bus-switch frame for ZC706).
module tb_hdmi_connection;
  import hdmi_resolution_pkg::*;
  import plot_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  function automatic logic [23:0] pattern(logic [11:0] x, logic [11:0] y);
    return {x[7:0], y[7:0], x[7:0] ^ y[7:0]};
  endfunction

  function automatic bit pins_ok(int board, logic [35:0] w, int x, logic [23:0] c);
    int r, g, b, ey, ecb, ecr;
    if (board == 1) return {w[35:28], w[23:16], w[11:4]} == c;
    r = c[23:16]; g = c[15:8]; b = c[7:0];
    ey  = 16 + ((47 * r + 157 * g + 16 * b) >>> 8);
    ecb = 128 + ((-26 * r - 87 * g + 112 * b) >>> 8);
    ecr = 128 + ((112 * r - 102 * g - 10 * b) >>> 8);
    return w[23:16] == 8'(ey) && w[15:8] == 8'((x % 2) ? ecr : ecb);
  endfunction

  int frames_done [2];

  for (genvar B = 0; B < 2; B++) begin : g_board
    localparam board_e BRD = (B == 1) ? BOARD_ZC706 : BOARD_ZEDBOARD;
    logic [11:0] h, v, hq, vq;
    logic [23:0] color;
    logic [35:0] d;
    logic hclk, de, hs, vs, scl, sda, rel, done;
    hdmi_connection #(.BOARD(BRD), .RES(RES_1280X720), .CLK_DIV_LOG2(3)) dut (
      .i_clk(clk), .i_rst(rst), .i_color(color), .i_hcounter(hq), .i_vcounter(vq),
      .o_hcounter(h), .o_vcounter(v), .o_hdmi_clk(hclk), .o_hdmi_d(d), .o_hdmi_de(de),
      .o_hdmi_hsync(hs), .o_hdmi_vsync(vs), .o_hdmi_scl(scl), .o_hdmi_sda(sda),
      .o_hdmi_sda_release(rel), .o_config_done(done));
    always_ff @(posedge clk) begin
      color <= pattern(h, v);
      hq <= h;
      vq <= v;
    end

    logic fr, rw, ack, st;
    logic [6:0] a;
    logic [15:0] dd;
    logic [5:0] nb;
    int nfr = 0;
    i2c_monitor mon (.i_clk(clk), .i_rst(rst), .i_scl(scl), .i_sda(sda), .i_sda_release(rel),
      .o_frame(fr), .o_addr(a), .o_rw(rw), .o_data(dd), .o_nbits(nb), .o_ack_ok(ack), .o_start_seen(st));
    always @(posedge clk) if (fr && !rst) nfr++;

    int px = 0, py = 0, hs_len = 0, vs_lines = 0, frames = 0, bad = 0;
    logic de_q = 0, vs_q = 0, hs_q = 0;
    always @(posedge clk) if (!rst) begin
      de_q <= de; vs_q <= vs; hs_q <= hs;
      if (hs) hs_len++;
      if (!hs && hs_q) begin
        if (frames > 0) check(hs_len === 40, $sformatf("board %0d hsync %0d", B, hs_len));
        hs_len = 0;
        if (vs) vs_lines++;
      end
      if (vs && !vs_q) begin
        if (frames > 0) check(py === 720, $sformatf("board %0d lines %0d", B, py));
        frames++; py = 0; px = 0;
      end
      if (!vs && vs_q) begin
        if (frames > 1) check(vs_lines === 5, $sformatf("board %0d vsync lines %0d", B, vs_lines));
        vs_lines = 0;
      end
      if (de) begin
        if (frames > 0 && !pins_ok(B, d, px, pattern(12'(px), 12'(py)))) bad++;
        px++;
      end else if (de_q) begin
        if (frames > 0) begin
          check(px === 1280, $sformatf("board %0d line length %0d", B, px));
          check(bad === 0, $sformatf("board %0d line %0d: %0d wrong pixels", B, py, bad));
        end
        bad = 0; px = 0; py++;
      end
      frames_done[B] = frames;
    end
  end

  initial begin
    #100000000 $display("FAIL watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (5) @(posedge clk);
    rst = 0;
    wait (frames_done[0] >= 3 && frames_done[1] >= 3);
    check(g_board[0].done && g_board[1].done, "configuration done");
    check(g_board[0].nfr === 38 && g_board[1].nfr === 39, $sformatf("I2C frame counts %0d %0d", g_board[0].nfr, g_board[1].nfr));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
