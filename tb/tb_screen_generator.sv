// Testbench for screen_generator (ZedBoard, 5 x 5 x 8 neurons, 1920x1080), with dp_ram spike
// and potential memories and counters driven like the position counters, for three frames.
// Checks:
//  - o_frame_end pulses once per frame, on the last visible pixel (1919, 1079);
//  - o_color, o_h, o_v are registered: o_h/o_v equal the previous clock's counters;
//  - an update arriving in the middle of frame 1 (newest time 2000, i.e. a full memory) is not
//    used before frame 2: raster read addresses count from 0 in frame 1 and from 977 in frame 2;
//  - a spike of neuron 0 stored at time 5 gives a blue plus sign at column 448 + 5, line 239 in
//    frame 1 (newest time 10, not full); white background at (1900, 1050), black raster frame
//    at (447, 100), blue potential point of plot 0 at column 448 + 5; in frame 2 (full memory,
//    oldest time 977) the same spike sits at column 448 + 52;
//  - execution time text: with only seconds non-zero (5 s) the second and third unit slots are
//    empty; with hours 3 in frame 2 the hour, minute and second slots all hold blue digits.
module tb_screen_generator;
  import neurons_pkg::*;
  import plot_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic [11:0] h = 0, v = 0, oh, ov;
  logic ext = 0, upd = 0, have = 0;
  logic [31:0] last = 0;
  logic [1:0][3:0] sec = {4'hF, 4'd0}, mn = {4'hF, 4'd0}, hr = {4'hF, 4'd0}, dy = {4'hF, 4'd0};
  mon_neuron_t mon [NB_MON];
  logic spk_en, pot_en, fend;
  logic [9:0] spk_addr, pot_addr;
  logic [967:0] spk_dout, sa;
  logic [31:0] pot_dout, pa;
  logic [23:0] color;
  logic wen = 0;
  logic [9:0] waddr = 0;
  logic [967:0] wspk = '0;
  logic [31:0] wpot = '0;

  dp_ram #(.WIDTH(968)) smem (.clka(clk), .ena(wen), .wea(wen), .addra(waddr), .dina(wspk), .douta(sa),
    .clkb(clk), .enb(spk_en), .addrb(spk_addr), .doutb(spk_dout));
  dp_ram #(.WIDTH(32)) pmem (.clka(clk), .ena(wen), .wea(wen), .addra(waddr), .dina(wpot), .douta(pa),
    .clkb(clk), .enb(pot_en), .addrb(pot_addr), .doutb(pot_dout));

  screen_generator dut (.i_clk(clk), .i_rst(rst), .i_h(h), .i_v(v), .i_extended(ext), .i_mon(mon),
    .i_upd(upd), .i_last_time(last), .i_have_data(have), .i_sec(sec), .i_min(mn), .i_hour(hr),
    .i_day(dy), .o_spk_en(spk_en), .o_spk_addr(spk_addr), .i_spk_dout(spk_dout),
    .o_pot_en(pot_en), .o_pot_addr(pot_addr), .i_pot_dout(pot_dout),
    .o_frame_end(fend), .o_color(color), .o_h(oh), .o_v(ov));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  localparam int TIME_X = INFO_X + 128;
  int frame = 0, fends = 0, slot_blue [3][3];

  // observe outputs: registered pixel (ph, pv) of the previous clock
  always @(posedge clk) if (!rst) begin
    #1;
    check(oh === h && ov === v, "o_h/o_v hold the counters of the last clock edge");
    if (frame < 3) begin
      if (frame < 2 && oh === 12'd453 && ov === 12'd239) check(color === C_BLUE, $sformatf("spike centre f%0d %h", frame, color));
      if (frame === 2 && oh === 12'd500 && ov === 12'd239) check(color === C_BLUE, "spike centre, full memory");
      if (frame === 1 && oh === 12'd453 && ov === 12'd238) check(color === C_BLUE, "spike upper arm");
      if (frame === 1 && oh === 12'd452 && ov === 12'd239) check(color === C_BLUE, "spike left arm");
      if (frame === 1 && oh === 12'd455 && ov === 12'd239) check(color === C_WHITE, "no spike two columns right");
      if (oh === 12'd1900 && ov === 12'd1050) check(color === C_WHITE, "background");
      if (oh === 12'd447 && ov === 12'd100) check(color === C_BLACK, "raster frame");
      if (frame === 1 && oh === 12'd453 && ov === 12'(POT_TOP + 179 - 120)) check(color === C_BLUE, "potential point");
      for (int p = 0; p < NB_MON; p++)
        if (frame == 1 && oh == 12'd450 && ov == 12'(POT_TOP + p * POT_PITCH + 179 - 40))
          check(color === ((p === 0) ? C_BLUE : (p === 1) ? C_RED : (p === 2) ? C_GREEN : C_ORANGE),
                $sformatf("curve %0d colour %h", p, color));
      if (ov >= 108 && ov < 124)
        for (int s = 0; s < 3; s++)
          if (oh >= TIME_X + 32 * s && oh < TIME_X + 32 * s + 16 && color == C_BLUE) slot_blue[frame][s]++;
    end
  end

  always @(posedge clk) if (!rst && fend) begin
    fends++;
    check(h === 12'd1919 && v === 12'd1079, $sformatf("frame end at %0d,%0d", h, v));
  end

  int first_addr [3];
  always @(posedge clk) if (!rst && v == 12'd45 && h == 12'(PLOT_X0 - 2)) first_addr[frame] = spk_addr;

  initial begin
    #200000000 $display("FAIL watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int k = 0; k < NB_MON; k++) begin mon[k].virt = 3'(k); mon[k].row = 4'(k); mon[k].col = 4'(k); end
    repeat (3) @(negedge clk);
    rst = 0;
    for (int a = 0; a < 1024; a++) begin
      wen = 1; waddr = 10'(a); wspk = '0; wpot = {4{8'd40}};
      if (a == 5) begin wspk[0] = 1'b1; wpot = {8'd40, 8'd40, 8'd40, 8'd120}; end
      @(negedge clk);
    end
    wen = 0;
    // state for frame 1
    last = 10; have = 1; sec = {4'hF, 4'd5}; upd = 1; @(negedge clk); upd = 0;
    for (frame = 0; frame < 3; frame++) begin
      for (int y = 0; y < 1125; y++)
        for (int x = 0; x < 2200; x++) begin
          h = 12'(x); v = 12'(y);
          if (frame == 1 && y == 500 && x == 0) begin
            last = 2000; hr = {4'hF, 4'd3}; upd = 1;
          end else upd = 0;
          @(negedge clk);
        end
    end
    check(fends === 3, $sformatf("frame ends %0d", fends));
    check(first_addr[1] === 1 && first_addr[2] === 978,
          $sformatf("read addresses %0d %0d", first_addr[1], first_addr[2]));
    check(slot_blue[1][0] > 10 && slot_blue[1][1] === 0 && slot_blue[1][2] === 0, "only seconds shown");
    check(slot_blue[2][0] > 10 && slot_blue[2][1] > 10 && slot_blue[2][2] > 10, "hours, minutes, seconds shown");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
