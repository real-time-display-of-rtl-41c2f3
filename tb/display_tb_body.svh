// Test body shared by the two system testbenches of snn_display_top (included inside the
// testbench module after it has defined: BOARD, CLK_DIV (I2C bit-period log2), BTN_DIV (button
// sampling log2), MS_PS (time steps per second), NFRAMES, PRESS_F / PRESS_CLKS (frame at which
// the button is pressed and for how many pixel clocks), BANDS_F (frame from which colour bands
// are selected), NAME).
//
// Clocks: pixel 150 MHz, emulator 100 MHz. Emulator model: one time step per 1 ms (100000
// clocks): distribution phase of 2000 clocks (i_ph_dist high) during which it pushes the step's
// spikes (2 to 4 neurons per step, pattern from the step number) and the four monitored
// potentials (-90..-20 mV, so both saturation limits are reached) into FIFO models.
// The HDMI pins are captured into a frame image (pixel count from DE, line count reset by
// VSYNC). Each finished frame is checked against a reference built from the pushed data and the
// displayed newest time (read from the picture generator at frame start):
//   normal mode: every raster pixel of complete columns (plus-sign dots, white elsewhere), the
//     potential point of every complete column in its plot colour (black on threshold dots);
//   extended mode: dot centres of the 4-line-per-neuron raster, no potential colours anywhere;
//   colour-band mode: band colours.
// ZC706 pins are compared as RGB, ZedBoard pins as Y plus alternating Cb/Cr computed from the
// expected RGB with the conversion equations.
// Counters: I2C frames decoded (all registers, plus the bus switch on ZC706), configuration
// done, frames per mode, dots and potential points matched, saturated points, spikes read,
// transfers, execution-time text changes; the test fails if any mechanism never happened.
import plot_pkg::*;
import neurons_pkg::*;

logic pclk = 1'b0, hclk = 1'b0, rst = 1'b1, button = 1'b0, bands = 1'b0, ph = 1'b0;
always #3.333 pclk = ~pclk;
always #5 hclk = ~hclk;
int checks = 0, failures = 0;

task automatic check(input bit cond, input string what);
  checks++;
  if (!cond) begin failures++; if (failures < 30) $display("FAIL %s", what); end
endtask

// ------------------------------------------------------------------ emulator side
logic spk_push = 0, pot_push = 0;
logic [17:0] spk_data = '0, spk_dout;
logic [15:0] pot_data = '0, pot_dout;
logic spk_valid, spk_empty, spk_ready, pot_valid, pot_empty, pot_ready;
int spk_count, spk_pops, pot_count, pot_pops;
mon_neuron_t mon [NB_MON];

fifo_model #(.WIDTH(18)) spk_fifo (.i_clk(hclk), .i_rst(rst), .i_push(spk_push), .i_data(spk_data),
  .i_ready(spk_ready), .o_dout(spk_dout), .o_valid(spk_valid), .o_empty(spk_empty),
  .o_count(spk_count), .o_pops(spk_pops));
fifo_model #(.WIDTH(16)) pot_fifo (.i_clk(hclk), .i_rst(rst), .i_push(pot_push), .i_data(pot_data),
  .i_ready(pot_ready), .o_dout(pot_dout), .o_valid(pot_valid), .o_empty(pot_empty),
  .o_count(pot_count), .o_pops(pot_pops));

localparam int MAXT = 400;
logic [199:0] spikes [MAXT];
logic [7:0]   potv   [MAXT][4];
int pushed_spikes = 0, steps = 0;

function automatic int pot_value(int t, int k);
  return -9000 + ((t * 97 + k * 1700) % 7000);
endfunction

function automatic logic [7:0] ref_scale(int v);
  longint p;
  p = (longint'(v) + 8000) * 2347;
  if (p < 0) return 8'd0;
  p = p / 65536;
  return (p > 179) ? 8'd179 : 8'(p);
endfunction

initial begin
  for (int k = 0; k < NB_MON; k++) begin
    mon[k].virt = 3'(k); mon[k].row = 4'(k + 1); mon[k].col = 4'(4 - k);
  end
  for (int t = 0; t < MAXT; t++) spikes[t] = '0;
  @(negedge rst);
  repeat (2000) @(negedge hclk);
  for (int t = 0; t < MAXT; t++) begin
    int ns [4];
    int nn;
    nn = 2 + (t % 3);
    ns[0] = (t * 7) % 200; ns[1] = (t * 13 + 50) % 200; ns[2] = (t % 2) ? 199 : 0; ns[3] = (t * 31 + 3) % 200;
    for (int k = 0; k < 4; k++) potv[t][k] = ref_scale(pot_value(t, k));
    ph = 1'b1;
    steps = t + 1;
    for (int c = 0; c < 2000; c++) begin
      @(negedge hclk);
      spk_push = 1'b0; pot_push = 1'b0;
      if (c % 20 == 5 && c / 20 < nn) begin
        neuron_id_t id;
        int n;
        n = ns[c / 20];
        id.chip = '0; id.virt = 3'(n / 25); id.row = 4'((n / 5) % 5); id.col = 4'(n % 5);
        spk_data = 18'(id); spk_push = 1'b1; pushed_spikes++;
        spikes[t][n] = 1'b1;
      end
      if (c % 20 == 15 && c / 20 < 4) begin
        pot_data = 16'(pot_value(t, c / 20)); pot_push = 1'b1;
      end
    end
    @(negedge hclk); spk_push = 1'b0; pot_push = 1'b0; ph = 1'b0;
    repeat (97999) @(negedge hclk);
  end
end

// ------------------------------------------------------------------ design
logic        hdmi_clk, de, hs, vs, scl, sda, sda_rel, cfg_done;
logic [35:0] d;

snn_display_top #(.BOARD(BOARD), .CLK_DIV_LOG2(CLK_DIV), .BTN_DIV_LOG2(BTN_DIV), .MS_PER_S(MS_PS)) dut (
  .i_pix_clk(pclk), .i_heens_clk(hclk), .i_rst(rst), .i_button(button), .i_test_bands(bands),
  .i_ph_dist(ph), .i_spk_dout(spk_dout), .i_spk_empty(spk_empty), .i_spk_valid(spk_valid),
  .o_spk_ready(spk_ready), .i_pot_dout(pot_dout), .i_pot_empty(pot_empty), .i_pot_valid(pot_valid),
  .o_pot_ready(pot_ready), .i_mon(mon),
  .o_hdmi_clk(hdmi_clk), .o_hdmi_d(d), .o_hdmi_de(de), .o_hdmi_hsync(hs), .o_hdmi_vsync(vs),
  .o_hdmi_scl(scl), .o_hdmi_sda(sda), .o_hdmi_sda_release(sda_rel), .o_config_done(cfg_done));

// ------------------------------------------------------------------ I2C
logic i2c_frame, i2c_rw, i2c_ack, i2c_start;
logic [6:0] i2c_addr;
logic [15:0] i2c_data;
logic [5:0] i2c_n;
int i2c_frames = 0, i2c_adv = 0, i2c_sw = 0;
i2c_monitor i2c_mon (.i_clk(pclk), .i_rst(rst), .i_scl(scl), .i_sda(sda), .i_sda_release(sda_rel),
  .o_frame(i2c_frame), .o_addr(i2c_addr), .o_rw(i2c_rw), .o_data(i2c_data), .o_nbits(i2c_n),
  .o_ack_ok(i2c_ack), .o_start_seen(i2c_start));
always @(posedge pclk) if (i2c_frame) begin
  i2c_frames++;
  check(i2c_ack && !i2c_rw && i2c_n === 6'd28, "I2C frame format");
  if (i2c_addr == 7'h39) i2c_adv++;
  if (i2c_addr === 7'h74) begin i2c_sw++; check(i2c_data === 16'h0202, "bus switch mask"); end
  if (i2c_frames === 1) check(i2c_addr === ((BOARD === BOARD_ZC706) ? 7'h74 : 7'h39), "first I2C frame address");
  if (i2c_addr == 7'h39 && i2c_data[15:8] == 8'h15)
    check(i2c_data[7:0] === ((BOARD === BOARD_ZC706) ? 8'h00 : 8'h01), "input ID register");
end

// ------------------------------------------------------------------ pixel capture
logic [35:0] fb [1920 * 1080];
int px = 0, py = 0, frames = 0, line_len_err = 0;
logic de_q = 0, vs_q = 0;
logic [31:0] f_time;
logic        f_have, f_ext0, f_bands0;
logic [1:0][3:0] f_sec;
int n_normal = 0, n_ext = 0, n_bands = 0, dots_ok = 0, pot_ok = 0, sat_pts = 0, text_changes = 0;
int transfers = 0;
longint prev_sum = -1;
logic [1:0][3:0] prev_sec;

always @(posedge hclk) if (dut.u_spike_reader.o_xfer_done) transfers++;

function automatic logic [23:0] cap_rgb(int x, int y);
  logic [35:0] w;
  w = fb[y * 1920 + x];
  return {w[35:28], w[23:16], w[11:4]};
endfunction

function automatic bit is_col(int x, int y, logic [23:0] c);
  logic [35:0] w;
  int r, g, b, ey, ecb, ecr;
  w = fb[y * 1920 + x];
  if (BOARD == BOARD_ZC706) return {w[35:28], w[23:16], w[11:4]} == c;
  r = c[23:16]; g = c[15:8]; b = c[7:0];
  ey  = 16 + ((47 * r + 157 * g + 16 * b) >>> 8);
  ecb = 128 + ((-26 * r - 87 * g + 112 * b) >>> 8);
  ecr = 128 + ((112 * r - 102 * g - 10 * b) >>> 8);
  return w[23:16] == 8'(ey) && w[15:8] == 8'((x % 2) ? ecr : ecb);
endfunction

function automatic bit spk(int t, int n, int newest);
  if (t < 0 || t > newest || n < 0 || n > 199) return 0;
  return spikes[t][n];
endfunction

task automatic check_frame();
  bit ext1;
  int newest;
  longint sum;
  ext1 = dut.extended;
  newest = int'(f_time);
  if (f_bands0 && bands) begin
    n_bands++;
    for (int y = 0; y < 1080; y += 37)
      for (int x = 0; x < 1920; x += 7) begin
        logic [23:0] e;
        case (x / 256)
          0: e = 24'hFF0000; 1: e = 24'hFFFF00; 2: e = 24'h00FF00; 3: e = 24'h00FFFF;
          4: e = 24'h0000FF; 5: e = 24'hFF00FF; default: e = 24'hFFFFFF;
        endcase
        check(is_col(x, y, e), $sformatf("band pixel %0d,%0d", x, y));
      end
    return;
  end
  if (bands || f_bands0 || ext1 != f_ext0 || !f_have || newest < 3) return;
  if (!f_ext0) begin
    n_normal++;
    for (int t = 0; t <= newest - 2 && t < 1024; t++)
      for (int n = 0; n < 200; n++) begin
        bit e;
        e = spk(t, n, newest) || spk(t, n - 1, newest) || spk(t, n + 1, newest)
            || spk(t - 1, n, newest) || spk(t + 1, n, newest);
        if (e && spk(t, n, newest)) dots_ok++;
        check(is_col(PLOT_X0 + t, RASTER_TOP + 199 - n, e ? C_BLUE : C_WHITE),
              $sformatf("raster t=%0d n=%0d exp %0d", t, n, e));
      end
    for (int t = newest + 1; t < newest + 4 && t < 1024; t++)
      check(is_col(PLOT_X0 + t, RASTER_TOP + 100, C_WHITE), "raster right of newest column");
    for (int t = 0; t <= newest - 1; t++)
      for (int k = 0; k < 4; k++) begin
        int x, y;
        logic [23:0] c;
        x = PLOT_X0 + t;
        y = POT_TOP + k * POT_PITCH + 179 - int'(potv[t][k]);
        c = (k == 0) ? C_BLUE : (k == 1) ? C_RED : (k == 2) ? C_GREEN : C_ORANGE;
        if (potv[t][k] == 8'd89 && x % 8 < 4) c = C_BLACK;
        if (potv[t][k] == 0 || potv[t][k] == 179) sat_pts++;
        check(is_col(x, y, c), $sformatf("potential t=%0d plot %0d row %0d", t, k, potv[t][k]));
        pot_ok++;
      end
    // execution time text region
    sum = 0;
    for (int y = 108; y < 124; y++)
      for (int x = INFO_X + 128; x < INFO_X + 256; x++) sum = sum * 3 + longint'(is_col(x, y, C_BLUE));
    if (prev_sum >= 0 && f_sec != prev_sec) begin
      check(sum !== prev_sum, "execution time text follows the counter");
      text_changes++;
    end
    prev_sum = sum; prev_sec = f_sec;
  end else begin
    n_ext++;
    for (int t = 0; t <= newest - 2 && t < 1024; t++)
      for (int n = 0; n < 200; n++) begin
        bit e;
        e = spk(t, n, newest) || spk(t - 1, n, newest) || spk(t + 1, n, newest);
        check(is_col(PLOT_X0 + t, EXT_BOTTOM + 1 - 800 + (199 - n) * 4 + 2, e ? C_BLUE : C_WHITE),
              $sformatf("extended raster t=%0d n=%0d", t, n));
      end
    for (int y = 0; y < 1080; y += 3)
      for (int x = 0; x < 1920; x += 5)
        check(!is_col(x, y, C_RED) && !is_col(x, y, C_GREEN) && !is_col(x, y, C_ORANGE),
              "no potential colours in extended mode");
  end
endtask

int since_rst = 0;   // the link outputs are only watched once reset has flushed the pipeline
always @(posedge pclk) if (dut.pix_rst) since_rst = 0; else if (since_rst < 16) since_rst++;
always @(posedge pclk) if (since_rst >= 16) begin
  de_q <= de; vs_q <= vs;
  if (vs && !vs_q) begin
    if (py == 1080 && frames > 0) check_frame();
    frames++;
    py = 0; px = 0;
  end
  if (de) begin
    if (px == 0 && py == 0) begin
      f_time = dut.u_screen.disp_time; f_have = dut.u_screen.disp_have;
      f_ext0 = dut.extended; f_bands0 = bands; f_sec = dut.u_screen.d_sec;
    end
    if (py < 1080 && px < 1920) fb[py * 1920 + px] = d;
    px++;
  end else if (de_q) begin
    if (px != 1920 && frames > 0) line_len_err++;
    px = 0; py++;
  end
end

// ------------------------------------------------------------------ stimulus and summary
initial begin
  #600000000 $display("FAIL watchdog"); failures++;
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
end

initial begin
  repeat (10) @(negedge pclk);
  rst = 1'b0;
  wait (frames == PRESS_F);
  button = 1'b1;
  repeat (PRESS_CLKS) @(negedge pclk);
  button = 1'b0;
  wait (frames == BANDS_F);
  bands = 1'b1;
  wait (frames == NFRAMES);
  check(line_len_err === 0, "every active line is 1920 pixels");
  check(cfg_done, "transmitter configured");
  check(i2c_adv === 38 && i2c_sw === ((BOARD === BOARD_ZC706) ? 1 : 0),
        $sformatf("I2C frames: %0d to the transmitter, %0d to the switch", i2c_adv, i2c_sw));
  check(n_normal >= 1 && n_ext >= 1 && n_bands >= 1,
        $sformatf("frames checked: %0d normal, %0d extended, %0d bands", n_normal, n_ext, n_bands));
  check(dots_ok > 10 && pot_ok > 10 && sat_pts > 0, $sformatf("dots %0d, potential points %0d, saturated %0d", dots_ok, pot_ok, sat_pts));
  check(spk_pops === pushed_spikes && spk_count === 0, $sformatf("spikes read %0d of %0d", spk_pops, pushed_spikes));
  check(pot_pops === 4 * steps || pot_pops === 4 * steps - 4 + pot_pops % 4, "potentials read");
  check(transfers >= NFRAMES - 2, $sformatf("transfers %0d", transfers));
  if (MS_PS < 100) check(text_changes > 0, "execution time shown and updated");
  $display("%s: frames %0d, normal %0d, extended %0d, bands %0d, dots %0d, potential points %0d, saturated %0d, transfers %0d, I2C %0d, spikes %0d, time text changes %0d",
           NAME, frames, n_normal, n_ext, n_bands, dots_ok, pot_ok, sat_pts, transfers, i2c_frames, spk_pops, text_changes);
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
end
