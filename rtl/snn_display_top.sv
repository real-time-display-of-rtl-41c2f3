// Real-time display of a spiking neural network emulator over HDMI: top level.
//
// Two clock domains. The emulator domain (i_heens_clk) holds the spike FIFO reader with its
// 32-column buffer, the potential FIFO reader and the execution time counter; both readers
// follow the emulator's phase signal i_ph_dist (one emulated millisecond per phase). The pixel
// domain (i_pix_clk, 150 MHz for 1080p) holds the HDMI link (position counters, sync generation,
// optional RGB-to-YCbCr conversion, transmitter pin mapping, I2C configuration of the
// transmitter), the picture generator and the debounced button that selects the extended raster
// plot. The spike memory (968 bits x 1024 ms) and the potential memory (4 x 8 bits x 1024 ms)
// are dual-clock: written from the emulator side, read by the picture generator.
//
// Crossings: "frame finished" goes pixel -> emulator (toggle synchroniser), starting the buffer
// transfer during vertical blanking; "transfer done" goes back together with a snapshot of the
// newest column time, the data-present flag and the execution time (toggle plus held data).
// i_test_bands replaces the picture by vertical colour bands (link test).
//
// Each reset input is synchronised into its domain. Everything else is plain signals.
//
// Follows the document: the split into HDMI link, FIFO readers, memories and screen generator,
// the 32-slot spike buffer copied at the end of the visible screen, the board-dependent pin
// mapping and the I2C setup. Own choices: board variants through one BOARD parameter, clocks and
// monitored neurons as ports (the PLL and the emulator's registers stay outside), the reset
// synchronisers, and the band test as a multiplexer rather than a separate project.
// The port-A read data of the memories and the second read port of the spike buffer are left
// unconnected on purpose: the writers never read back.
module snn_display_top
  import hdmi_resolution_pkg::*;
  import neurons_pkg::*;
  import plot_pkg::*;
#(
  parameter board_e BOARD        = BOARD_ZEDBOARD,
  parameter res_e   RES          = RES_1920X1080,
  parameter int     NB_COLUMN    = 5,
  parameter int     NB_ROW       = 5,
  parameter int     NB_VIRT      = 8,
  parameter int     NB_CHIPS     = 1,
  parameter int     CLK_DIV_LOG2 = 9,
  parameter int     BTN_DIV_LOG2 = 21,
  parameter int     MS_PER_S     = 1000
) (
  input  logic        i_pix_clk,
  input  logic        i_heens_clk,
  input  logic        i_rst,
  input  logic        i_button,
  input  logic        i_test_bands,
  // emulator interface
  input  logic        i_ph_dist,
  input  logic [17:0] i_spk_dout,
  input  logic        i_spk_empty,
  input  logic        i_spk_valid,
  output logic        o_spk_ready,
  input  logic [15:0] i_pot_dout,
  input  logic        i_pot_empty,
  input  logic        i_pot_valid,
  output logic        o_pot_ready,
  input  mon_neuron_t i_mon [NB_MON],
  // HDMI transmitter
  output logic        o_hdmi_clk,
  output logic [35:0] o_hdmi_d,
  output logic        o_hdmi_de,
  output logic        o_hdmi_hsync,
  output logic        o_hdmi_vsync,
  output logic        o_hdmi_scl,
  output logic        o_hdmi_sda,
  output logic        o_hdmi_sda_release,
  output logic        o_config_done
);
  // ---------------------------------------------------------------- reset synchronisers
  logic [1:0] pix_rst_sr, heens_rst_sr;
  logic       pix_rst, heens_rst;
  always_ff @(posedge i_pix_clk or posedge i_rst)
    if (i_rst) pix_rst_sr <= 2'b11; else pix_rst_sr <= {pix_rst_sr[0], 1'b0};
  always_ff @(posedge i_heens_clk or posedge i_rst)
    if (i_rst) heens_rst_sr <= 2'b11; else heens_rst_sr <= {heens_rst_sr[0], 1'b0};
  assign pix_rst   = pix_rst_sr[1];
  assign heens_rst = heens_rst_sr[1];

  // ---------------------------------------------------------------- emulator domain
  logic             frame_end_h;
  logic             spk_en, spk_we;
  logic [9:0]       spk_addr;
  logic [MEM_WIDTH-1:0] spk_din, spk_douta;
  logic [31:0]      cur_time, last_time;
  logic             phase_end, xfer_done, have_data;
  logic             pot_en, pot_we;
  logic [9:0]       pot_addr;
  logic [31:0]      pot_din, pot_douta;
  logic [1:0][3:0]  sec, min, hour, day;

  spike_fifo_reader #(.NB_COLUMN(NB_COLUMN), .NB_ROW(NB_ROW), .NB_VIRT(NB_VIRT)) u_spike_reader (
    .i_clk(i_heens_clk), .i_rst(heens_rst), .i_ph_dist,
    .i_fifo_dout(i_spk_dout), .i_fifo_empty(i_spk_empty), .i_fifo_valid(i_spk_valid),
    .o_fifo_ready(o_spk_ready), .i_frame_end(frame_end_h),
    .o_mem_en(spk_en), .o_mem_we(spk_we), .o_mem_addr(spk_addr), .o_mem_din(spk_din),
    .o_time(cur_time), .o_phase_end(phase_end), .o_xfer_done(xfer_done),
    .o_last_time(last_time), .o_have_data(have_data)
  );

  potential_fifo_reader u_potential_reader (
    .i_clk(i_heens_clk), .i_rst(heens_rst), .i_ph_dist, .i_time(cur_time),
    .i_fifo_dout(i_pot_dout), .i_fifo_empty(i_pot_empty), .i_fifo_valid(i_pot_valid),
    .o_fifo_ready(o_pot_ready),
    .o_mem_en(pot_en), .o_mem_we(pot_we), .o_mem_addr(pot_addr), .o_mem_din(pot_din)
  );

  exec_time_counter #(.MS_PER_S(MS_PER_S)) u_exec_time (
    .i_clk(i_heens_clk), .i_rst(heens_rst), .i_tick(phase_end),
    .o_sec(sec), .o_min(min), .o_hour(hour), .o_day(day)
  );

  // ---------------------------------------------------------------- memories
  logic                 spk_rd_en, pot_rd_en;
  logic [9:0]           spk_rd_addr, pot_rd_addr;
  logic [MEM_WIDTH-1:0] spk_rd_data;
  logic [31:0]          pot_rd_data;

  dp_ram #(.WIDTH(MEM_WIDTH), .DEPTH(1024), .LAT_A(1), .LAT_B(2)) u_spike_mem (
    .clka(i_heens_clk), .ena(spk_en), .wea(spk_we), .addra(spk_addr), .dina(spk_din),
    .douta(spk_douta),
    .clkb(i_pix_clk), .enb(spk_rd_en), .addrb(spk_rd_addr), .doutb(spk_rd_data)
  );

  dp_ram #(.WIDTH(32), .DEPTH(1024), .LAT_A(1), .LAT_B(2)) u_potential_mem (
    .clka(i_heens_clk), .ena(pot_en), .wea(pot_we), .addra(pot_addr), .dina(pot_din),
    .douta(pot_douta),
    .clkb(i_pix_clk), .enb(pot_rd_en), .addrb(pot_rd_addr), .doutb(pot_rd_data)
  );

  // ---------------------------------------------------------------- clock domain crossings
  logic        frame_end_p;
  logic        upd_p;
  logic [64:0] snap_p;

  cdc_sync #(.WIDTH(1)) u_cdc_frame_end (
    .i_src_clk(i_pix_clk), .i_src_rst(pix_rst), .i_pulse(frame_end_p), .i_data(1'b0),
    .i_dst_clk(i_heens_clk), .i_dst_rst(heens_rst), .o_pulse(frame_end_h), .o_data()
  );

  cdc_sync #(.WIDTH(65)) u_cdc_transfer (
    .i_src_clk(i_heens_clk), .i_src_rst(heens_rst), .i_pulse(xfer_done),
    .i_data({have_data, last_time, sec, min, hour, day}),
    .i_dst_clk(i_pix_clk), .i_dst_rst(pix_rst), .o_pulse(upd_p), .o_data(snap_p)
  );

  // ---------------------------------------------------------------- pixel domain
  logic        extended;
  logic [11:0] hcnt, vcnt, sg_h, sg_v;
  logic [23:0] sg_color, band_color;

  button_switch #(.DIV_LOG2(BTN_DIV_LOG2)) u_button (
    .i_clk(i_pix_clk), .i_rst(pix_rst), .i_button, .o_switch(extended)
  );

  screen_generator #(.BOARD(BOARD), .RES(RES), .NB_COLUMN(NB_COLUMN), .NB_ROW(NB_ROW),
                     .NB_VIRT(NB_VIRT), .NB_CHIPS(NB_CHIPS)) u_screen (
    .i_clk(i_pix_clk), .i_rst(pix_rst), .i_h(hcnt), .i_v(vcnt), .i_extended(extended),
    .i_mon, .i_upd(upd_p),
    .i_have_data(snap_p[64]), .i_last_time(snap_p[63:32]),
    .i_sec(snap_p[31:24]), .i_min(snap_p[23:16]), .i_hour(snap_p[15:8]), .i_day(snap_p[7:0]),
    .o_spk_en(spk_rd_en), .o_spk_addr(spk_rd_addr), .i_spk_dout(spk_rd_data),
    .o_pot_en(pot_rd_en), .o_pot_addr(pot_rd_addr), .i_pot_dout(pot_rd_data),
    .o_frame_end(frame_end_p), .o_color(sg_color), .o_h(sg_h), .o_v(sg_v)
  );

  color_bands u_bands (.i_clk(i_pix_clk), .i_hcounter(hcnt), .o_color(band_color));

  hdmi_connection #(.BOARD(BOARD), .RES(RES), .CLK_DIV_LOG2(CLK_DIV_LOG2)) u_hdmi (
    .i_clk(i_pix_clk), .i_rst(pix_rst),
    .i_color(i_test_bands ? band_color : sg_color), .i_hcounter(sg_h), .i_vcounter(sg_v),
    .o_hcounter(hcnt), .o_vcounter(vcnt),
    .o_hdmi_clk, .o_hdmi_d, .o_hdmi_de, .o_hdmi_hsync, .o_hdmi_vsync,
    .o_hdmi_scl, .o_hdmi_sda, .o_hdmi_sda_release, .o_config_done
  );

endmodule
