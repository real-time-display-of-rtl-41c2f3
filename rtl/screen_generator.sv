// Picture generator of the display: answers every raster position with a colour.
//
// Composition, front to back: text and contours in black, curves in their colours, white
// background. In normal mode the screen holds the board information (top left), the raster plot
// of up to 200 neurons, and below it the four potential plots with the monitored neurons'
// descriptions on their left. In extended mode (button switch) only the extended raster plot and
// the board information are shown. Board information: board name, numbers of columns, rows,
// virtualisation levels and chips, and the execution time "dd d hh h mm m ss s", leading units
// that are still zero left out and the shown units packed to the left.
//
// Data from the emulator clock domain (newest column time, data-present flag, execution time)
// arrives with i_upd; it is applied at the start of the next frame, so a frame is drawn from one
// consistent state. o_frame_end pulses on the last visible pixel; the FIFO side then copies its
// spike buffer into the memory during the blanking interval.
//
// Timing: i_h/i_v are the position counters; o_color and the delayed counters o_h/o_v are
// registered one clock later, as the HDMI signal generator expects.
module screen_generator
  import hdmi_resolution_pkg::*;
  import neurons_pkg::*;
  import plot_pkg::*;
#(
  parameter board_e BOARD     = BOARD_ZEDBOARD,
  parameter res_e   RES       = RES_1920X1080,
  parameter int     NB_COLUMN = 5,
  parameter int     NB_ROW    = 5,
  parameter int     NB_VIRT   = 8,
  parameter int     NB_CHIPS  = 1,
  parameter int     MEM_W     = MEM_WIDTH
) (
  input  logic             i_clk,
  input  logic             i_rst,
  input  logic [11:0]      i_h,
  input  logic [11:0]      i_v,
  input  logic             i_extended,
  input  mon_neuron_t      i_mon [NB_MON],
  // state from the emulator clock domain
  input  logic             i_upd,
  input  logic [31:0]      i_last_time,
  input  logic             i_have_data,
  input  logic [1:0][3:0]  i_sec,
  input  logic [1:0][3:0]  i_min,
  input  logic [1:0][3:0]  i_hour,
  input  logic [1:0][3:0]  i_day,
  // spike memory, read port
  output logic             o_spk_en,
  output logic [9:0]       o_spk_addr,
  input  logic [MEM_W-1:0] i_spk_dout,
  // potential memory, read port
  output logic             o_pot_en,
  output logic [9:0]       o_pot_addr,
  input  logic [31:0]      i_pot_dout,
  output logic             o_frame_end,
  output logic [23:0]      o_color,
  output logic [11:0]      o_h,
  output logic [11:0]      o_v
);
  localparam timing_t T = res_timing(RES);
  localparam int NB_NEURONS = NB_COLUMN * NB_ROW * NB_VIRT * NB_CHIPS;

  // ---------------------------------------------------------------- frame-consistent state
  logic [31:0]     new_time, disp_time;
  logic            new_have, disp_have;
  logic [1:0][3:0] new_sec, new_min, new_hour, new_day;
  logic [1:0][3:0] d_sec, d_min, d_hour, d_day;

  always_ff @(posedge i_clk) begin
    if (i_rst) begin
      new_time  <= '0;  disp_time <= '0;
      new_have  <= 1'b0; disp_have <= 1'b0;
      new_sec   <= {4'hF, 4'd0}; new_min <= {4'hF, 4'd0}; new_hour <= {4'hF, 4'd0}; new_day <= {4'hF, 4'd0};
      d_sec     <= {4'hF, 4'd0}; d_min   <= {4'hF, 4'd0}; d_hour   <= {4'hF, 4'd0}; d_day   <= {4'hF, 4'd0};
    end else begin
      if (i_upd) begin
        new_time <= i_last_time;
        new_have <= i_have_data;
        new_sec  <= i_sec; new_min <= i_min; new_hour <= i_hour; new_day <= i_day;
      end
      if (i_h == 12'd0 && i_v == 12'd0) begin
        disp_time <= new_time;
        disp_have <= new_have;
        d_sec <= new_sec; d_min <= new_min; d_hour <= new_hour; d_day <= new_day;
      end
    end
  end

  assign o_frame_end = (i_h == T.h_visible - 1'b1) && (i_v == T.v_visible - 1'b1);

  // ---------------------------------------------------------------- plots
  logic       r_curve, r_black, p_black;
  logic [3:0] p_curve, p_label;

  raster_plot #(.NB_NEURONS(NB_NEURONS), .MEM_W(MEM_W)) u_raster (
    .i_clk, .i_rst, .i_h, .i_v, .i_extended,
    .i_last_time(disp_time), .i_have_data(disp_have),
    .o_mem_en(o_spk_en), .o_mem_addr(o_spk_addr), .i_mem_dout(i_spk_dout),
    .o_curve(r_curve), .o_black(r_black)
  );

  potential_plot u_potential (
    .i_clk, .i_rst, .i_h, .i_v, .i_enable(!i_extended),
    .i_last_time(disp_time), .i_have_data(disp_have),
    .o_mem_en(o_pot_en), .o_mem_addr(o_pot_addr), .i_mem_dout(i_pot_dout),
    .o_curve(p_curve), .o_label(p_label), .o_black(p_black)
  );

  // ---------------------------------------------------------------- monitored neurons
  logic [3:0] n_title, n_black;
  for (genvar p = 0; p < NB_MON; p++) begin : g_info
    localparam logic [8*16-1:0] TITLE = (p == 0) ? "Neuron in BLUE  " :
                                        (p == 1) ? "Neuron in RED   " :
                                        (p == 2) ? "Neuron in GREEN " : "Neuron in ORANGE";
    neuron_info_text #(.NB_COLUMN(NB_COLUMN), .NB_ROW(NB_ROW), .NB_VIRT(NB_VIRT),
                       .TLEN(16), .TITLE(TITLE)) u_info (
      .i_h, .i_v, .i_x0(12'(INFO_X)), .i_y0(12'(POT_TOP + p * POT_PITCH + 8)),
      .i_enable(!i_extended), .i_neuron(i_mon[p]), .o_title(n_title[p]), .o_black(n_black[p])
    );
  end

  // ---------------------------------------------------------------- board information
  localparam logic [8*10-1:0] BOARD_NAME = (BOARD == BOARD_ZC706) ? "Zynq ZC706" : "ZedBoard  ";

  function automatic logic [2:0][3:0] to_digits(int v);
    logic [2:0][3:0] d;
    d[2] = (v >= 100) ? 4'(v / 100) : 4'hF;
    d[1] = (v >= 10) ? 4'((v / 10) % 10) : 4'hF;
    d[0] = 4'(v % 10);
    return d;
  endfunction

  localparam logic [2:0][3:0] D_COL  = to_digits(NB_COLUMN);
  localparam logic [2:0][3:0] D_ROW  = to_digits(NB_ROW);
  localparam logic [2:0][3:0] D_VIRT = to_digits(NB_VIRT);
  localparam logic [2:0][3:0] D_CHIP = to_digits(NB_CHIPS);

  logic [4:0] i_lab;
  logic [3:0] i_val;
  text_generator #(.LEN(10), .TEXT(BOARD_NAME)) u_name (
    .i_h, .i_v, .i_x0(12'(INFO_X)), .i_y0(12'd8), .i_enable(1'b1), .o_on(i_lab[0]));
  text_generator #(.LEN(9), .TEXT("Columns: ")) u_cols (
    .i_h, .i_v, .i_x0(12'(INFO_X)), .i_y0(12'd28), .i_enable(1'b1), .o_on(i_lab[1]));
  integer_text_generator #(.NDIG(3)) u_cols_n (
    .i_h, .i_v, .i_x0(12'(INFO_X + 72)), .i_y0(12'd28), .i_enable(1'b1), .i_digits(D_COL), .o_on(i_val[0]));
  text_generator #(.LEN(6), .TEXT("Rows: ")) u_rows (
    .i_h, .i_v, .i_x0(12'(INFO_X)), .i_y0(12'd48), .i_enable(1'b1), .o_on(i_lab[2]));
  integer_text_generator #(.NDIG(3)) u_rows_n (
    .i_h, .i_v, .i_x0(12'(INFO_X + 48)), .i_y0(12'd48), .i_enable(1'b1), .i_digits(D_ROW), .o_on(i_val[1]));
  text_generator #(.LEN(23), .TEXT("Virtualization levels: ")) u_virt (
    .i_h, .i_v, .i_x0(12'(INFO_X)), .i_y0(12'd68), .i_enable(1'b1), .o_on(i_lab[3]));
  integer_text_generator #(.NDIG(3)) u_virt_n (
    .i_h, .i_v, .i_x0(12'(INFO_X + 184)), .i_y0(12'd68), .i_enable(1'b1), .i_digits(D_VIRT), .o_on(i_val[2]));
  text_generator #(.LEN(7), .TEXT("Chips: ")) u_chips (
    .i_h, .i_v, .i_x0(12'(INFO_X)), .i_y0(12'd88), .i_enable(1'b1), .o_on(i_lab[4]));
  integer_text_generator #(.NDIG(3)) u_chips_n (
    .i_h, .i_v, .i_x0(12'(INFO_X + 56)), .i_y0(12'd88), .i_enable(1'b1), .i_digits(D_CHIP), .o_on(i_val[3]));

  // ---------------------------------------------------------------- execution time
  localparam logic [1:0][3:0] TZERO = {4'hF, 4'd0};
  localparam int TIME_X = INFO_X + 16 * 8;
  logic       show_d, show_h, show_m;
  logic [1:0] slot_h, slot_m, slot_s;
  logic [3:0] t_num, t_unit;
  logic       t_lab;

  always_comb begin
    show_d = (d_day != TZERO);
    show_h = show_d || (d_hour != TZERO);
    show_m = show_h || (d_min != TZERO);
    slot_h = {1'b0, show_d};
    slot_m = slot_h + {1'b0, show_h};
    slot_s = slot_m + {1'b0, show_m};
  end

  text_generator #(.LEN(16), .TEXT("Execution Time: ")) u_time_lab (
    .i_h, .i_v, .i_x0(12'(INFO_X)), .i_y0(12'd108), .i_enable(1'b1), .o_on(t_lab));

  integer_text_generator #(.NDIG(2)) u_day (
    .i_h, .i_v, .i_x0(12'(TIME_X)), .i_y0(12'd108), .i_enable(show_d), .i_digits(d_day), .o_on(t_num[0]));
  text_generator #(.LEN(1), .TEXT("d")) u_day_u (
    .i_h, .i_v, .i_x0(12'(TIME_X + 16)), .i_y0(12'd108), .i_enable(show_d), .o_on(t_unit[0]));
  integer_text_generator #(.NDIG(2)) u_hour (
    .i_h, .i_v, .i_x0(12'(TIME_X) + 12'(slot_h) * 12'd32), .i_y0(12'd108), .i_enable(show_h), .i_digits(d_hour), .o_on(t_num[1]));
  text_generator #(.LEN(1), .TEXT("h")) u_hour_u (
    .i_h, .i_v, .i_x0(12'(TIME_X + 16) + 12'(slot_h) * 12'd32), .i_y0(12'd108), .i_enable(show_h), .o_on(t_unit[1]));
  integer_text_generator #(.NDIG(2)) u_min (
    .i_h, .i_v, .i_x0(12'(TIME_X) + 12'(slot_m) * 12'd32), .i_y0(12'd108), .i_enable(show_m), .i_digits(d_min), .o_on(t_num[2]));
  text_generator #(.LEN(1), .TEXT("m")) u_min_u (
    .i_h, .i_v, .i_x0(12'(TIME_X + 16) + 12'(slot_m) * 12'd32), .i_y0(12'd108), .i_enable(show_m), .o_on(t_unit[2]));
  integer_text_generator #(.NDIG(2)) u_sec (
    .i_h, .i_v, .i_x0(12'(TIME_X) + 12'(slot_s) * 12'd32), .i_y0(12'd108), .i_enable(1'b1), .i_digits(d_sec), .o_on(t_num[3]));
  text_generator #(.LEN(1), .TEXT("s")) u_sec_u (
    .i_h, .i_v, .i_x0(12'(TIME_X + 16) + 12'(slot_s) * 12'd32), .i_y0(12'd108), .i_enable(1'b1), .o_on(t_unit[3]));

  // ---------------------------------------------------------------- colour
  rgb_t color;
  always_comb begin
    color = C_WHITE;
    if (r_curve)           color = C_BLUE;
    if (p_curve[0])        color = C_BLUE;
    if (p_curve[1])        color = C_RED;
    if (p_curve[2])        color = C_GREEN;
    if (p_curve[3])        color = C_ORANGE;
    if (r_black || p_black || (|n_black) || (|i_lab) || t_lab || (|t_unit)) color = C_BLACK;
    if ((|i_val) || (|t_num)) color = C_BLUE;
    for (int p = 0; p < NB_MON; p++) begin
      if (n_title[p] || p_label[p])
        color = (p == 0) ? C_BLUE : (p == 1) ? C_RED : (p == 2) ? C_GREEN : C_ORANGE;
    end
  end

  always_ff @(posedge i_clk) begin
    o_color <= color;
    o_h     <= i_h;
    o_v     <= i_v;
  end

endmodule
