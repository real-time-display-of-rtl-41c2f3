// Four stacked plots of the membrane potential of the monitored neurons.
//
// The potential memory holds, per time stamp, four 8-bit plot rows (0..179, neuron k in bits
// 8k+7..8k). It is streamed exactly like the spike memory (issue column j at x = PLOT_X0 - 4 + j,
// 3-clock read latency, oldest column first). Plot k occupies lines POT_TOP + 182k .. +179, row 0
// (-80 mV) at the bottom. The curve is drawn continuous: a pixel is lit when its row lies between
// the previous and the current column's values, so consecutive points are joined by vertical
// runs. Contours: a 1-pixel frame round the stack and 2-line borders between plots. Time ticks
// sit only above the top and below the bottom of the stack (every 25, longer every 100 and 500);
// each plot has potential ticks every 5 mV on its left. A dotted line (dashes of 4 pixels, from
// bit 2 of x) marks the -55 mV threshold (row 89) in every plot, with "threshold" on the right;
// "-80 mV" and "-55 mV" label the left axis, in the plot's colour.
//
// Outputs refer to the pixel at (i_h, i_v) in the same clock: o_curve[k] lights plot k's curve,
// o_label[k] its tick labels, o_black contours, ticks, threshold dots and text.
module potential_plot
  import neurons_pkg::*;
  import plot_pkg::*;
(
  input  logic        i_clk,
  input  logic        i_rst,
  input  logic [11:0] i_h,
  input  logic [11:0] i_v,
  input  logic        i_enable,
  input  logic [31:0] i_last_time,
  input  logic        i_have_data,
  output logic        o_mem_en,
  output logic [9:0]  o_mem_addr,
  input  logic [31:0] i_mem_dout,
  output logic [3:0]  o_curve,
  output logic [3:0]  o_label,
  output logic        o_black
);
  localparam int THR_ROW   = ((-5500 + POT_OFFSET) * POT_MULT) >>> POT_SHIFT;  // 89
  localparam int STACK_BOT = POT_TOP + 3 * POT_PITCH + PLOT_H - 1;
  localparam int MV5_ROWS  = 500;   // 5 mV in 10 uV units

  logic       full;
  logic [9:0] oldest, newest;
  assign full   = (i_last_time >= 32'd1023);
  assign newest = i_last_time[9:0];
  assign oldest = full ? newest + 10'd1 : 10'd0;

  logic [31:0] cur, prev;
  logic signed [31:0]          a;
  assign a = int'(i_h) - (PLOT_X0 - 4);

  always_ff @(posedge i_clk) begin
    if (i_rst) begin
      o_mem_en   <= 1'b0;
      o_mem_addr <= '0;
      cur        <= '0;
      prev       <= '0;
    end else begin
      o_mem_en   <= (a >= 0) && (a < PLOT_W);
      o_mem_addr <= oldest + 10'(a);
      cur        <= i_mem_dout;
      // the first column has no predecessor: join it to itself
      prev       <= (int'(i_h) == PLOT_X0 - 1) ? i_mem_dout : cur;
    end
  end

  logic signed [31:0]   col, rel, k, r;
  logic in_cols, col_ok, in_stack, in_plot, border, frame, dots, ttick, vtick;
  logic signed [31:0]   hlen;

  always_comb begin
    col      = int'(i_h) - PLOT_X0;
    rel      = int'(i_v) - POT_TOP;
    in_cols  = (col >= 0) && (col < PLOT_W);
    col_ok   = i_have_data && in_cols && (full || col <= int'(newest));
    in_stack = (rel >= 0) && (int'(i_v) <= STACK_BOT);
    k        = in_stack ? rel / POT_PITCH : 0;
    r        = PLOT_H - 1 - (rel - k * POT_PITCH);   // row in plot k, 0 at the bottom
    in_plot  = in_stack && (rel - k * POT_PITCH) < PLOT_H;
    border   = in_stack && !in_plot && in_cols;
    frame    = ((int'(i_v) == POT_TOP - 1 || int'(i_v) == STACK_BOT + 1) && col >= -1 && col <= PLOT_W)
            || ((col == -1 || col == PLOT_W) && int'(i_v) >= POT_TOP - 1 && int'(i_v) <= STACK_BOT + 1);
    dots     = in_plot && in_cols && r == THR_ROW && !i_h[2];
    hlen     = (col % 500 == 0) ? 9 : (col % 100 == 0) ? 6 : (col % 25 == 0) ? 3 : 0;
    ttick    = in_cols && ((int'(i_v) < POT_TOP - 1 && int'(i_v) >= POT_TOP - 1 - hlen)
                        || (int'(i_v) > STACK_BOT + 1 && int'(i_v) <= STACK_BOT + 1 + hlen));
    // rows of -80, -75, ... -30 mV
    vtick    = 1'b0;
    for (int m = 0; m <= 10; m++)
      if (r == ((m * MV5_ROWS * POT_MULT) >>> POT_SHIFT)) vtick = in_plot && col < -1 && col >= -4;
  end

  always_comb begin
    for (int p = 0; p < NB_MON; p++) begin
      int lo, hi, c, q;
      c  = int'(cur[8*p +: 8]);
      q  = int'(prev[8*p +: 8]);
      lo = (c < q) ? c : q;
      hi = (c < q) ? q : c;
      o_curve[p] = i_enable && col_ok && in_plot && (k == p) && (r >= lo) && (r <= hi);
    end
  end

  // labels
  logic [3:0] l80, l55;
  logic       thr_text;
  logic [NB_MON-1:0] thr_each;

  for (genvar p = 0; p < NB_MON; p++) begin : g_lab
    localparam int TOPP = POT_TOP + p * POT_PITCH;
    text_generator #(.LEN(6), .TEXT("-80 mV")) u_l80 (
      .i_h, .i_v, .i_x0(12'(PLOT_X0 - 8 - 48)), .i_y0(12'(TOPP + PLOT_H - 1 - 8)), .i_enable(i_enable),
      .o_on(l80[p])
    );
    text_generator #(.LEN(6), .TEXT("-55 mV")) u_l55 (
      .i_h, .i_v, .i_x0(12'(PLOT_X0 - 8 - 48)), .i_y0(12'(TOPP + PLOT_H - 1 - THR_ROW - 8)), .i_enable(i_enable),
      .o_on(l55[p])
    );
    text_generator #(.LEN(9), .TEXT("threshold")) u_thr (
      .i_h, .i_v, .i_x0(12'(PLOT_X0 + PLOT_W + 8)), .i_y0(12'(TOPP + PLOT_H - 1 - THR_ROW - 8)), .i_enable(i_enable),
      .o_on(thr_each[p])
    );
  end

  assign thr_text = |thr_each;
  assign o_label  = l80 | l55;
  assign o_black  = i_enable && (border || frame || dots || ttick || vtick || thr_text);

endmodule
