// Raster plot: one dot per spike, neuron index upwards, 1024 time stamps from left to right.
//
// The spike memory holds one 968-bit column per time stamp at address time mod 1024. For every
// line the plot streams the 1024 columns out of the memory, oldest first: column 0 when fewer
// than 1024 time stamps exist, otherwise the one after the newest. Read latency is 3 clocks
// (address register here plus 2 in the RAM), so the address of column j is issued at
// x = PLOT_X0 - 4 + j; at x = PLOT_X0 + k the plot holds column k (cur), column k-1 (prev) and sees
// column k+1 on the memory output (next).
//
// A spike of neuron n is drawn as a plus sign: centre, and the pixels above, below, left and
// right. Normal mode shows neurons 0..min(200,N)-1 one per line from line RASTER_TOP (neuron 0 at
// the bottom). In extended mode (i_extended = 1) a network of at most 200 neurons is stretched to
// 4 lines per neuron (arms on sub-lines 1..3, centre and side arms on sub-line 2), a larger one is
// shown one line per neuron up to 968; the extended plot ends at line EXT_BOTTOM. Contours are a
// 1-pixel frame; the vertical axis has ticks every 10 neurons (3, 6, 9 pixels long at multiples
// of 10, 50, 100) and labels every 50; the time axis has ticks every 25 (100, 500 longer) and
// labels every 100. Axis titles: "neurons" (rotated) and "time (ms)".
//
// Timing: i_h/i_v are the raw position counters; o_curve and o_black refer to that same pixel
// and are combinational from the counters and this module's registers. i_last_time and
// i_have_data must stay constant during a frame.
module raster_plot
  import neurons_pkg::*;
  import plot_pkg::*;
#(
  parameter int NB_NEURONS = 200,
  parameter int MEM_W      = MEM_WIDTH
) (
  input  logic             i_clk,
  input  logic             i_rst,
  input  logic [11:0]      i_h,
  input  logic [11:0]      i_v,
  input  logic             i_extended,
  input  logic [31:0]      i_last_time,
  input  logic             i_have_data,
  output logic             o_mem_en,
  output logic [9:0]       o_mem_addr,
  input  logic [MEM_W-1:0] i_mem_dout,
  output logic             o_curve,
  output logic             o_black
);
  localparam int RANGE_N   = (NB_NEURONS < RANGE_SMALL) ? NB_NEURONS : RANGE_SMALL;
  localparam int EXT_SCALE = (NB_NEURONS <= RANGE_SMALL) ? 4 : 1;
  localparam int EXT_N     = (NB_NEURONS <= RANGE_SMALL) ? RANGE_N :
                             ((NB_NEURONS < MEM_W) ? NB_NEURONS : MEM_W);
  localparam int EXT_TOP   = EXT_BOTTOM + 1 - EXT_N * EXT_SCALE;

  // ---------------------------------------------------------------- time reference
  logic       full;
  logic [9:0] oldest, newest;
  assign full   = (i_last_time >= 32'd1023);
  assign newest = i_last_time[9:0];
  assign oldest = full ? newest + 10'd1 : 10'd0;

  // ---------------------------------------------------------------- column stream
  logic [MEM_W-1:0] cur, prev;
  logic signed [31:0]               a;       // column whose address is issued now
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
      prev       <= (int'(i_h) == PLOT_X0 - 1) ? '0 : cur;
      cur        <= i_mem_dout;
    end
  end

  // ---------------------------------------------------------------- geometry of this pixel
  logic signed [31:0] top, nrows, scale, nmax, col, rel, n, sub, bottom;
  logic in_rows, in_cols, col_ok, next_ok, prev_ok;

  always_comb begin
    if (i_extended) begin
      top = EXT_TOP; nrows = EXT_N * EXT_SCALE; scale = EXT_SCALE; nmax = EXT_N - 1;
    end else begin
      top = RASTER_TOP; nrows = RANGE_N; scale = 1; nmax = RANGE_N - 1;
    end
    bottom  = top + nrows - 1;
    col     = int'(i_h) - PLOT_X0;
    rel     = int'(i_v) - top;
    in_rows = (rel >= 0) && (rel < nrows);
    in_cols = (col >= 0) && (col < PLOT_W);
    sub     = (scale == 4) ? (rel & 3) : 2;
    n       = nmax - ((scale == 4) ? (rel >>> 2) : rel);
    // columns that hold data: all when full, else 0..newest
    col_ok  = i_have_data && in_cols && (full || col <= int'(newest));
    prev_ok = col_ok && (col > 0);
    next_ok = i_have_data && (col + 1 < PLOT_W) && (full || col + 1 <= int'(newest));
  end

  // ---------------------------------------------------------------- dots
  function automatic logic bit_at(logic [MEM_W-1:0] c, int i);
    return (i >= 0) && (i < MEM_W) && c[i];
  endfunction

  always_comb begin
    o_curve = 1'b0;
    if (in_rows && col_ok) begin
      if (scale == 4) begin
        o_curve = (bit_at(cur, n) && (sub != 0))
               || (sub == 2 && prev_ok && bit_at(prev, n))
               || (sub == 2 && next_ok && bit_at(i_mem_dout, n));
      end else begin
        o_curve = bit_at(cur, n)
               || (n > 0 && bit_at(cur, n - 1))
               || (n < nmax && bit_at(cur, n + 1))
               || (prev_ok && bit_at(prev, n))
               || (next_ok && bit_at(i_mem_dout, n));
      end
    end
  end

  // ---------------------------------------------------------------- contours and ticks
  logic frame, vtick, htick;
  logic signed [31:0]   vlen, hlen;

  always_comb begin
    frame = ((int'(i_v) == top - 1 || int'(i_v) == bottom + 1) && col >= -1 && col <= PLOT_W)
         || ((col == -1 || col == PLOT_W) && rel >= -1 && rel <= nrows);
    vlen  = (n % 100 == 0) ? 9 : (n % 50 == 0) ? 6 : (n % 10 == 0) ? 3 : 0;
    vtick = in_rows && sub == 2 && col < -1 && col >= -1 - vlen;
    hlen  = (col % 500 == 0) ? 9 : (col % 100 == 0) ? 6 : (col % 25 == 0) ? 3 : 0;
    htick = in_cols && int'(i_v) > bottom + 1 && int'(i_v) <= bottom + 1 + hlen;
  end

  // ---------------------------------------------------------------- labels
  // vertical: nearest multiple of 50, centred on its tick line
  logic signed [31:0] lab_n, lab_row, lab_col;
  logic [2:0][3:0] vdig;
  logic [3:0][3:0] hdig;
  logic vlab_on, hlab_on, ylab_on, xlab_on;
  logic [11:0] vlab_y, hlab_x, hlab_y;

  always_comb begin
    lab_n   = ((((n < 0) ? 0 : n) + 25) / 50) * 50;
    if (lab_n > nmax) lab_n = lab_n - 50;
    lab_row = top + (nmax - lab_n) * scale + ((scale == 4) ? 2 : 0);
    vlab_y  = 12'(lab_row - 8);
    vdig[2] = (lab_n >= 100) ? 4'(lab_n / 100) : 4'hF;
    vdig[1] = (lab_n >= 10) ? 4'((lab_n / 10) % 10) : 4'hF;
    vdig[0] = 4'(lab_n % 10);
    lab_col = (((col < 0) ? 0 : col) + 50) / 100 * 100;
    if (lab_col > 1000) lab_col = 1000;
    hlab_x  = 12'(PLOT_X0 + lab_col + 4 - 32);
    hlab_y  = 12'(bottom + 12);
    hdig[3] = (lab_col >= 1000) ? 4'(lab_col / 1000) : 4'hF;
    hdig[2] = (lab_col >= 100) ? 4'((lab_col / 100) % 10) : 4'hF;
    hdig[1] = (lab_col >= 10) ? 4'((lab_col / 10) % 10) : 4'hF;
    hdig[0] = 4'(lab_col % 10);
  end

  integer_text_generator #(.NDIG(3)) u_vlab (
    .i_h, .i_v, .i_x0(12'(PLOT_X0 - 14 - 24)), .i_y0(vlab_y), .i_enable(1'b1),
    .i_digits(vdig), .o_on(vlab_on)
  );
  integer_text_generator #(.NDIG(4)) u_hlab (
    .i_h, .i_v, .i_x0(hlab_x), .i_y0(hlab_y), .i_enable(1'b1),
    .i_digits(hdig), .o_on(hlab_on)
  );
  text_generator_rotated #(.LEN(7), .TEXT("neurons")) u_ylab (
    .i_h, .i_v, .i_x0(12'(PLOT_X0 - 64)), .i_y0(12'(top + nrows / 2 - 28)), .i_enable(1'b1),
    .o_on(ylab_on)
  );
  text_generator #(.LEN(9), .TEXT("time (ms)")) u_xlab (
    .i_h, .i_v, .i_x0(12'(PLOT_X0 + PLOT_W / 2 - 36)), .i_y0(12'(bottom + 30)), .i_enable(1'b1),
    .o_on(xlab_on)
  );

  assign o_black = frame || vtick || htick || vlab_on || hlab_on || ylab_on || xlab_on;

endmodule
