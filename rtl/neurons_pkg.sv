// Constants and conversions for the neuron data shown on screen.
//
// A neuron ID is 18 bits: chip[17:11], virtualisation level[10:8], row[7:4], column[3:0]. It is
// turned into a single row index of the raster plot by
//   id_value = column + NB_COLUMN*(row + NB_ROW*(virt + NB_VIRT*chip)).
// The spike memory is 968 bits wide (11 x 11 x 8 neurons, the most that fit the 1080-line screen);
// the small raster plot shows at most 200 neurons. Membrane potentials arrive as signed 16-bit
// values in units of 10 uV; -8000..-3000 is mapped onto 0..179 with
//   plot_value = ((v + 8000) * 2347) >> 16, then saturated to 0..179.
package neurons_pkg;

  localparam int NB_VIRT_MAX     = 8;
  localparam int MEM_WIDTH       = 968;   // spike memory width (neurons)
  localparam int TIME_DEPTH      = 1024;  // time stamps kept on screen
  localparam int TIME_BITS       = 10;
  localparam int RANGE_SMALL     = 200;   // neurons of the normal raster plot
  localparam int NB_MON          = 4;     // monitored neurons

  localparam int POT_OFFSET      = 8000;  // -(-8000)
  localparam int POT_SHIFT       = 16;
  localparam int POT_MULT        = 2347;  // ~ 2^16 * 179 / 5000
  localparam int PLOT_H          = 180;   // height of one potential plot
  localparam int PLOT_MAX        = PLOT_H - 1;

  typedef struct packed {
    logic [6:0] chip;
    logic [2:0] virt;
    logic [3:0] row;
    logic [3:0] col;
  } neuron_id_t;

  // Monitored neuron as written by the processor (one of the HMNR fields).
  typedef struct packed {
    logic [2:0] virt;
    logic [3:0] row;
    logic [3:0] col;
  } mon_neuron_t;

  function automatic int unsigned id_value(neuron_id_t id, int nb_col, int nb_row, int nb_virt);
    return int'(id.col) + nb_col * (int'(id.row) + nb_row * (int'(id.virt) + nb_virt * int'(id.chip)));
  endfunction

  // Scale a potential (10 uV units) to a plot row, saturated to 0..PLOT_MAX.
  function automatic logic [7:0] pot_to_plot(logic signed [15:0] v);
    logic signed [31:0] p;
    p = ((32'(v) + POT_OFFSET) * POT_MULT) >>> POT_SHIFT;
    if (p < 0) return 8'd0;
    if (p > PLOT_MAX) return 8'(PLOT_MAX);
    return p[7:0];
  endfunction

endpackage
