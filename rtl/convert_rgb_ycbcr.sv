// RGB (full range 0..255) to HDTV YCbCr, as a two-stage pipeline built from shifts and adds.
//
//   Y  = 16  + ( 47 R + 157 G +  16 B) >> 8
//   Cb = 128 + (-26 R -  87 G + 112 B) >> 8
//   Cr = 128 + (112 R - 102 G -  10 B) >> 8
// The coefficients are the BT.709 ones (0.183, 0.614, 0.062, ...) times 256, rounded, each
// written as a short sum of powers of two, e.g. 47 = 2^5 + 2^4 - 2^0. Stage 1 forms the nine
// products, stage 2 adds them per component, drops 8 bits (arithmetic shift) and adds the offset.
// Data enable and syncs travel through two matching registers, so all outputs lag the inputs by
// exactly two clocks.
module convert_rgb_ycbcr (
  input  logic       i_clk,
  input  logic [7:0] i_r,
  input  logic [7:0] i_g,
  input  logic [7:0] i_b,
  input  logic       i_de,
  input  logic       i_hsync,
  input  logic       i_vsync,
  output logic [7:0] o_y,
  output logic [7:0] o_cb,
  output logic [7:0] o_cr,
  output logic       o_de,
  output logic       o_hsync,
  output logic       o_vsync
);
  typedef logic signed [17:0] prod_t;

  prod_t r, g, b;
  assign r = prod_t'({10'b0, i_r});
  assign g = prod_t'({10'b0, i_g});
  assign b = prod_t'({10'b0, i_b});

  // stage 1: constant multiplications
  prod_t y_r, y_g, y_b, cb_r, cb_g, cb_b, cr_r, cr_g, cr_b;
  logic  de1, hs1, vs1;

  always_ff @(posedge i_clk) begin
    y_r  <=  (r <<< 5) + (r <<< 4) - r;                  //  47 R
    y_g  <=  (g <<< 7) + (g <<< 5) - (g <<< 2) + g;      // 157 G
    y_b  <=  (b <<< 4);                                  //  16 B
    cb_r <= -((r <<< 4) + (r <<< 3) + (r <<< 1));        // -26 R
    cb_g <= -((g <<< 6) + (g <<< 4) + (g <<< 3) - g);    // -87 G
    cb_b <=  (b <<< 7) - (b <<< 4);                      // 112 B
    cr_r <=  (r <<< 7) - (r <<< 4);                      // 112 R
    cr_g <= -((g <<< 6) + (g <<< 5) + (g <<< 2) + (g <<< 1)); // -102 G
    cr_b <= -((b <<< 3) + (b <<< 1));                    // -10 B
    de1  <= i_de;
    hs1  <= i_hsync;
    vs1  <= i_vsync;
  end

  // stage 2: sums, divide by 256, offsets
  prod_t y_s, cb_s, cr_s;
  assign y_s  = (y_r + y_g + y_b) >>> 8;
  assign cb_s = (cb_r + cb_g + cb_b) >>> 8;
  assign cr_s = (cr_r + cr_g + cr_b) >>> 8;

  always_ff @(posedge i_clk) begin
    o_y     <= 8'(y_s + 18'sd16);
    o_cb    <= 8'(cb_s + 18'sd128);
    o_cr    <= 8'(cr_s + 18'sd128);
    o_de    <= de1;
    o_hsync <= hs1;
    o_vsync <= vs1;
  end

endmodule
