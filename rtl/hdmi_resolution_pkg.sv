// Video timing for the three supported screen resolutions.
//
// The counters of this design start at the top-left visible pixel, so a line is laid out as
// visible area, front porch, sync pulse, back porch (the porch that normally precedes the picture
// is moved to the end). Porch, sync widths and sync polarities follow the usual VESA/CEA numbers
// for 1280x720, 1920x1080 and 1680x1050 at 60 Hz. With a rounded 150 MHz pixel clock the
// 1920x1080 frame repeats at about 60.6 Hz. The default resolution is 1920x1080.
package hdmi_resolution_pkg;

  typedef enum logic [1:0] {
    RES_1280X720  = 2'd0,
    RES_1920X1080 = 2'd1,
    RES_1680X1050 = 2'd2
  } res_e;

  typedef struct packed {
    logic [11:0] h_visible;
    logic [11:0] h_front;
    logic [11:0] h_sync;
    logic [11:0] h_back;
    logic        h_pol;     // 1 = positive sync pulse
    logic [11:0] v_visible;
    logic [11:0] v_front;
    logic [11:0] v_sync;
    logic [11:0] v_back;
    logic        v_pol;
  } timing_t;

  function automatic timing_t res_timing(res_e res);
    timing_t t;
    case (res)
      RES_1280X720:  t = '{h_visible: 12'd1280, h_front: 12'd110, h_sync: 12'd40,  h_back: 12'd220, h_pol: 1'b1,
                          v_visible: 12'd720,  v_front: 12'd5,   v_sync: 12'd5,   v_back: 12'd20,  v_pol: 1'b1};
      RES_1680X1050: t = '{h_visible: 12'd1680, h_front: 12'd104, h_sync: 12'd184, h_back: 12'd288, h_pol: 1'b0,
                          v_visible: 12'd1050, v_front: 12'd1,   v_sync: 12'd3,   v_back: 12'd33,  v_pol: 1'b1};
      default:       t = '{h_visible: 12'd1920, h_front: 12'd88,  h_sync: 12'd44,  h_back: 12'd148, h_pol: 1'b1,
                          v_visible: 12'd1080, v_front: 12'd4,   v_sync: 12'd5,   v_back: 12'd36,  v_pol: 1'b1};
    endcase
    return t;
  endfunction

  function automatic logic [11:0] h_total(res_e res);
    timing_t t = res_timing(res);
    return t.h_visible + t.h_front + t.h_sync + t.h_back;
  endfunction

  function automatic logic [11:0] v_total(res_e res);
    timing_t t = res_timing(res);
    return t.v_visible + t.v_front + t.v_sync + t.v_back;
  endfunction

endpackage
