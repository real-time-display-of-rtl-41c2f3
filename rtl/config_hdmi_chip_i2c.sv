// Programs the ADV7511 HDMI transmitter over I2C after reset.
//
// A read-only table of (register, value) byte pairs is sent one pair per I2C frame to the
// transmitter at address 0x39: the fixed registers, main power-up, the input format, DVI output
// mode and the 12 colour-space-conversion coefficients. ZedBoard feeds the transmitter 16-bit
// YCbCr 4:2:2 (input ID 1, style 3, right justified) and has it convert HDTV YCbCr to RGB; ZC706
// feeds 24-bit RGB 4:4:4 (input ID 0) with the identity matrix. On ZC706 the I2C bus reaches the
// transmitter through a PCA9548 switch (address 0x74), so a first frame writes the channel mask
// 0x02 (channel 1) twice, the sender always carrying two bytes.
//
// Controller states: INIT waits for the sender to be ready; *_START presents address, data and
// start; *_WAIT holds start until the sender leaves ready (the frame has begun); *_CONF waits for
// ready again, then moves on to the next pair or to FINISHED after the last one. Holding start
// through *_WAIT lets the sender, which samples start once per bit period, see it.
// Outputs: I2C lines of the sender and o_done once every register has been written.
module config_hdmi_chip_i2c
  import plot_pkg::*;
#(
  parameter board_e BOARD        = BOARD_ZEDBOARD,
  parameter int     CLK_DIV_LOG2 = 9
) (
  input  logic i_clk,
  input  logic i_rst,
  output logic o_scl,
  output logic o_sda,
  output logic o_sda_release,
  output logic o_done
);
  localparam logic [6:0] ADV7511_ADDR = 7'b0111001;
  localparam logic [6:0] BUS_SW_ADDR  = 7'b1110100;
  localparam logic [7:0] BUS_SW_MASK  = 8'b0000_0010;
  localparam int         NREGS        = 38;

  // Register table: {register address, value}.
  function automatic logic [15:0] reg_pair(int idx);
    logic zb;
    zb = (BOARD == BOARD_ZEDBOARD);
    case (idx)
      // fixed registers
      0:  return 16'h98_03;
      1:  return 16'h9A_E0;
      2:  return 16'h9C_30;
      3:  return 16'h9D_61;
      4:  return 16'hA2_A4;
      5:  return 16'hA3_A4;
      6:  return 16'hE0_D0;
      7:  return 16'hF9_00;
      // main power up
      8:  return 16'h41_10;
      // input mode
      9:  return zb ? 16'h15_01 : 16'h15_00;
      10: return zb ? 16'h16_3C : 16'h16_30;
      11: return 16'h17_00;
      12: return zb ? 16'h48_08 : 16'h48_00;
      // output mode: DVI
      13: return 16'hAF_04;
      // colour space conversion A1..C4
      14: return zb ? 16'h18_E7 : 16'h18_A8;
      15: return zb ? 16'h19_34 : 16'h19_00;
      16: return zb ? 16'h1A_04 : 16'h1A_00;
      17: return zb ? 16'h1B_AD : 16'h1B_00;
      18: return 16'h1C_00;
      19: return 16'h1D_00;
      20: return zb ? 16'h1E_1C : 16'h1E_00;
      21: return zb ? 16'h1F_1B : 16'h1F_00;
      22: return zb ? 16'h20_1D : 16'h20_00;
      23: return zb ? 16'h21_DC : 16'h21_00;
      24: return zb ? 16'h22_04 : 16'h22_08;
      25: return zb ? 16'h23_1D : 16'h23_00;
      26: return zb ? 16'h24_1F : 16'h24_00;
      27: return zb ? 16'h25_24 : 16'h25_00;
      28: return zb ? 16'h26_01 : 16'h26_00;
      29: return zb ? 16'h27_35 : 16'h27_00;
      30: return 16'h28_00;
      31: return 16'h29_00;
      32: return zb ? 16'h2A_04 : 16'h2A_00;
      33: return zb ? 16'h2B_AD : 16'h2B_00;
      34: return zb ? 16'h2C_08 : 16'h2C_08;
      35: return zb ? 16'h2D_7C : 16'h2D_00;
      36: return zb ? 16'h2E_1B : 16'h2E_00;
      default: return zb ? 16'h2F_77 : 16'h2F_00;
    endcase
  endfunction

  typedef enum logic [3:0] {
    S_INIT, S_SW_START, S_SW_WAIT, S_SW_CONF,
    S_HDMI_START, S_HDMI_WAIT, S_HDMI_CONF, S_FINISHED
  } state_e;
  state_e state;

  logic [5:0]  ptr;
  logic        start;
  logic [6:0]  addr;
  logic [15:0] data;
  logic        ready;

  always_ff @(posedge i_clk) begin
    if (i_rst) begin
      state <= S_INIT;
      ptr   <= '0;
    end else begin
      case (state)
        S_INIT:       if (ready) state <= (BOARD == BOARD_ZC706) ? S_SW_START : S_HDMI_START;
        S_SW_START:   state <= S_SW_WAIT;
        S_SW_WAIT:    if (!ready) state <= S_SW_CONF;
        S_SW_CONF:    if (ready) state <= S_HDMI_START;
        S_HDMI_START: state <= S_HDMI_WAIT;
        S_HDMI_WAIT:  if (!ready) state <= S_HDMI_CONF;
        S_HDMI_CONF:
          if (ready) begin
            if (ptr == 6'(NREGS - 1)) state <= S_FINISHED;
            else begin
              ptr   <= ptr + 1'b1;
              state <= S_HDMI_START;
            end
          end
        default: state <= S_FINISHED;
      endcase
    end
  end

  always_comb begin
    start = 1'b0;
    addr  = ADV7511_ADDR;
    data  = reg_pair(int'(ptr));
    case (state)
      S_SW_START, S_SW_WAIT: begin
        start = 1'b1;
        addr  = BUS_SW_ADDR;
        data  = {BUS_SW_MASK, BUS_SW_MASK};
      end
      S_SW_CONF: begin
        addr = BUS_SW_ADDR;
        data = {BUS_SW_MASK, BUS_SW_MASK};
      end
      S_HDMI_START, S_HDMI_WAIT: start = 1'b1;
      default: ;
    endcase
  end

  assign o_done = (state == S_FINISHED);

  i2c_sender #(.CLK_DIV_LOG2(CLK_DIV_LOG2)) u_i2c_sender (
    .i_clk, .i_rst,
    .i_start       (start),
    .i_addr        (addr),
    .i_data        (data),
    .o_ready       (ready),
    .o_scl, .o_sda, .o_sda_release
  );

endmodule
