// Write-only I2C master that sends one frame: START, 7-bit address, W, ACK slot, two data bytes
// each followed by an ACK slot, STOP (29 bit periods).
//
// How it works: five 29-bit shift registers hold the whole frame and are loaded in one go.
// data_sr holds the SDA level of every bit period (0 for START and STOP, 1 in ACK slots),
// ack_sr marks the ACK slots in which SDA is released, busy_sr counts the frame, and two
// registers give the SCL level in the first and in the last quarter of each bit period (SCL is
// always high in the two middle quarters). Shifting fills data_sr and both quarter registers
// with 1 and ack_sr and busy_sr with 0, so the lines return to idle high with SDA driven.
// A bit period is 2^CLK_DIV_LOG2 clock cycles (512 at 150 MHz: 293 kbit/s); the quarter
// index is the top two bits of a free-running divider, standing for the two divided clocks of
// the original scheme (a data clock and one twice as fast) as clock enables on one clock.
//
// Interface: i_start is sampled at the start of a bit period while o_ready is 1; i_addr and
// i_data ({first byte, second byte}) are sampled at the following bit period (set state).
// o_ready drops for the set state and the 29 shifting periods. o_sda_release = 1 means SDA
// must be left floating; otherwise the pin carries o_sda. SCL and SDA are registered.
// The slave's acknowledge is not checked.
module i2c_sender #(
  parameter int CLK_DIV_LOG2 = 9
) (
  input  logic        i_clk,
  input  logic        i_rst,
  input  logic        i_start,
  input  logic [6:0]  i_addr,
  input  logic [15:0] i_data,
  output logic        o_ready,
  output logic        o_scl,
  output logic        o_sda,
  output logic        o_sda_release
);
  localparam int NBITS = 29;

  typedef enum logic [1:0] { ST_READY, ST_SET, ST_SHIFT } state_e;
  state_e state;

  logic [CLK_DIV_LOG2-1:0] div;
  logic [NBITS-1:0] data_sr, ack_sr, busy_sr, first_q_sr, last_q_sr;
  logic [1:0] quarter;
  logic       tick;   // last clock of a bit period: the data clock rises next

  assign quarter = div[CLK_DIV_LOG2-1 -: 2];
  assign tick    = &div;

  always_ff @(posedge i_clk) begin
    if (i_rst) begin
      div        <= '0;
      state      <= ST_READY;
      data_sr    <= '1;
      ack_sr     <= '0;
      busy_sr    <= '0;
      first_q_sr <= '1;
      last_q_sr  <= '1;
    end else begin
      div <= div + 1'b1;
      if (tick) begin
        case (state)
          ST_READY: if (i_start) state <= ST_SET;
          ST_SET: begin
            data_sr    <= {1'b0, i_addr, 1'b0, 1'b1, i_data[15:8], 1'b1, i_data[7:0], 1'b1, 1'b0};
            ack_sr     <= {1'b0, 7'b0,   1'b0, 1'b1, 8'b0,         1'b1, 8'b0,        1'b1, 1'b0};
            busy_sr    <= '1;
            first_q_sr <= {1'b1, {(NBITS-1){1'b0}}};
            last_q_sr  <= {{(NBITS-1){1'b0}}, 1'b1};
            state      <= ST_SHIFT;
          end
          ST_SHIFT: begin
            data_sr    <= {data_sr[NBITS-2:0], 1'b1};
            ack_sr     <= {ack_sr[NBITS-2:0], 1'b0};
            busy_sr    <= {busy_sr[NBITS-2:0], 1'b0};
            first_q_sr <= {first_q_sr[NBITS-2:0], 1'b1};
            last_q_sr  <= {last_q_sr[NBITS-2:0], 1'b1};
            if (!busy_sr[NBITS-2]) state <= ST_READY;
          end
          default: state <= ST_READY;
        endcase
      end
    end
  end

  // Outputs registered one clock after the bit-period boundary.
  always_ff @(posedge i_clk) begin
    if (i_rst) begin
      o_scl         <= 1'b1;
      o_sda         <= 1'b1;
      o_sda_release <= 1'b0;
    end else begin
      case (quarter)
        2'd0:    o_scl <= first_q_sr[NBITS-1];
        2'd3:    o_scl <= last_q_sr[NBITS-1];
        default: o_scl <= 1'b1;
      endcase
      o_sda         <= data_sr[NBITS-1];
      o_sda_release <= ack_sr[NBITS-1];
    end
  end

  assign o_ready = (state == ST_READY);

endmodule
