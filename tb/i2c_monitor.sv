// Test helper: passive I2C bus monitor for write frames of three bytes.
//
// Watches SCL and the effective SDA level (released SDA reads 1: pull-up, no slave answers).
// START = SDA falling while SCL high, STOP = SDA rising while SCL high; between them every SCL
// rising edge samples one bit. After STOP it pulses o_frame for one clock with the decoded
// 7-bit address, R/W bit, both data bytes, the number of bits seen, and o_ack_ok = SDA was
// released in the three acknowledge slots and driven in all other bits.
// Sampling uses the bus clock directly (lines are registered by the master on the same clock).
module i2c_monitor (
  input  logic        i_clk,
  input  logic        i_rst,
  input  logic        i_scl,
  input  logic        i_sda,
  input  logic        i_sda_release,
  output logic        o_frame,
  output logic [6:0]  o_addr,
  output logic        o_rw,
  output logic [15:0] o_data,
  output logic [5:0]  o_nbits,
  output logic        o_ack_ok,
  output logic        o_start_seen
);
  logic        scl_q, sda_q, in_frame, ack_ok;
  logic [31:0] bits;
  logic [5:0]  n;
  logic        sda_eff;
  assign sda_eff = i_sda_release ? 1'b1 : i_sda;

  always_ff @(posedge i_clk) begin
    if (i_rst) begin
      scl_q <= 1'b1; sda_q <= 1'b1; in_frame <= 1'b0; bits <= '0; n <= '0; ack_ok <= 1'b1;
      o_frame <= 1'b0; o_addr <= '0; o_rw <= 1'b0; o_data <= '0; o_nbits <= '0; o_ack_ok <= 1'b0;
      o_start_seen <= 1'b0;
    end else begin
      scl_q   <= i_scl;
      sda_q   <= sda_eff;
      o_frame <= 1'b0;
      if (scl_q && i_scl && sda_q && !sda_eff) begin          // START
        in_frame <= 1'b1; n <= '0; bits <= '0; ack_ok <= 1'b1; o_start_seen <= 1'b1;
      end else if (scl_q && i_scl && !sda_q && sda_eff && in_frame) begin   // STOP
        in_frame <= 1'b0;
        o_frame  <= 1'b1;
        o_nbits  <= n;
        o_addr   <= bits[27:21];
        o_rw     <= bits[20];
        o_data   <= {bits[18:11], bits[9:2]};
        o_ack_ok <= ack_ok;
      end else if (in_frame && !scl_q && i_scl) begin          // data bit
        bits <= {bits[30:0], sda_eff};
        n    <= n + 1'b1;
        if ((n == 6'd8 || n == 6'd17 || n == 6'd26) != i_sda_release) ack_ok <= 1'b0;
      end
    end
  end
endmodule
