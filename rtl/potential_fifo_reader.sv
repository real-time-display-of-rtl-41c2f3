// Moves membrane potentials of the four monitored neurons from the emulator's potential FIFO
// into the potential memory, one 32-bit word per time step.
//
// Runs on the emulator clock. During the distribution phase each FIFO word is a signed 16-bit
// potential in 10 uV units. States:
//   IDLE           waits for the distribution phase (to FIFO_READ or FIFO_EMPTY);
//   FIFO_EMPTY     waits for data or for the end of the phase;
//   FIFO_READ      raises o_fifo_ready until i_fifo_valid;
//   VALUE_CONVERT  p = (v + 8000) * 2347, one clock;
//   VALUE_SAT      p >> 16 saturated to 0..179, one clock;
//   MEM_WRITE      the first three values of a phase are kept in a 24-bit register, the fourth
//                  completes the word {n3, n2, n1, n0} (neuron k in bits 8k+7..8k), written at
//                  address time mod 1024.
// The value count restarts with every distribution phase. A phase that delivers fewer than four
// values writes nothing. i_time is the time counter of the spike reader.
module potential_fifo_reader
  import neurons_pkg::*;
(
  input  logic        i_clk,
  input  logic        i_rst,
  input  logic        i_ph_dist,
  input  logic [31:0] i_time,
  input  logic [15:0] i_fifo_dout,
  input  logic        i_fifo_empty,
  input  logic        i_fifo_valid,
  output logic        o_fifo_ready,
  output logic        o_mem_en,
  output logic        o_mem_we,
  output logic [9:0]  o_mem_addr,
  output logic [31:0] o_mem_din
);
  typedef enum logic [2:0] {
    IDLE, FIFO_EMPTY, FIFO_READ, VALUE_CONVERT, VALUE_SAT, MEM_WRITE
  } state_e;
  state_e state;

  logic signed [15:0] v;
  logic signed [31:0] prod;
  logic [7:0]         val;
  logic [23:0]        held;
  logic [1:0]         cnt;
  logic [9:0]         addr;

  always_ff @(posedge i_clk) begin
    if (i_rst) begin
      state <= IDLE;
      v     <= '0;
      prod  <= '0;
      val   <= '0;
      held  <= '0;
      cnt   <= '0;
      addr  <= '0;
    end else begin
      case (state)
        IDLE:
          if (i_ph_dist) begin
            cnt   <= '0;
            addr  <= i_time[9:0];
            state <= i_fifo_empty ? FIFO_EMPTY : FIFO_READ;
          end
        FIFO_EMPTY:
          if (!i_ph_dist) state <= IDLE;
          else if (!i_fifo_empty) state <= FIFO_READ;
        FIFO_READ:
          if (i_fifo_valid) begin
            v     <= i_fifo_dout;
            state <= VALUE_CONVERT;
          end
        VALUE_CONVERT: begin
          prod  <= (32'(v) + POT_OFFSET) * POT_MULT;
          state <= VALUE_SAT;
        end
        VALUE_SAT: begin
          if (prod < 0)                                     val <= 8'd0;
          else if ((prod >>> POT_SHIFT) > PLOT_MAX)         val <= 8'(PLOT_MAX);
          else                                              val <= 8'(prod >>> POT_SHIFT);
          state <= MEM_WRITE;
        end
        MEM_WRITE: begin
          held  <= {val, held[23:8]};
          cnt   <= cnt + 1'b1;
          state <= i_fifo_empty ? FIFO_EMPTY : FIFO_READ;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign o_fifo_ready = (state == FIFO_READ);
  assign o_mem_en     = (state == MEM_WRITE) && (cnt == 2'd3);
  assign o_mem_we     = o_mem_en;
  assign o_mem_addr   = addr;
  assign o_mem_din    = {val, held};

endmodule
