// Moves spike events from the emulator's spike FIFO into the raster-plot memory.
//
// Runs on the emulator (HEENS) clock. A 32-bit time counter counts completed working phases and
// advances when the distribution phase (i_ph_dist) ends. Each distribution phase owns one column
// of a 32-entry buffer, entry time mod 32:
//   IDLE           waits for the start of a distribution phase;
//   MEM_ERASE      clears the column;
//   FIFO_EMPTY     waits for data, for the end of the phase, or for a frame-end request;
//   FIFO_READ      raises o_fifo_ready; the emulator answers with a read, i_fifo_valid marks
//                  the 18-bit neuron ID;
//   ID_VALUE_CALC  id = col + NB_COLUMN*(row + NB_ROW*(virt + NB_VIRT*chip)), one clock;
//   MEM_WRITE      read-modify-write: the column read from the buffer gets bit id set.
// At the end of each visible frame (i_frame_end, already in this clock domain) the whole buffer
// is copied into the spike memory (WAIT_BEFORE_TRANSFER, two clocks, then TRANSFER_WRITE, one
// entry per clock), entry k going to address t mod 1024 of the latest time t with t mod 32 = k.
// o_xfer_done then reports the time of the newest column, so the screen always draws a column
// set that is complete and does not change during a frame. A frame-end request is accepted in
// IDLE as well as in FIFO_EMPTY, so a frame ending during the execution phase is served at once.
// Neuron IDs at or above MEM_WIDTH are dropped.
module spike_fifo_reader
  import neurons_pkg::*;
#(
  parameter int NB_COLUMN = 5,
  parameter int NB_ROW    = 5,
  parameter int NB_VIRT   = 8,
  parameter int MEM_W     = MEM_WIDTH,
  parameter int BUF_DEPTH = 32
) (
  input  logic             i_clk,
  input  logic             i_rst,
  input  logic             i_ph_dist,
  // spike FIFO read side
  input  logic [17:0]      i_fifo_dout,
  input  logic             i_fifo_empty,
  input  logic             i_fifo_valid,
  output logic             o_fifo_ready,
  // end of visible frame, pixel domain event already synchronised
  input  logic             i_frame_end,
  // spike memory, port A
  output logic             o_mem_en,
  output logic             o_mem_we,
  output logic [9:0]       o_mem_addr,
  output logic [MEM_W-1:0] o_mem_din,
  // status
  output logic [31:0]      o_time,
  output logic             o_phase_end,
  output logic             o_xfer_done,
  output logic [31:0]      o_last_time,
  output logic             o_have_data
);
  localparam int BAW = $clog2(BUF_DEPTH);

  typedef enum logic [2:0] {
    IDLE, MEM_ERASE, FIFO_EMPTY, FIFO_READ, ID_VALUE_CALC, MEM_WRITE,
    WAIT_BEFORE_TRANSFER, TRANSFER_WRITE
  } state_e;
  state_e state;

  logic             dist_d, pending, start_pend;
  logic [31:0]      last_t;        // time of the newest buffer column
  logic             have_data;
  neuron_id_t       id_reg;
  logic [31:0]      id_val;
  logic [BAW:0]     xk;            // transfer counter, one step ahead of the write
  logic [1:0]       wait_cnt;

  // buffer
  logic             buf_en, buf_we;
  logic [BAW-1:0]   buf_addr;
  logic [MEM_W-1:0] buf_din, buf_dout;

  dp_ram #(.WIDTH(MEM_W), .DEPTH(BUF_DEPTH), .LAT_A(1), .LAT_B(1)) u_buffer (
    .clka(i_clk), .ena(buf_en), .wea(buf_we), .addra(buf_addr), .dina(buf_din), .douta(buf_dout),
    .clkb(i_clk), .enb(1'b0), .addrb('0), .doutb()
  );

  assign o_phase_end = dist_d & ~i_ph_dist;

  always_ff @(posedge i_clk) begin
    if (i_rst) begin
      state     <= IDLE;
      dist_d    <= 1'b0;
      pending   <= 1'b0;
      start_pend <= 1'b0;
      o_time    <= '0;
      last_t    <= '0;
      have_data <= 1'b0;
      id_reg    <= '0;
      id_val    <= '0;
      xk        <= '0;
      wait_cnt  <= '0;
    end else begin
      dist_d <= i_ph_dist;
      if (o_phase_end) o_time <= o_time + 1'b1;
      if (i_frame_end) pending <= 1'b1;
      if (i_ph_dist && !dist_d) start_pend <= 1'b1;

      case (state)
        IDLE:
          if (start_pend) state <= MEM_ERASE;
          else if (pending) begin
            state    <= WAIT_BEFORE_TRANSFER;
            wait_cnt <= '0;
          end
        MEM_ERASE: begin
          start_pend <= 1'b0;
          last_t    <= o_time;
          have_data <= 1'b1;
          state     <= i_fifo_empty ? FIFO_EMPTY : FIFO_READ;
        end
        FIFO_EMPTY:
          if (pending) begin
            state    <= WAIT_BEFORE_TRANSFER;
            wait_cnt <= '0;
          end else if (start_pend) state <= MEM_ERASE;
          else if (!i_ph_dist) state <= IDLE;
          else if (!i_fifo_empty) state <= FIFO_READ;
        FIFO_READ:
          if (i_fifo_valid) begin
            id_reg <= neuron_id_t'(i_fifo_dout);
            state  <= ID_VALUE_CALC;
          end
        ID_VALUE_CALC: begin
          id_val <= id_value(id_reg, NB_COLUMN, NB_ROW, NB_VIRT);
          state  <= MEM_WRITE;
        end
        MEM_WRITE: state <= i_fifo_empty ? FIFO_EMPTY : FIFO_READ;
        WAIT_BEFORE_TRANSFER: begin
          pending  <= 1'b0;
          wait_cnt <= wait_cnt + 1'b1;
          xk       <= '0;
          if (wait_cnt == 2'd1) state <= TRANSFER_WRITE;
        end
        TRANSFER_WRITE: begin
          xk <= xk + 1'b1;
          if (xk == (BAW+1)'(BUF_DEPTH)) state <= FIFO_EMPTY;
        end
        default: state <= IDLE;
      endcase
    end
  end

  // buffer port
  always_comb begin
    buf_en   = 1'b1;
    buf_we   = 1'b0;
    buf_addr = BAW'(last_t);
    buf_din  = buf_dout;
    case (state)
      MEM_ERASE: begin
        buf_we   = 1'b1;
        buf_addr = BAW'(o_time);
        buf_din  = '0;
      end
      MEM_WRITE: begin
        buf_we = (id_val < MEM_W);
        buf_din = buf_dout | (MEM_W'(1) << id_val);
      end
      WAIT_BEFORE_TRANSFER, TRANSFER_WRITE: buf_addr = BAW'(xk);
      default: ;
    endcase
  end

  // spike memory port: buffer entry xk-1 arrives one clock after its address
  logic [BAW-1:0] wk, dk;
  assign wk = BAW'(xk - 1'b1);
  assign dk = BAW'(last_t) - wk;

  assign o_mem_en   = (state == TRANSFER_WRITE) && (xk != 0);
  assign o_mem_we   = o_mem_en;
  assign o_mem_addr = 10'(last_t) - 10'(dk);
  assign o_mem_din  = buf_dout;

  assign o_fifo_ready = (state == FIFO_READ);

  // report the newest complete column once the transfer has finished
  always_ff @(posedge i_clk) begin
    if (i_rst) o_xfer_done <= 1'b0;
    else       o_xfer_done <= (state == TRANSFER_WRITE) && (xk == (BAW+1)'(BUF_DEPTH));
  end
  assign o_last_time = last_t;
  assign o_have_data = have_data;

endmodule
