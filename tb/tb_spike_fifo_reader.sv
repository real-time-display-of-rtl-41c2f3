// Testbench for spike_fifo_reader (5 columns x 5 rows x 8 virtualisation levels = 200 neurons).
//
// An emulator model alternates distribution phases (60 clocks, i_ph_dist high) and execution
// phases (40 clocks) for 1100 time steps, so the 1024-entry memory wraps. In the first 24 clocks of
// each distribution phase it pushes 0..8 random spike IDs (chip 0, valid virtualisation level,
// row and column; some IDs repeat), remembered per time step. A frame-end request is issued
// every 700..2500 clocks, sometimes during a distribution phase. The spike memory is modelled
// by an array that takes the reader's write port.
// Checks on each transfer-done pulse: the reported newest time is the latest started phase,
// or the one before if the new phase had not begun its column when the transfer started; every
// column of the last 32 time steps older than the newest equals the expected spike set at
// address t mod 1024; the newest column holds only spikes of that step. Transfer length: 37
// clocks from the frame-end request to done when the reader was idle, at most 80 otherwise
// (the request waits until the spikes already in the FIFO are stored). At the end: the time
// counter equals the number of finished phases, o_phase_end pulsed once per phase, all pushed
// spikes were read.
module tb_spike_fifo_reader;
  import neurons_pkg::*;
  localparam int NC = 5, NR = 5, NV = 8;
  logic clk = 1'b0, rst = 1'b1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic ph = 0, push = 0, frame_end = 0;
  logic [17:0] pdata = '0, dout;
  logic valid, empty, ready;
  int count, pops;
  logic mem_en, mem_we, phase_end, xfer_done, have_data;
  logic [9:0] mem_addr;
  logic [967:0] mem_din;
  logic [31:0] otime, last_time;

  fifo_model #(.WIDTH(18)) fifo (.i_clk(clk), .i_rst(rst), .i_push(push), .i_data(pdata),
    .i_ready(ready), .o_dout(dout), .o_valid(valid), .o_empty(empty), .o_count(count), .o_pops(pops));

  spike_fifo_reader #(.NB_COLUMN(NC), .NB_ROW(NR), .NB_VIRT(NV)) dut (
    .i_clk(clk), .i_rst(rst), .i_ph_dist(ph), .i_fifo_dout(dout), .i_fifo_empty(empty),
    .i_fifo_valid(valid), .o_fifo_ready(ready), .i_frame_end(frame_end),
    .o_mem_en(mem_en), .o_mem_we(mem_we), .o_mem_addr(mem_addr), .o_mem_din(mem_din),
    .o_time(otime), .o_phase_end(phase_end), .o_xfer_done(xfer_done),
    .o_last_time(last_time), .o_have_data(have_data));

  logic [967:0] mem [1024];
  logic [967:0] expected [1200];
  int started = 0, pushed = 0, phase_ends = 0, transfers = 0;
  int fe_clock = -1, clk_n = 0;
  bit fe_idle;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  always @(posedge clk) begin
    clk_n++;
    if (!rst && mem_en && mem_we) mem[mem_addr] <= mem_din;
    if (!rst && phase_end) phase_ends++;
    if (!rst && frame_end) fe_clock = clk_n;
    if (!rst && xfer_done) begin
      int newest;
      transfers++;
      newest = int'(last_time);
      check(have_data && (newest === started - 1 || newest === started - 2),
            $sformatf("newest time %0d, phases started %0d", newest, started));
      if (fe_idle) check(clk_n - fe_clock === 37, $sformatf("transfer latency %0d", clk_n - fe_clock));
      else         check(clk_n - fe_clock <= 80, $sformatf("transfer latency %0d (busy)", clk_n - fe_clock));
      for (int t = newest - 31; t < newest; t++)
        if (t >= 0) check(mem[t % 1024] === expected[t], $sformatf("column t=%0d", t));
      if (newest >= 0) check((mem[newest % 1024] & ~expected[newest]) === '0, "newest column subset");
    end
  end

  initial begin
    #20000000 $display("FAIL watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // frame-end requests
  initial begin
    @(negedge rst);
    forever begin
      repeat ($urandom_range(700, 2500)) @(negedge clk);
      fe_idle = !ph && !dut_busy();
      frame_end = 1;
      @(negedge clk); frame_end = 0;
    end
  end

  function automatic bit dut_busy();
    return dut.state != dut.IDLE;
  endfunction

  initial begin
    for (int t = 0; t < 1200; t++) expected[t] = '0;
    for (int a = 0; a < 1024; a++) mem[a] = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (10) @(negedge clk);
    check(otime === 0 && !have_data, "after reset");
    for (int t = 0; t < 1100; t++) begin
      int n;
      ph = 1; started++;
      n = $urandom_range(0, 8);
      for (int c = 0; c < 60; c++) begin
        @(negedge clk);
        push = 0;
        if (c < 24 && c % 3 == 0 && c / 3 < n) begin
          neuron_id_t id;
          id.chip = '0; id.virt = 3'($urandom_range(0, NV - 1));
          id.row = 4'($urandom_range(0, NR - 1)); id.col = 4'($urandom_range(0, NC - 1));
          pdata = 18'(id); push = 1; pushed++;
          expected[t][id_value(id, NC, NR, NV)] = 1'b1;
        end
        if (c === 1) check(otime === 32'(t), $sformatf("time %0d exp %0d", otime, t));
      end
      @(negedge clk); push = 0; ph = 0;
      repeat (39) @(negedge clk);
    end
    repeat (3000) @(negedge clk);
    check(phase_ends === 1100 && otime === 1100, $sformatf("phase ends %0d time %0d", phase_ends, otime));
    check(pops === pushed && count === 0, $sformatf("read %0d of %0d", pops, pushed));
    check(transfers > 40, $sformatf("transfers %0d", transfers));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
