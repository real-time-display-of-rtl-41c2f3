// Testbench for raster_plot with a 968-neuron network (11 x 11 x 8) and a full memory
// (newest time 1500, so the plot starts at the column after the newest one, address 477).
// The spike memory is a dp_ram (read latency 2) filled through its write port with sparse
// random spikes; a reference copy is kept here. Lines are scanned clock by clock as the
// position counters do.
// Checks on 30 random neurons per mode, all 1024 columns: normal mode shows neurons 0..199 one
// line each from line 40 (neuron 199 on top); extended mode shows all 968 neurons one line each
// ending at line 1000; a pixel is lit when the neuron spikes in that column, in the neighbouring
// columns, or a neighbouring neuron spikes in that column (plus sign). Also: nothing lit right of
// the plot, and with i_have_data = 0 nothing lit at all.
module tb_raster_plot;
  import neurons_pkg::*;
  import plot_pkg::*;
  localparam int N = 968;
  logic clk = 1'b0, rst = 1'b1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic [11:0] h = 0, v = 0;
  logic ext = 0, have = 1;
  logic [31:0] last = 32'd1500;
  logic mem_en, curve, black;
  logic [9:0] mem_addr;
  logic [967:0] dout;
  logic wen = 0;
  logic [9:0] waddr = 0;
  logic [967:0] wdata = '0, unused_a;

  dp_ram #(.WIDTH(968), .DEPTH(1024), .LAT_A(1), .LAT_B(2)) mem (.clka(clk), .ena(wen), .wea(wen),
    .addra(waddr), .dina(wdata), .douta(unused_a), .clkb(clk), .enb(mem_en), .addrb(mem_addr), .doutb(dout));
  raster_plot #(.NB_NEURONS(N)) dut (.i_clk(clk), .i_rst(rst), .i_h(h), .i_v(v), .i_extended(ext),
    .i_last_time(last), .i_have_data(have), .o_mem_en(mem_en), .o_mem_addr(mem_addr),
    .i_mem_dout(dout), .o_curve(curve), .o_black(black));

  logic [967:0] ref_mem [1024];

  function automatic bit s(int col, int n, int nmax);
    if (col < 0 || col > 1023 || n < 0 || n > nmax) return 0;
    return ref_mem[(477 + col) % 1024][n];
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    #200000000 $display("FAIL watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int lit;
    lit = 0;
    for (int a = 0; a < 1024; a++) begin
      ref_mem[a] = '0;
      for (int k = 0; k < 12; k++) ref_mem[a][$urandom_range(0, N - 1)] = 1'b1;
      if (a % 3 == 0) ref_mem[a][a % 200] = 1'b1;
    end
    repeat (3) @(negedge clk);
    rst = 0;
    for (int a = 0; a < 1024; a++) begin
      wen = 1; waddr = 10'(a); wdata = ref_mem[a];
      @(negedge clk);
    end
    wen = 0;
    for (int m = 0; m < 3; m++) begin
      int nmax, top;
      ext  = (m == 1);
      have = (m != 2);
      nmax = ext ? N - 1 : 199;
      top  = ext ? EXT_BOTTOM + 1 - N : RASTER_TOP;
      for (int q = 0; q < 30; q++) begin
        int n;
        n = (q == 0) ? 0 : (q == 1) ? nmax : $urandom_range(0, nmax);
        v = 12'(top + nmax - n);
        for (int x = 0; x < 1500; x++) begin
          bit e;
          h = 12'(x);
          #1;
          if (x >= PLOT_X0 && x < PLOT_X0 + 1024) begin
            int c;
            c = x - PLOT_X0;
            e = have && (s(c, n, nmax) || s(c, n - 1, nmax) || s(c, n + 1, nmax)
                         || s(c - 1, n, nmax) || s(c + 1, n, nmax));
          end else e = 0;
          if (e) lit++;
          checks++;
          if (curve !== e) begin
            failures++;
            if (failures < 20) $display("FAIL mode %0d neuron %0d x %0d got %0d", m, n, x, curve);
          end
          @(negedge clk);
        end
      end
    end
    check(lit > 1000, $sformatf("lit pixels %0d", lit));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
