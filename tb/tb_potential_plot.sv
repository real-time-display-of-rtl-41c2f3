// Testbench for potential_plot with a partly filled memory (newest time 700: columns 0..700 hold
// data, the rest of the plot stays empty). The potential memory is a dp_ram (read latency 2)
// filled with random walks of the four plot values (0..179); lines are scanned clock by clock.
// Checks o_curve[k] on 25 random rows of each plot (plus rows 0, 89, 179), all columns:
// lit exactly when the row lies between the values of the previous and the current column (the
// first column joined to itself), only in plot k's 180 lines, only in columns 0..700, and never
// with i_enable = 0. Also checks the threshold dots (row 89, dashes of 4 pixels) in o_black.
module tb_potential_plot;
  import neurons_pkg::*;
  import plot_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic [11:0] h = 0, v = 0;
  logic en = 1, have = 1;
  logic [31:0] last = 32'd700;
  logic mem_en, black;
  logic [3:0] curve, label;
  logic [9:0] mem_addr;
  logic [31:0] dout, unused_a;
  logic wen = 0;
  logic [9:0] waddr = 0;
  logic [31:0] wdata = '0;

  dp_ram #(.WIDTH(32), .DEPTH(1024), .LAT_A(1), .LAT_B(2)) mem (.clka(clk), .ena(wen), .wea(wen),
    .addra(waddr), .dina(wdata), .douta(unused_a), .clkb(clk), .enb(mem_en), .addrb(mem_addr), .doutb(dout));
  potential_plot dut (.i_clk(clk), .i_rst(rst), .i_h(h), .i_v(v), .i_enable(en),
    .i_last_time(last), .i_have_data(have), .o_mem_en(mem_en), .o_mem_addr(mem_addr),
    .i_mem_dout(dout), .o_curve(curve), .o_label(label), .o_black(black));

  int val [1024][4];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    #200000000 $display("FAIL watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int lit, dots;
    lit = 0; dots = 0;
    for (int k = 0; k < 4; k++) begin
      val[0][k] = 90;
      for (int a = 1; a < 1024; a++) begin
        val[a][k] = val[a-1][k] + $urandom_range(0, 20) - 10;
        if ($urandom_range(0, 50) == 0) val[a][k] = $urandom_range(0, 179);
        if (val[a][k] < 0) val[a][k] = 0;
        if (val[a][k] > 179) val[a][k] = 179;
      end
    end
    repeat (3) @(negedge clk);
    rst = 0;
    for (int a = 0; a < 1024; a++) begin
      wen = 1; waddr = 10'(a);
      wdata = {8'(val[a][3]), 8'(val[a][2]), 8'(val[a][1]), 8'(val[a][0])};
      @(negedge clk);
    end
    wen = 0;
    for (int pass = 0; pass < 2; pass++) begin
      en = (pass == 0);
      for (int k = 0; k < 4; k++)
        for (int q = 0; q < 28; q++) begin
          int r;
          r = (q == 0) ? 0 : (q == 1) ? 89 : (q == 2) ? 179 : $urandom_range(0, 179);
          if (pass == 1 && q > 3) break;
          v = 12'(POT_TOP + k * POT_PITCH + 179 - r);
          for (int x = 0; x < 1500; x++) begin
            logic [3:0] e;
            h = 12'(x);
            #1;
            e = '0;
            if (en && x >= PLOT_X0 && x <= PLOT_X0 + 700) begin
              int c, p, lo, hi;
              c = val[x - PLOT_X0][k];
              p = (x == PLOT_X0) ? c : val[x - PLOT_X0 - 1][k];
              lo = (c < p) ? c : p; hi = (c < p) ? p : c;
              e[k] = (r >= lo && r <= hi);
            end
            if (e != 0) lit++;
            checks++;
            if (curve != e) begin
              failures++;
              if (failures < 20) $display("FAIL plot %0d row %0d x %0d got %b exp %b", k, r, x, curve, e);
            end
            if (en && r == 89 && x >= PLOT_X0 && x < PLOT_X0 + 1024) begin
              check(black === (x % 8 < 4), $sformatf("threshold dot x %0d", x));
              dots++;
            end
            @(negedge clk);
          end
        end
    end
    check(lit > 2000 && dots > 1000, $sformatf("lit %0d dots %0d", lit, dots));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
