// Testbench for potential_fifo_reader.
//
// An emulator model runs 1100 phases (distribution 50 clocks, execution 30 clocks) with a time
// counter advanced at the end of each distribution phase. In each distribution phase it pushes
// the potentials of the four monitored neurons (signed 16-bit, 10 uV units): random values in
// -12000..+12000 plus corner values (-8000, -8001, thresholds of the saturation at 0 and 179,
// -32768, 32767); about one phase in 20 delivers only 3 values and must write nothing.
// Expected plot value: clamp(floor((v + 8000) * 2347 / 65536), 0, 179), computed here with
// 64-bit integers. Checks every memory write: address = time mod 1024, one write per complete
// phase, word = {n3, n2, n1, n0}.
module tb_potential_fifo_reader;
  logic clk = 1'b0, rst = 1'b1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic ph = 0, push = 0;
  logic [15:0] pdata = '0, dout;
  logic valid, empty, ready;
  int count, pops;
  logic mem_en, mem_we;
  logic [9:0] mem_addr;
  logic [31:0] mem_din;
  logic [31:0] tcount = '0;

  fifo_model #(.WIDTH(16)) fifo (.i_clk(clk), .i_rst(rst), .i_push(push), .i_data(pdata),
    .i_ready(ready), .o_dout(dout), .o_valid(valid), .o_empty(empty), .o_count(count), .o_pops(pops));

  potential_fifo_reader dut (.i_clk(clk), .i_rst(rst), .i_ph_dist(ph), .i_time(tcount),
    .i_fifo_dout(dout), .i_fifo_empty(empty), .i_fifo_valid(valid), .o_fifo_ready(ready),
    .o_mem_en(mem_en), .o_mem_we(mem_we), .o_mem_addr(mem_addr), .o_mem_din(mem_din));

  function automatic logic [7:0] scale(int v);
    longint p;
    p = (longint'(v) + 8000) * 2347;
    p = (p >= 0) ? p / 65536 : -1;
    if (p < 0) return 8'd0;
    if (p > 179) return 8'd179;
    return 8'(p);
  endfunction

  logic [31:0] exp_word [1100];
  bit          exp_valid [1100];
  int writes = 0, exp_writes = 0, sat_lo = 0, sat_hi = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  always @(posedge clk) begin
    if (!rst && mem_en && mem_we) begin
      int t;
      writes++;
      t = int'(tcount);
      check(mem_addr === 10'(t), $sformatf("address %0d at time %0d", mem_addr, t));
      check(exp_valid[t], $sformatf("write in phase %0d with fewer than 4 values", t));
      check(mem_din === exp_word[t], $sformatf("time %0d word %h exp %h", t, mem_din, exp_word[t]));
    end
  end

  initial begin
    #20000000 $display("FAIL watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    localparam int CORNER [10] = '{-8000, -8001, -7973, -7972, 3968, 3969, 4000, -32768, 32767, 0};
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 1100; t++) begin
      int nv;
      int vals [4];
      nv = ($urandom_range(0, 19) == 0) ? 3 : 4;
      for (int k = 0; k < 4; k++) begin
        vals[k] = (t < 40) ? CORNER[(t * 4 + k) % 10] : $urandom_range(0, 24000) - 12000;
        exp_word[t][8*k +: 8] = scale(vals[k]);
        if (scale(vals[k]) == 0) sat_lo++;
        if (scale(vals[k]) == 179) sat_hi++;
      end
      exp_valid[t] = (nv == 4);
      if (nv == 4) exp_writes++;
      ph = 1;
      for (int c = 0; c < 50; c++) begin
        @(negedge clk);
        push = 0;
        if (c % 5 == 1 && c / 5 < nv) begin pdata = 16'(vals[c / 5]); push = 1; end
      end
      @(negedge clk); push = 0; ph = 0; tcount = tcount + 1;
      repeat (29) @(negedge clk);
    end
    repeat (20) @(negedge clk);
    check(writes === exp_writes, $sformatf("writes %0d exp %0d", writes, exp_writes));
    check(sat_lo > 0 && sat_hi > 0, "saturation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
