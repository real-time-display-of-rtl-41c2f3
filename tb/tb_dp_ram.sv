// Testbench for dp_ram: small instance (16 bits x 64, latencies 1/2) and default-size instance
// (968 bits x 1024) with independent clocks for the two ports (10 ns and 7 ns).
// A reference array in the testbench follows the writes. Port A: random reads/writes, each
// enabled access must return the old word exactly LAT_A clocks later (read-first). Port B:
// random reads of addresses not written recently, result exactly LAT_B clocks later.
// Also checks that the memory starts at zero.
module tb_dp_ram;
  logic clka = 1'b0, clkb = 1'b0;
  int checks = 0, failures = 0;
  always #5 clka = ~clka;
  always #3.5 clkb = ~clkb;

  logic ena = 0, wea = 0, enb = 0;
  logic [5:0] addra = 0, addrb = 0;
  logic [15:0] dina = 0, douta, doutb;
  dp_ram #(.WIDTH(16), .DEPTH(64), .LAT_A(1), .LAT_B(2)) dut (.clka, .ena, .wea, .addra,
    .dina, .douta, .clkb, .enb, .addrb, .doutb);

  logic enA = 0, weA = 0, enB = 0;
  logic [9:0] adA = 0, adB = 0;
  logic [967:0] diA = '0, doA, doB;
  dp_ram dut_big (.clka(clka), .ena(enA), .wea(weA), .addra(adA), .dina(diA), .douta(doA),
    .clkb(clkb), .enb(enB), .addrb(adB), .doutb(doB));

  logic [15:0] ref_mem [64];
  logic [967:0] ref_big [1024];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    #10000000 $display("FAIL watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // port A of the small memory
  initial begin
    logic [15:0] exp_q;
    for (int i = 0; i < 64; i++) ref_mem[i] = '0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clka);
      ena = 1'($urandom); wea = (n >= 64) ? 1'($urandom) : 1'b0;
      addra = (n < 64) ? 6'(n) : 6'($urandom_range(0, 31));    // port B uses 32..63
      dina = 16'($urandom);
      exp_q = ref_mem[addra];
      if (ena && wea) ref_mem[addra] = dina;
      if (ena) begin
        @(negedge clka);
        check(douta === exp_q, $sformatf("port A addr %0d got %h exp %h", addra, douta, exp_q));
        ena = 0;
      end
    end
  end

  // port B of the small memory: upper half, written only at the start
  initial begin
    logic [15:0] e;
    @(negedge clkb);
    for (int n = 0; n < 3000; n++) begin
      @(negedge clkb);
      enb = 1'b1; addrb = 6'($urandom_range(32, 63));
      e = ref_mem[addrb];
      @(negedge clkb); enb = 1'b0;
      @(negedge clkb);
      check(doutb === e, $sformatf("port B addr %0d got %h exp %h", addrb, doutb, e));
    end
  end

  // big memory: write a few rows on A, read them on B
  initial begin
    for (int i = 0; i < 1024; i++) ref_big[i] = '0;
    repeat (2) @(negedge clka);
    for (int n = 0; n < 40; n++) begin
      @(negedge clka);
      enA = 1; weA = 1; adA = 10'($urandom); diA = {31{$urandom}};
      ref_big[adA] = diA;
      @(negedge clka); enA = 0; weA = 0;
    end
    repeat (5) @(negedge clkb);
    for (int n = 0; n < 200; n++) begin
      @(negedge clkb);
      enB = 1; adB = (n % 2) ? 10'($urandom) : 10'(n);
      @(negedge clkb); enB = 0;
      @(negedge clkb);
      check(doB === ref_big[adB], $sformatf("big port B addr %0d", adB));
    end
    repeat (4000) @(negedge clka);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
