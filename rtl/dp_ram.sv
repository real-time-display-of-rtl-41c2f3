// Dual-port, dual-clock block RAM: port A reads and writes, port B only reads.
//
// Used three times in the display: the 1024 x 968-bit spike memory (written by the FIFO reader on
// the emulator clock, read by the raster plot on the pixel clock), the 32 x 968-bit spike buffer
// (port A only) and the 1024 x 32-bit potential memory. Port A returns the word at the address of
// the previous enabled clock (read-first: a write returns the old word) after LAT_A clocks; port B
// after LAT_B clocks, the extra stages standing for the block RAM's output registers. Contents
// start at zero.
module dp_ram #(
  parameter int WIDTH = 968,
  parameter int DEPTH = 1024,
  parameter int LAT_A = 1,
  parameter int LAT_B = 2,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic             clka,
  input  logic             ena,
  input  logic             wea,
  input  logic [AW-1:0]    addra,
  input  logic [WIDTH-1:0] dina,
  output logic [WIDTH-1:0] douta,
  input  logic             clkb,
  input  logic             enb,
  input  logic [AW-1:0]    addrb,
  output logic [WIDTH-1:0] doutb
);
  logic [WIDTH-1:0] mem [DEPTH];

  logic [WIDTH-1:0] pipe_a [LAT_A];
  logic [WIDTH-1:0] pipe_b [LAT_B];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
    for (int i = 0; i < LAT_A; i++) pipe_a[i] = '0;
    for (int i = 0; i < LAT_B; i++) pipe_b[i] = '0;
  end

  always_ff @(posedge clka) begin
    if (ena) begin
      pipe_a[0] <= mem[addra];
      if (wea) mem[addra] <= dina;
    end
    for (int i = 1; i < LAT_A; i++) pipe_a[i] <= pipe_a[i-1];
  end

  always_ff @(posedge clkb) begin
    if (enb) pipe_b[0] <= mem[addrb];
    for (int i = 1; i < LAT_B; i++) pipe_b[i] <= pipe_b[i-1];
  end

  assign douta = pipe_a[LAT_A-1];
  assign doutb = pipe_b[LAT_B-1];

endmodule
