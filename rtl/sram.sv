// sram - 32K x 8 static RAM of the processor system.
//
// A single-port array standing for the 32 KB radiation-hard SRAM. Writes take
// effect on the clock edge when we is high; reads are registered, so rdata
// shows the byte at addr one BUSCLK cycle later (the processor read strobe
// lasts several BUSCLK cycles, so this meets its timing). The contents start
// at zero; the real chip powers up with arbitrary contents.
module sram #(
  parameter int unsigned DEPTH = 32768,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [7:0]    wdata,
  output logic [7:0]    rdata
);
  logic [7:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = 8'h00;
  end

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end
endmodule
