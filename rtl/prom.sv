// prom - 8K x 8 boot PROM of the processor system.
//
// A read-only array standing for the 8 KB PROM that holds the boot program.
// Its contents are loaded from INIT_FILE (a $readmemh file) when one is given;
// otherwise it reads FFh everywhere, like a blank PROM. Reads are registered:
// rdata shows the byte at addr one BUSCLK cycle later. Powering the PROM off is
// handled by the memory decoder, which then never selects it.
module prom #(
  parameter int unsigned DEPTH     = 8192,
  parameter int unsigned AW        = $clog2(DEPTH),
  parameter string       INIT_FILE = ""
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [7:0]    rdata
);
  logic [7:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = 8'hFF;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    rdata <= mem[addr];
  end
endmodule
