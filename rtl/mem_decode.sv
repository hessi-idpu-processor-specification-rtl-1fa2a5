// mem_decode - memory decoding for the boot PROM and the static RAM.
//
// Both memories start at address zero. While the PROM is powered, memory reads
// of the first PROM_BYTES (8 KB) come from the PROM; every write, and every read
// above that, goes to the RAM. With the PROM powered off, all accesses go to
// the RAM. This is the rule of the specification. Reads and writes above the
// 32 KB of RAM are sent to the RAM as well, which ignores A15, so the RAM
// appears twice in the 64 KB space; that is this design's reading.
//
// Interface: the registered system bus in, read selects and a one-cycle RAM
// write pulse (on the cycle after the write strobe ends) out. Purely
// combinational.
module mem_decode
  import idpu_pkg::*;
#(
  parameter int unsigned PROM_BYTES_P = PROM_BYTES
) (
  input  sysbus_t bus,
  input  logic    prom_on,
  output logic    prom_rd,   // memory read served by the PROM
  output logic    ram_rd,    // memory read served by the RAM
  output logic    ram_we     // RAM write, one cycle
);
  logic in_prom_range;

  always_comb begin
    in_prom_range = ({16'd0, bus.addr} < 32'(PROM_BYTES_P));
    prom_rd = bus.memr && prom_on && in_prom_range;
    ram_rd  = bus.memr && !(prom_on && in_prom_range);
    ram_we  = bus.memw_end;
  end
endmodule
