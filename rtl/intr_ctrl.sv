// intr_ctrl - interrupt flip-flops for the 8085 restart inputs.
//
// Only RST5.5, RST6.5 and RST7.5 are used. RST5.5 is set by the 1 second tick,
// RST6.5 by the programmable timing tick, and RST7.5 by the falling edge of the
// 82C37 end-of-process signal EOP# (end of a DMA transfer). Each is a
// flip-flop that holds its restart line high until the processor clears it
// through the interrupt clear port; a 1 in bit 0/1/2 of the written byte clears
// RST5.5/6.5/7.5, which is this design's encoding. A set and a clear in the
// same cycle leave the flag set, so no event is lost.
//
// Timing: tick inputs are one-cycle pulses and set the flag on the next edge;
// EOP# is synchronised, so RST7.5 rises three cycles after its falling edge.
module intr_ctrl (
  input  logic       clk,
  input  logic       rst,
  input  logic       set_1hz,
  input  logic       set_timing,
  input  logic       eop_n,       // asynchronous, active low
  input  logic [2:0] clr,         // one-cycle clear strobes, bit per interrupt
  output logic [2:0] irq          // bit0 RST5.5, bit1 RST6.5, bit2 RST7.5
);
  logic [2:0] eop_s;
  logic       eop_fall;
  logic [2:0] set;

  always_ff @(posedge clk) begin
    if (rst) eop_s <= 3'b111;
    else     eop_s <= {eop_s[1:0], eop_n};
  end
  assign eop_fall = !eop_s[1] && eop_s[2];
  assign set      = {eop_fall, set_timing, set_1hz};

  always_ff @(posedge clk) begin
    if (rst) irq <= '0;
    else     irq <= (irq & ~clr) | set;
  end
endmodule
