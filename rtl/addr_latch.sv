// addr_latch - address latch and bus merge for the processor and DMA buses.
//
// The 8085 multiplexes the low address byte with data on AD7..0 and marks the
// address with ALE; this block keeps that byte (the "address LSB latch" of the
// glue logic). While the 82C37 DMA controller owns the bus (AEN high) it puts
// A15..8 on the data bus and marks them with ADSTB, and drives A7..0 and its
// own MEMR/MEMW/IOR/IOW strobes; that upper byte is latched too, as the 82C37
// data sheet recommends. Both kinds of cycle are merged into one registered
// system bus record (idpu_pkg::sysbus_t) with active-high read/write levels and
// a one-cycle pulse after each write strobe and each I/O read strobe ends.
//
// Everything is sampled on BUSCLK, which also clocks the processor (X1 is
// BUSCLK/3), so the strobes are treated as synchronous inputs. The ALE latch is
// a register loaded on every cycle while ALE is high, so it holds the value
// present when ALE falls; this replaces a transparent latch, which is this
// design's choice. Timing: bus levels lag the pins by one BUSCLK cycle; an
// *_end pulse is on the bus in the cycle in which the level has just dropped.
module addr_latch
  import idpu_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  // 8085 side
  input  logic [7:0] ad_in,       // AD7..0 (also the DMA data / upper-address bus)
  input  logic [7:0] a_hi,        // A15..8
  input  logic       ale,
  input  logic       io_m,        // 1 = I/O cycle, 0 = memory cycle
  input  logic       rd_n,
  input  logic       wr_n,
  // 82C37 side
  input  logic       dma_aen,
  input  logic       dma_adstb,
  input  logic [7:0] dma_a_lo,
  input  logic       dma_memr_n,
  input  logic       dma_memw_n,
  input  logic       dma_ior_n,
  input  logic       dma_iow_n,
  output sysbus_t    bus
);
  logic [7:0] lsb_q;      // ALE latch
  logic [7:0] dma_hi_q;   // ADSTB latch
  sysbus_t    nxt;

  always_ff @(posedge clk) begin
    if (rst) begin
      lsb_q    <= '0;
      dma_hi_q <= '0;
    end else begin
      if (ale)       lsb_q    <= ad_in;
      if (dma_adstb) dma_hi_q <= ad_in;
    end
  end

  always_comb begin
    nxt      = '0;
    nxt.dma  = dma_aen;
    nxt.data = ad_in;
    if (dma_aen) begin
      nxt.addr = {dma_hi_q, dma_a_lo};
      nxt.memr = !dma_memr_n;
      nxt.memw = !dma_memw_n;
      nxt.ior  = !dma_ior_n;
      nxt.iow  = !dma_iow_n;
    end else begin
      // while ALE is high the latch is still loading: use the pins directly
      nxt.addr = {a_hi, ale ? ad_in : lsb_q};
      nxt.memr = !rd_n && !io_m && !ale;
      nxt.memw = !wr_n && !io_m && !ale;
      nxt.ior  = !rd_n &&  io_m && !ale;
      nxt.iow  = !wr_n &&  io_m && !ale;
    end
    nxt.memw_end = bus.memw && !nxt.memw;
    nxt.ior_end  = bus.ior  && !nxt.ior;
    nxt.iow_end  = bus.iow  && !nxt.iow;
    // write data: follow the bus while a write strobe is active, hold it after
    nxt.wdata    = (bus.memw || bus.iow) ? bus.data : bus.wdata;
  end

  // the pulses and wdata are formed from the registered levels, so they
  // describe the strobe that has just ended at the registered address
  always_ff @(posedge clk) begin
    if (rst) begin
      bus <= '0;
    end else begin
      bus <= nxt;
      // keep the address of a cycle whose strobe is ending
      if (nxt.memw_end || nxt.ior_end || nxt.iow_end) bus.addr <= bus.addr;
    end
  end

  // bus rules: no master reads and writes the same space at once
  a_mem_rw: assert property (@(posedge clk) disable iff (rst) !(bus.memr && bus.memw))
    else $error("memory read and write strobes active together");
  a_io_rw: assert property (@(posedge clk) disable iff (rst) !(bus.ior && bus.iow))
    else $error("I/O read and write strobes active together");
endmodule
