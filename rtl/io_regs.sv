// io_regs - I/O port decoder and glue registers.
//
// The 8085 has 256 I/O ports. Ports 00h-AFh and F0h-FFh are passed to the IDPU
// backplane through the bus controller FPGA (bp_sel), as the specification
// fixes. The rest are this design's allocation: C0h-DFh select registers of the
// bus controller and packet formatter FPGAs on this board (ext_sel), E0h-EFh
// select the 82C37 DMA controller (dma_cs_n), and B0h-BFh are decoded here
// (see idpu_pkg for the map). This block holds the PROM power bit (on after
// reset) and the timing rate; for the other glue ports it produces one-cycle
// write pulses with the written byte, and it multiplexes their read-back.
//
// Only processor cycles are decoded: during DMA the I/O strobes address the
// UART through DACK, not through the port number. Writes act on the cycle
// after the write strobe ends; read data follows the address combinationally.
module io_regs
  import idpu_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  sysbus_t     bus,
  // local registers
  output logic        prom_on,
  output logic [2:0]  rate,
  // write pulses to other blocks (byte in bus.wdata)
  output logic        wdog_wr,
  output logic [2:0]  int_clr,
  output logic        uart_clr,
  output logic        adc_start,
  output logic        diag_we,
  output logic        diag_active,   // I/O write strobe to the diagnostic port
  // read-back sources
  input  logic [2:0]  irq,
  input  logic [7:0]  uart_status,
  input  logic        adc_busy,
  input  logic        adc_done,
  input  logic [15:0] adc_data,
  input  logic [7:0]  diag_q,
  // read data when the glue answers an I/O read
  output logic [7:0]  rdata,
  output logic        local_rd,
  // selects for other devices
  output logic        bp_sel,
  output logic        ext_sel,
  output logic        dma_cs_n
);
  logic [7:0] port;
  logic       cpu_io, wr_end, is_local;

  assign port     = bus.addr[7:0];   // the 8085 repeats the port on A15..8
  assign cpu_io   = !bus.dma && (bus.ior || bus.iow);
  assign wr_end   = !bus.dma && bus.iow_end;
  assign is_local = (port[7:4] == 4'hB);

  assign bp_sel   = cpu_io && (port <= 8'hAF || port >= 8'hF0);
  assign ext_sel  = cpu_io && (port >= 8'hC0 && port <= 8'hDF);
  assign dma_cs_n = !(cpu_io && port[7:4] == 4'hE);

  always_ff @(posedge clk) begin
    if (rst) begin
      prom_on <= 1'b1;
      rate    <= 3'd0;
    end else if (wr_end) begin
      if (port == IO_PROMCTL) prom_on <= bus.wdata[0];
      if (port == IO_TIMRATE) rate    <= bus.wdata[2:0];
    end
  end

  always_comb begin
    wdog_wr     = wr_end && port == IO_WDOG;
    int_clr     = (wr_end && port == IO_INTCLR) ? bus.wdata[2:0] : 3'b000;
    uart_clr    = wr_end && port == IO_UARTSTAT;
    adc_start   = wr_end && port == IO_ADCCTL;
    diag_we     = wr_end && port == IO_DIAG;
    diag_active = !bus.dma && bus.iow && port == IO_DIAG;
  end

  always_comb begin
    unique case (port)
      IO_PROMCTL:  rdata = {7'd0, prom_on};
      IO_INTCLR:   rdata = {5'd0, irq};
      IO_TIMRATE:  rdata = {5'd0, rate};
      IO_UARTSTAT: rdata = uart_status;
      IO_ADCCTL:   rdata = {6'd0, adc_done, adc_busy};
      IO_ADCLO:    rdata = adc_data[7:0];
      IO_ADCHI:    rdata = adc_data[15:8];
      IO_DIAG:     rdata = diag_q;
      default:     rdata = 8'h00;
    endcase
    local_rd = !bus.dma && bus.ior && is_local;
  end

  // an I/O cycle selects at most one device
  a_one_sel: assert property (@(posedge clk) disable iff (rst)
                              $onehot0({bp_sel, ext_sel, !dma_cs_n, local_rd}))
    else $error("several I/O devices selected");
endmodule
