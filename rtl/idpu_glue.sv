// idpu_glue - glue logic of the IDPU processor system (Data Controller Board).
//
// The IDPU processor is an 80C85RH with an 82C37ARH DMA controller, an 8 KB
// boot PROM and 32 KB of SRAM; it runs the instruments and talks to the
// spacecraft through a serial link. Everything around the two chips lives in
// one FPGA, modelled here together with the two memories:
//   clock_gen   X1 = BUSCLK/3 (3.333 MHz) for the processor and DMA chip
//   addr_latch  ALE address latch, DMA upper-address latch, one system bus
//   mem_decode  PROM below 8 KB for reads while powered, RAM otherwise
//   prom, sram  the two memories
//   reset_ctrl  power-on, spacecraft and watchdog resets ORed and stretched
//   watchdog    reset when the watchdog port is not written for two seconds
//   tick_gen    1 Hz tick and 8..1024 Hz timing tick from the time references
//   intr_ctrl   RST5.5 (1 Hz), RST6.5 (timing), RST7.5 (DMA end of process)
//   io_regs     I/O port decode, PROM power bit, timing rate, read-back
//   uart        spacecraft serial port on two DMA channels, parity error latch
//   adc_if      LTC1604 housekeeping ADC control
//   diag_reg    diagnostic register and strobe on the test connector
//
// The multiplexed data bus is split into ad_in / ad_out / ad_oe. The glue
// drives it for memory reads (processor or DMA), for reads of its own I/O
// ports and, during a receive DMA transfer, with the UART byte. The value
// actually on the bus (the glue's own byte when it drives, ad_in otherwise) is
// what the system bus samples, so the DMA fly-by transfers between the UART
// and the memories need no extra path. Read data appears two BUSCLK cycles
// after the read strobe falls; writes act two cycles after the strobe rises.
// All logic runs on BUSCLK; the processor and DMA strobes are sampled.
module idpu_glue
  import idpu_pkg::*;
#(
  parameter int unsigned UART_CLKS_PER_BIT = 1042,
  parameter int unsigned STABLE_HZ         = 1024,
  parameter logic [7:0]  WDOG_VALUE        = 8'hA5,
  parameter int unsigned RESET_CYCLES      = 32,
  parameter string       PROM_INIT         = ""
) (
  input  logic        clk,            // BUSCLK, 10 MHz
  input  logic        por_n,          // power-on reset pin (R-C network)
  input  logic        sc_reset,       // spacecraft reset pulse
  output logic        x1_clk,         // processor / DMA clock
  output logic        cpu_reset_n,    // 8085 RESET IN
  output logic        bp_reset_n,     // backplane reset request to the BCF
  // 8085 bus
  input  logic [7:0]  ad_in,
  output logic [7:0]  ad_out,
  output logic        ad_oe,
  input  logic [7:0]  a_hi,
  input  logic        ale,
  input  logic        io_m,
  input  logic        rd_n,
  input  logic        wr_n,
  // 82C37 bus
  input  logic        dma_aen,
  input  logic        dma_adstb,
  input  logic [7:0]  dma_a_lo,
  input  logic        dma_memr_n,
  input  logic        dma_memw_n,
  input  logic        dma_ior_n,
  input  logic        dma_iow_n,
  input  logic        dma_dack_rx,    // channel serving UART receive
  input  logic        dma_dack_tx,    // channel serving UART transmit
  input  logic        dma_eop_n,
  output logic        dreq_rx,
  output logic        dreq_tx,
  output logic        dma_cs_n,
  // interrupts
  output logic        rst55,
  output logic        rst65,
  output logic        rst75,
  // time references
  input  logic        clk1hz,
  input  logic        stable_clk,
  // spacecraft serial
  input  logic        uart_rxd,
  output logic        uart_txd,
  // LTC1604 ADC
  input  logic        adc_busy_n,
  input  logic [15:0] adc_d,
  output logic        adc_cs_n,
  output logic        adc_convst_n,
  output logic        adc_rd_n,
  // diagnostic connector
  output logic [7:0]  diag_q,
  output logic        diag_stb,
  // other devices
  output logic        prom_pwr,       // PROM FET power switch
  output logic        bp_sel,         // I/O cycle for the backplane (via BCF)
  output logic        ext_sel         // I/O cycle for BCF / PFF board registers
);
  logic       por_rst, sys_rst, wdog_rst;
  sysbus_t    bus;
  logic [7:0] bus_data;
  logic       prom_rd, ram_rd, ram_we, prom_on;
  logic [7:0] prom_q, sram_q, io_q, rx_q;
  logic       local_rd, rx_drive;
  logic [2:0] rate, int_clr, irq;
  logic       wdog_wr, uart_clr, adc_start, diag_we, diag_active;
  logic       tick_1hz, tick_timing;
  logic [7:0] uart_status;
  logic       adc_busy, adc_done;
  logic [15:0] adc_data;

  clock_gen u_clk (.clk, .rst(por_rst), .x1_clk);

  reset_ctrl #(.RESET_CYCLES(RESET_CYCLES)) u_rst (
    .clk, .por_n, .sc_reset, .wdog_rst, .por_rst, .sys_rst, .cpu_reset_n, .bp_reset_n);

  // the data bus as seen by every device
  assign bus_data = ad_oe ? ad_out : ad_in;

  addr_latch u_lat (
    .clk, .rst(sys_rst), .ad_in(bus_data), .a_hi, .ale, .io_m, .rd_n, .wr_n,
    .dma_aen, .dma_adstb, .dma_a_lo, .dma_memr_n, .dma_memw_n, .dma_ior_n, .dma_iow_n,
    .bus);

  mem_decode u_dec (.bus, .prom_on, .prom_rd, .ram_rd, .ram_we);

  prom #(.DEPTH(PROM_BYTES), .INIT_FILE(PROM_INIT)) u_prom (
    .clk, .addr(bus.addr[12:0]), .rdata(prom_q));

  sram #(.DEPTH(RAM_BYTES)) u_sram (
    .clk, .we(ram_we), .addr(bus.addr[14:0]), .wdata(bus.wdata), .rdata(sram_q));

  watchdog #(.WDOG_VALUE(WDOG_VALUE)) u_wdog (
    .clk, .rst(por_rst), .tick_1hz, .wr(wdog_wr), .wdata(bus.wdata), .rst_pulse(wdog_rst));

  tick_gen #(.STABLE_HZ(STABLE_HZ)) u_tick (
    .clk, .rst(por_rst), .clk1hz, .stable_clk, .rate, .tick_1hz, .tick_timing);

  intr_ctrl u_int (
    .clk, .rst(sys_rst), .set_1hz(tick_1hz), .set_timing(tick_timing),
    .eop_n(dma_eop_n), .clr(int_clr), .irq);

  io_regs u_io (
    .clk, .rst(sys_rst), .bus, .prom_on, .rate, .wdog_wr, .int_clr, .uart_clr,
    .adc_start, .diag_we, .diag_active, .irq, .uart_status, .adc_busy, .adc_done,
    .adc_data, .diag_q, .rdata(io_q), .local_rd, .bp_sel, .ext_sel, .dma_cs_n);

  uart #(.CLKS_PER_BIT(UART_CLKS_PER_BIT)) u_uart (
    .clk, .rst(sys_rst), .rxd(uart_rxd), .txd(uart_txd), .bus,
    .dack_rx(dma_dack_rx), .dack_tx(dma_dack_tx), .dreq_rx, .dreq_tx,
    .rx_data(rx_q), .rx_drive, .status_clr(uart_clr), .status(uart_status));

  adc_if u_adc (
    .clk, .rst(sys_rst), .start(adc_start), .adc_busy_n, .adc_d, .adc_cs_n,
    .adc_convst_n, .adc_rd_n, .busy(adc_busy), .done(adc_done), .data(adc_data));

  diag_reg u_diag (
    .clk, .rst(sys_rst), .wr_active(diag_active), .we(diag_we), .wdata(bus.wdata),
    .q(diag_q), .stb(diag_stb));

  // read-data multiplexer; memory selects come from the registered bus, and
  // the memories answer one cycle later, so the selects are delayed to match
  logic prom_rd_q, ram_rd_q;
  always_ff @(posedge clk) begin
    if (sys_rst) begin
      prom_rd_q <= 1'b0;
      ram_rd_q  <= 1'b0;
    end else begin
      prom_rd_q <= prom_rd;
      ram_rd_q  <= ram_rd;
    end
  end

  always_comb begin
    ad_oe  = 1'b0;
    ad_out = 8'h00;
    if (prom_rd_q && bus.memr) begin
      ad_oe = 1'b1; ad_out = prom_q;
    end else if (ram_rd_q && bus.memr) begin
      ad_oe = 1'b1; ad_out = sram_q;
    end else if (local_rd) begin
      ad_oe = 1'b1; ad_out = io_q;
    end else if (rx_drive) begin
      ad_oe = 1'b1; ad_out = rx_q;
    end
  end

  assign prom_pwr = prom_on;
  assign {rst75, rst65, rst55} = irq;
endmodule
