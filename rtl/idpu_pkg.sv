// idpu_pkg - constants and types shared by the IDPU processor glue logic.
//
// Holds the I/O port map of the glue FPGA and the system bus record that the
// bus latch hands to every decoder. The split of the 256 I/O ports follows the
// specification: 00h-AFh and F0h-FFh belong to the backplane (through the Bus
// Controller FPGA). The use of the free ports B0h-EFh is this design's own
// choice: B0h-BFh are the glue registers, C0h-DFh are on-board registers of the
// bus controller and packet formatter FPGAs, and E0h-EFh select the 82C37 DMA
// controller.
package idpu_pkg;

  // Glue registers (ports B0h-BFh)
  localparam logic [7:0] IO_PROMCTL  = 8'hB0;  // bit0: PROM powered (1 after reset)
  localparam logic [7:0] IO_WDOG     = 8'hB1;  // write the watchdog value here
  localparam logic [7:0] IO_INTCLR   = 8'hB2;  // W: 1 clears RST5.5/6.5/7.5 (bits 0/1/2); R: pending
  localparam logic [7:0] IO_TIMRATE  = 8'hB3;  // bits 2:0: timing interrupt 8 Hz << n
  localparam logic [7:0] IO_UARTSTAT = 8'hB4;  // R: UART status; W: clear latched errors
  localparam logic [7:0] IO_ADCCTL   = 8'hB8;  // W: start conversion; R: bit0 busy, bit1 done
  localparam logic [7:0] IO_ADCLO    = 8'hB9;  // R: conversion result bits 7:0
  localparam logic [7:0] IO_ADCHI    = 8'hBA;  // R: conversion result bits 15:8
  localparam logic [7:0] IO_DIAG     = 8'hBF;  // R/W: diagnostic register

  // Memory map
  localparam int unsigned PROM_BYTES = 8192;
  localparam int unsigned RAM_BYTES  = 32768;


  // One registered view of the processor / DMA bus, in the BUSCLK domain.
  // Levels are high while the command strobe is active; *_end pulses for one
  // cycle after the strobe ends, which is when writes take effect.
  typedef struct packed {
    logic [15:0] addr;    // CPU: {A15..8, ALE-latched AD7..0}; DMA: {ADSTB-latched, A7..0}
    logic [7:0]  data;    // data bus as sampled this cycle
    logic        dma;     // cycle owned by the DMA controller (AEN)
    logic        memr;
    logic        memw;
    logic        ior;
    logic        iow;
    logic        memw_end;
    logic        ior_end;
    logic        iow_end;
    logic [7:0]  wdata;   // data bus value on the last cycle of a write strobe
  } sysbus_t;

endpackage
