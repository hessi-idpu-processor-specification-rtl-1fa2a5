# HESSI IDPU processor glue logic

The HESSI instrument data processing unit (IDPU) has a small control computer. An
80C85RH microprocessor and an 82C37ARH DMA controller run at 3.333 MHz. They use an
8 KB boot PROM and 32 KB of static RAM. The computer controls the instruments and
collects state-of-health data: housekeeping voltages through a 16-bit ADC, and
registers on the other IDPU boards. It exchanges fixed-length command and telemetry
blocks with the spacecraft once a second over a serial link.

The two processor chips need glue logic around them: clock, address latch, memory
decode, resets, a watchdog, interrupts, and a handful of I/O registers. That glue is
meant for one FPGA on the Data Controller Board. This repository is synthesizable
SystemVerilog for that FPGA, plus array models of the two memories so the whole
system can be simulated. The processor, the DMA controller and the ADC are
commercial parts. They sit outside the RTL; the testbenches model them.

```
            BUSCLK 10 MHz
                 |
            clock_gen ---- X1 3.333 MHz ---> 80C85RH, 82C37ARH
                                           |  AD7..0, A15..8, ALE, RD#, WR#, IO/M#
  82C37 AEN/ADSTB/A7..0/MEMR#/MEMW#/IOR#/IOW#  |
                 |                         |
              addr_latch  ==> system bus record (sysbus_t) ==>
                 |                |             |            |         |
           mem_decode        io_regs        uart        diag_reg   (read mux)
            |     |           |  |  |        |  DREQ/DACK to 82C37
          prom   sram         |  |  +-> adc_if ---> LTC1604
                              |  +----> intr_ctrl ---> RST5.5/6.5/7.5
                              +-------> watchdog ---> reset_ctrl ---> RESET IN, backplane reset
  CLK1HZ, stable clock --> tick_gen --^ (1 Hz, 8..1024 Hz ticks)
```

`idpu_glue` is the top module. All of its logic runs on BUSCLK, which is taken as
10 MHz because the processor clock is BUSCLK/3.

## The bus: one sampled view of two masters

The hardest part of the design is how the glue sees the processor bus.

**The 8085 cycle.** The 8085 puts the low address byte on AD7..0 while ALE is high.
Then, in the same cycle, it uses those pins for data, with RD# or WR# low and IO/M#
choosing between memory and I/O. The 8085 divides X1 by two internally, so a
T-state lasts 600 ns, which is six BUSCLK cycles. The strobes stay low for about
nine BUSCLK cycles. This means the glue can sample every bus signal on BUSCLK
instead of clocking anything from the strobes.

**Sampling in `addr_latch`.** The address latch is a register loaded on every
BUSCLK cycle while ALE is high. It therefore holds the byte present when ALE falls.
The block turns the raw pins into a registered record, `idpu_pkg::sysbus_t`, which
holds:

- the 16-bit address;
- the data bus value;
- active-high `memr`, `memw`, `ior` and `iow` levels;
- a one-cycle `memw_end`, `ior_end` or `iow_end` pulse in the cycle after a strobe
  ends;
- `wdata`, the data bus value on the last cycle of a write strobe.

**Write timing.** Every write in the design acts on the `*_end` pulse, with `wdata`.
This matches the usual rule that a device latches data on the trailing edge of the
write strobe. The address is held through that pulse.

**DMA cycles.** While the 82C37 owns the bus (AEN high), `addr_latch` takes a
different path. It builds the address from the upper byte the DMA controller puts
on the data bus under ADSTB, plus its A7..0 pins. The strobes come from the
controller's MEMR#, MEMW#, IOR# and IOW#. The `dma` bit of the record marks these
cycles, and the I/O port decoder ignores them.

**Fly-by transfers.** The UART moves data by 82C37 fly-by transfers:

- **Receive:** IOR# and MEMW# are asserted together, with DACK for the receive
  channel.
- **Transmit:** MEMR# and IOW# are asserted together, with DACK for the transmit
  channel.

The top drives the data bus for memory reads, for reads of its own I/O ports, and
for UART receive DMA. What it feeds back into `addr_latch` is the value actually on
the bus: its own byte when it drives, otherwise `ad_in`. So the UART's byte reaches
the SRAM, and a memory byte reaches the UART, with no extra data path.

**Read timing.** Read data is on `ad_out` two BUSCLK cycles after RD# falls. That is
well inside the 8085's access window at this clock rate. The top-level testbench
measures this latency.

## Memory map and the PROM power switch

| Access                         | PROM powered (after any reset) | PROM off |
|--------------------------------|--------------------------------|----------|
| read 0000h-1FFFh               | PROM                           | RAM      |
| read 2000h-FFFFh               | RAM                            | RAM      |
| any write                      | RAM                            | RAM      |

The RAM is 32 KB and ignores A15, so it appears again at 8000h-FFFFh. Once the flight
program has copied itself to RAM, it can power the PROM off through bit 0 of port
B0h. The `prom_pwr` output drives the PROM's FET power switch. Any processor reset
(power-on, spacecraft or watchdog) turns the PROM on again, so the processor always
restarts from the boot code.

In this model both memories are arrays with registered reads. The SRAM starts at
zero. The PROM reads FFh unless it is given a `$readmemh` image through the top's
`PROM_INIT` parameter.

## I/O ports

The 8085 has 256 I/O ports.

- **00h-AFh and F0h-FFh:** belong to the IDPU backplane. The bus controller FPGA
  serves them, and the glue only raises `bp_sel`.
- **C0h-DFh:** `ext_sel`, for on-board registers of the bus controller and packet
  formatter FPGAs.
- **E0h-EFh:** `dma_cs_n`, which selects the 82C37 (its A3..0 pick the register).
- **B0h-BFh:** the glue's own registers, listed below.

| Port | Write                                               | Read                                |
|------|-----------------------------------------------------|-------------------------------------|
| B0h  | bit0: PROM power (1 = on)                           | bit0: PROM power                    |
| B1h  | watchdog: write A5h at least once a second          | 00h                                 |
| B2h  | 1 in bit0/1/2 clears RST5.5/6.5/7.5                 | pending RST5.5/6.5/7.5 in bits 0..2 |
| B3h  | bits 2..0: timing interrupt rate, 8 Hz << n         | rate                                |
| B4h  | any value clears the UART error flags               | UART status (below)                 |
| B8h  | any value starts an ADC conversion                  | bit0 busy, bit1 done                |
| B9h  | -                                                   | ADC result bits 7..0                |
| BAh  | -                                                   | ADC result bits 15..8               |
| BFh  | diagnostic register                                 | diagnostic register                 |

The port constants are in `rtl/idpu_pkg.sv`. To move a register, change it there.

## Resets and the watchdog

`reset_ctrl` ORs three reset sources:

- the power-on pin, driven by an external R-C network (1 MΩ, 0.1 µF), active low;
- the spacecraft reset, a logic pulse that ground command raises, taken as active
  high;
- the watchdog's pulse.

The two external pins are synchronised first. Any of the three sources holds the
combined reset active until `RESET_CYCLES` (32) BUSCLK cycles after the source
was last seen.
That combined reset drives:

- the 8085's RESET IN (`cpu_reset_n`);
- the backplane reset request to the bus controller FPGA (`bp_reset_n`);
- every glue register.

Only power-on reset clears the watchdog and the reset counter itself.

`watchdog` counts 1 Hz ticks since the last write of A5h to port B1h. Writes of any
other value do not count. On the second tick without a good write, it sends one
reset pulse and starts counting again. A program that writes once a second never
trips it. A program that stops writing is reset between one and two seconds after
its last write. Writing from the 1 Hz interrupt handler keeps exactly one tick
between writes, whatever the handler's latency.

## Interrupts and time tics

Three interrupt lines are used:

| Line   | Set by                                          |
|--------|-------------------------------------------------|
| RST5.5 | the 1 Hz tick                                   |
| RST6.5 | the programmable timing tick                    |
| RST7.5 | the falling edge of the 82C37's EOP#, at the end of a DMA transfer |

Each line is a flip-flop that stays set until software writes a 1 to its bit in
port B2h. If a set and a clear arrive in the same cycle, the flag stays set, so no
event is lost.

`tick_gen` synchronises the CLK1HZ square wave and a stable reference clock, and
makes the two ticks:

- The **1 Hz tick** comes from each CLK1HZ rising edge.
- The **timing tick** divides the stable clock, assumed to be a 1024 Hz square
  wave. Rate n gives one tick every 128 >> n stable edges: 8, 16, ... 1024 Hz.

The divider restarts on every CLK1HZ edge, so the timing ticks stay aligned with
the second. If the stable clock runs at another power of two, set `STABLE_HZ`.

## Serial link

`uart` is a full-duplex asynchronous port. The frame format is defined by the
spacecraft interface document, not here. This design uses:

- 1 start bit, 8 data bits sent LSB first, 1 odd parity bit and 1 stop bit;
- `CLKS_PER_BIT` = 1042 BUSCLK cycles per bit, which is 9600 baud.

Both parameters are easy to change.

**DMA handshake.** Each direction has its own DMA channel:

- **Receive:** a received byte raises `dreq_rx`. The UART drives the byte during
  DACK plus IOR#.
- **Transmit:** `dreq_tx` is high while the holding register is empty. The byte on
  the bus at the end of DACK plus IOW# is loaded into it.

DREQ drops as soon as DACK is seen, so each request gets exactly one transfer. The
block length and the once-a-second schedule belong to software and to the DMA
controller's word count.

**Status (port B4h):**

| Bit | Meaning                              |
|-----|--------------------------------------|
| 0   | parity error (sticky)                |
| 1   | framing error (sticky)               |
| 2   | overrun (sticky)                     |
| 3   | receive buffer full                  |
| 4   | transmit holding register empty      |
| 5   | transmitter idle                     |

Software learns that a block held a parity error by reading the sticky bit after
the block's DMA finishes.

## Housekeeping ADC

`adc_if` keeps the LTC1604 off the processor bus. A start runs the following pin
sequence:

1. CS# and CONVST# go low for 4 cycles.
2. The block waits for BUSY# to fall and then rise.
3. CS# and RD# go low for 4 cycles.
4. The 16-bit result is captured as RD# rises.

Meanwhile the status port shows busy, then done. If BUSY# never falls, the block
carries on after `BUSY_WAIT` cycles rather than hanging. The pulse widths are this
design's choice and meet the part's timing at 10 MHz.

## Diagnostic register

Port BFh is an 8-bit register wired to the diagnostic connector (`diag_q`). The
connector also gets the registered I/O write strobe of that port (`diag_stb`). The
register loads when the strobe ends. Software developers can use it to trace
program flow.

## What is specified and what is chosen here

Taken from the specification:

- X1 = BUSCLK/3;
- PROM and RAM sizes, their shared base address, the PROM-read rule, and PROM on
  after reset;
- the ALE address latch;
- the three reset sources, ORed, with backplane reset;
- the watchdog's two-second limit on a once-a-second write;
- the interrupt sources, the eight timing rates and individual clearing;
- the backplane port ranges;
- a UART on two DMA channels with a latched parity error;
- ADC start, status and read through I/O registers;
- an 8-bit diagnostic register with its strobe.

Chosen in this design, where the specification leaves the point open:

- the glue port numbers and register bit layouts;
- the watchdog value A5h;
- the watchdog read as a two-tick counter. The specification sketches a single
  flip-flop clocked by CLK1HZ, with the reset on its falling edge. The counter is
  this design's reading of that sketch.
- the reset stretch length and the polarity of the spacecraft reset;
- the stable clock frequency;
- the serial frame format, baud rate, error flags and DMA handshake details;
- the ADC pulse widths;
- the RAM image above 32 KB;
- sampling all bus signals on BUSCLK instead of using transparent latches.

The processor, the DMA controller, the ADC, the R-C reset network and the PROM's
power switch are outside the RTL. So are the bus controller FPGA, the packet
formatter FPGA and the particle detector interface, which have their own
specifications. Their signals are ports of `idpu_glue`.

## Verification

Each module in `rtl/` has a self-checking testbench in `tb/` named `tb_<module>`.
Each one prints `TB_RESULT checks=N failures=M`. A few points they cover:

- the X1 period;
- the address and data capture of random processor and DMA cycles;
- the decode rule against a reference model;
- reset lengths for each source;
- watchdog behaviour with good, wrong and missing writes;
- the tick count at all eight timing rates over one second;
- the interrupt flags against a reference model;
- all 256 port decodes;
- UART data, parity, framing and overrun, and transmit frames decoded from the pin;
- ADC results and conversion time against a model of the part.

`tb_idpu_glue` runs the whole top at its default parameters. It uses an 8085
bus-cycle model, an 82C37 fly-by model, an LTC1604 model (`tb/ltc1604_model.sv`) and
a serial line. It:

1. boots from a PROM image (`tb/prom_boot.hex`) and exercises RAM, the RAM image
   above 32 KB, and PROM power-off;
2. drives the I/O selects, the diagnostic register and an ADC conversion;
3. runs the 1 Hz and timing interrupts, and checks 32 ticks per second at rate 2;
4. receives a four-byte block by DMA (one byte with bad parity) and checks it in RAM,
   along with the EOP interrupt;
5. transmits a three-byte block by DMA;
6. applies a spacecraft reset and checks that the PROM returns, then starves the
   watchdog until it resets the processor.

It counts each of these mechanisms and fails if any never happened. In the top
test, one simulated "second" is 1024 stable-clock periods of 80 BUSCLK cycles, not
10 million cycles. The design's timing does not depend on that ratio, and it keeps
the run under a second.

To run one testbench with Verilator 5:

```
verilator --binary --timing -Wno-fatal --top-module tb_idpu_glue \
    -y rtl -y tb +libext+.sv -Irtl rtl/idpu_pkg.sv tb/tb_idpu_glue.sv
./obj_dir/Vtb_idpu_glue
```

Run it from the repository root, because the testbenches read `tb/prom_boot.hex`
by that relative path. Everything in `rtl/` lints cleanly under
`verilator --lint-only -Wall`, apart from unused-signal and unused-parameter notes,
and has no latches.
