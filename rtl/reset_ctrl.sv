// reset_ctrl - processor reset logic.
//
// The processor has three reset sources, ORed together as the specification
// says: the power-on reset pin (driven by an R-C network, active low), the
// spacecraft reset pulse (a logic-level pulse from a ground command, taken here
// as active high) and the watchdog pulse. The two external pins are passed
// through two-flop synchronisers. Any source restarts a counter that holds the
// combined reset until RESET_CYCLES BUSCLK cycles after the source was last seen, so
// even a one-cycle watchdog pulse gives the 8085 a reset of well over its
// three-clock minimum; the stretch length is this design's choice. The
// combined reset drives the processor's RESET IN and the backplane reset
// request to the bus controller FPGA, and resets the glue registers.
//
// por_rst (synchronised power-on only) resets the parts that must survive a
// processor reset: the watchdog and the reset counter itself.
module reset_ctrl #(
  parameter int unsigned RESET_CYCLES = 32
) (
  input  logic clk,
  input  logic por_n,       // power-on reset pin, asynchronous, active low
  input  logic sc_reset,    // spacecraft reset, asynchronous, active high
  input  logic wdog_rst,    // watchdog reset pulse, synchronous
  output logic por_rst,     // synchronised power-on reset, active high
  output logic sys_rst,     // combined, stretched reset, active high
  output logic cpu_reset_n, // to 8085 RESET IN
  output logic bp_reset_n   // backplane reset request
);
  localparam int unsigned CW = $clog2(RESET_CYCLES + 1);

  logic [1:0]    por_sync;   // shifts in 1s after the pin goes high
  logic [1:0]    sc_sync;
  logic [CW-1:0] hold;
  logic          src;

  // asynchronous assertion of power-on reset, synchronous release
  always_ff @(posedge clk or negedge por_n) begin
    if (!por_n) por_sync <= 2'b00;
    else        por_sync <= {por_sync[0], 1'b1};
  end
  assign por_rst = !por_sync[1];

  always_ff @(posedge clk) begin
    if (por_rst) sc_sync <= 2'b00;
    else         sc_sync <= {sc_sync[0], sc_reset};
  end

  assign src = sc_sync[1] || wdog_rst;

  always_ff @(posedge clk) begin
    if (por_rst) begin
      hold    <= CW'(RESET_CYCLES);
      sys_rst <= 1'b1;
    end else begin
      if (src)           hold <= CW'(RESET_CYCLES - 1);
      else if (hold != 0) hold <= hold - 1'b1;
      sys_rst <= src || (hold != 0);
    end
  end

  assign cpu_reset_n = !sys_rst;
  assign bp_reset_n  = !sys_rst;
endmodule
