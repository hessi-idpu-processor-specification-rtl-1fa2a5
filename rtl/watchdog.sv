// watchdog - processor watchdog timer.
//
// The flight software must write WDOG_VALUE to the watchdog port about once a
// second. The block counts 1 Hz ticks since the last such write; a write of
// the right value clears the count, a write of any other value does not. When
// MISSED_TICKS (2) ticks pass without a good write, a one-cycle reset pulse is
// sent to the reset logic and the count starts again. With ticks one second
// apart this resets the processor between one and two seconds after its last
// write, so a program writing once a second never trips it. The specification
// describes a flip-flop clocked by the 1 Hz signal and cleared by the write,
// giving the reset on its falling edge; the two-tick counter is this design's
// reading of that. The value A5h is this design's choice. Software should
// write the value from the 1 second interrupt handler: writes then fall just
// after each tick, and jitter in the write time cannot put two ticks between
// two writes.
//
// Interface: tick_1hz is a one-cycle pulse per second; wr is the one-cycle
// pulse of an I/O write to the watchdog port with wdata its byte. rst_pulse
// comes one cycle after the tick that trips it. Reset only by power-on reset.
module watchdog #(
  parameter logic [7:0]  WDOG_VALUE   = 8'hA5,
  parameter int unsigned MISSED_TICKS = 2
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       tick_1hz,
  input  logic       wr,
  input  logic [7:0] wdata,
  output logic       rst_pulse
);
  localparam int unsigned CW = $clog2(MISSED_TICKS + 1);
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt       <= '0;
      rst_pulse <= 1'b0;
    end else begin
      rst_pulse <= 1'b0;
      if (wr && wdata == WDOG_VALUE) begin
        cnt <= '0;
      end else if (tick_1hz) begin
        if (cnt == CW'(MISSED_TICKS - 1)) begin
          cnt       <= '0;
          rst_pulse <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
