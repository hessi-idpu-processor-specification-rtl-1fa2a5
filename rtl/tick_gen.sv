// tick_gen - time tics for the 1 second and timing interrupts.
//
// Both time references arrive from outside the glue FPGA as square waves and
// are passed through two-flop synchronisers; a rising edge of each makes a
// one-cycle event. The 1 Hz reference (CLK1HZ) gives tick_1hz directly. The
// timing tick is derived from the stable clock, a STABLE_HZ square wave (1024 Hz
// is this design's assumption), by counting its rising edges: for rate n
// (0..7) a tick is given every STABLE_HZ / (8 << n) edges, which makes 8, 16,
// 32, ... 1024 Hz as the specification lists. The edge counter restarts on
// every CLK1HZ rising edge, so the timing tics stay in step with the second.
// A rate change takes effect at the next tick.
//
// Timing: ticks come three BUSCLK cycles after the reference edge at the pin.
module tick_gen #(
  parameter int unsigned STABLE_HZ = 1024   // power of two, at least 1024
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       clk1hz,
  input  logic       stable_clk,
  input  logic [2:0] rate,          // timing rate: 8 Hz << rate
  output logic       tick_1hz,
  output logic       tick_timing
);
  localparam int unsigned CW = $clog2(STABLE_HZ / 8);   // edges per 8 Hz period

  logic [2:0]    s1hz, sstab;   // synchronisers plus one stage for edge detect
  logic          e1hz, estab;
  logic [CW-1:0] cnt, cnt_nxt, mask;

  always_ff @(posedge clk) begin
    if (rst) begin
      s1hz  <= '0;
      sstab <= '0;
    end else begin
      s1hz  <= {s1hz[1:0], clk1hz};
      sstab <= {sstab[1:0], stable_clk};
    end
  end
  assign e1hz  = s1hz[1]  && !s1hz[2];
  assign estab = sstab[1] && !sstab[2];

  always_comb begin
    // period in stable-clock edges is 2^(CW - rate); mask selects its bits
    mask    = CW'((32'd1 << (CW - 32'(rate))) - 1);
    cnt_nxt = cnt + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt         <= '0;
      tick_1hz    <= 1'b0;
      tick_timing <= 1'b0;
    end else begin
      tick_1hz    <= e1hz;
      tick_timing <= 1'b0;
      if (e1hz) begin
        cnt <= '0;
      end else if (estab) begin
        cnt         <= cnt_nxt;
        tick_timing <= ((cnt_nxt & mask) == '0);
      end
    end
  end
endmodule
