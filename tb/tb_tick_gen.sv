// tb_tick_gen - drives a 1024-edge-per-second stable clock and a 1 Hz clock
// (both scaled in time) and counts timing ticks over one second for each of
// the eight rates: 8 << rate ticks are expected. Also checks one 1 Hz tick per
// second and that the 1 Hz edge restarts the timing divider.
module tb_tick_gen;
  localparam int HALF = 4;                     // stable clock half period, BUSCLK cycles
  logic clk = 1'b0, rst = 1'b1, clk1hz = 1'b0, stable_clk = 1'b0;
  logic [2:0] rate = '0;
  logic tick_1hz, tick_timing;
  int checks = 0, failures = 0, n_timing = 0, n_1hz = 0;
  always #50 clk = !clk;

  tick_gen #(.STABLE_HZ(1024)) dut (.*);

  always @(posedge clk) begin
    if (tick_timing) n_timing++;
    if (tick_1hz)    n_1hz++;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one "second": 1024 stable clock periods, CLK1HZ rising at the start
  task automatic second();
    for (int e = 0; e < 1024; e++) begin
      if (e == 0) clk1hz = 1'b1;
      if (e == 512) clk1hz = 1'b0;
      repeat (HALF) @(negedge clk);
      stable_clk = 1'b1;
      repeat (HALF) @(negedge clk);
      stable_clk = 1'b0;
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    second();                       // align
    for (int r = 0; r < 8; r++) begin
      rate = 3'(r);
      second();                     // settle on the new rate
      n_timing = 0; n_1hz = 0;
      second();
      chk(n_timing == (8 << r), $sformatf("rate %0d: %0d ticks, expected %0d", r, n_timing, 8 << r));
      chk(n_1hz == 1, $sformatf("1 Hz ticks %0d", n_1hz));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
