// tb_watchdog - a program that writes the watchdog value between ticks is never
// reset; writes of other values do not count; two ticks without a good write
// give exactly one reset pulse.
module tb_watchdog;
  logic clk = 1'b0, rst = 1'b1, tick_1hz = 1'b0, wr = 1'b0, rst_pulse;
  logic [7:0] wdata = '0;
  int checks = 0, failures = 0, pulses = 0;
  always #50 clk = !clk;

  watchdog dut (.*);

  always @(posedge clk) if (rst_pulse) pulses++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic tick();
    @(negedge clk) tick_1hz = 1'b1; @(negedge clk) tick_1hz = 1'b0;
    repeat (3) @(negedge clk);
  endtask

  task automatic write(input logic [7:0] v);
    @(negedge clk) begin wr = 1'b1; wdata = v; end
    @(negedge clk) wr = 1'b0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    int p0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // well-behaved program
    for (int i = 0; i < 20; i++) begin tick(); write(8'hA5); end
    chk(pulses == 0, "no reset while the program writes once per tick");
    // wrong values do not feed the watchdog
    tick(); write(8'h5A); chk(pulses == 0, "one tick: no reset yet");
    tick(); chk(pulses == 1, "second tick after a wrong value resets");
    // restart counting after the pulse
    tick(); chk(pulses == 1, "one tick after the reset");
    tick(); chk(pulses == 2, "two more ticks reset again");
    write(8'hA5);
    for (int i = 0; i < 10; i++) begin
      p0 = pulses; tick(); tick();
      chk(pulses == p0 + 1, "every two silent ticks give one pulse");
    end
    write(8'hA5); tick(); write(8'hA5); tick(); write(8'hA5);
    chk(pulses == 12, "fed again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
