// tb_reset_ctrl - power-on, spacecraft and watchdog resets: each must hold the
// processor and backplane resets active, and release them RESET_CYCLES (8
// here) cycles after the source goes away.
module tb_reset_ctrl;
  logic clk = 1'b0, por_n = 1'b0, sc_reset = 1'b0, wdog_rst = 1'b0;
  logic por_rst, sys_rst, cpu_reset_n, bp_reset_n;
  int checks = 0, failures = 0;
  always #50 clk = !clk;

  reset_ctrl #(.RESET_CYCLES(8)) dut (.*);

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

  // count cycles until the processor reset releases
  task automatic measure(output int n);
    n = 0;
    while (!cpu_reset_n && n < 1000) begin @(negedge clk); n++; end
  endtask

  initial begin
    int n;
    repeat (5) @(negedge clk);
    chk(por_rst && !cpu_reset_n && !bp_reset_n, "held in power-on reset");
    por_n = 1'b1;
    measure(n);
    chk(n == 8 + 2 + 1, $sformatf("power-on release after %0d", n));
    chk(!por_rst && cpu_reset_n && bp_reset_n, "released");
    for (int k = 0; k < 20; k++) begin
      repeat ($urandom_range(2, 30)) @(negedge clk);
      chk(cpu_reset_n, "no reset without a source");
      if (k % 2 == 0) begin
        wdog_rst = 1'b1; @(negedge clk); wdog_rst = 1'b0;
        chk(!cpu_reset_n && !bp_reset_n, "watchdog asserts reset");
        measure(n);
        chk(n == 8, $sformatf("watchdog reset length %0d", n));
      end else begin
        sc_reset = 1'b1; repeat (4) @(negedge clk); sc_reset = 1'b0;
        chk(!cpu_reset_n, "spacecraft reset asserts reset");
        measure(n);
        chk(n == 8 + 2, $sformatf("spacecraft reset tail %0d", n));
      end
      chk(!por_rst, "power-on reset stays released");
    end
    por_n = 1'b0; #10;
    chk(por_rst, "power-on reset asserts at once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
