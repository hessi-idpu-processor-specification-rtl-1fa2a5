// tb_clock_gen - checks that X1 runs at BUSCLK/3: one high cycle in every three,
// with the rising edges exactly three BUSCLK cycles apart.
module tb_clock_gen;
  logic clk = 1'b0, rst = 1'b1, x1_clk;
  int checks = 0, failures = 0;
  always #50 clk = !clk;

  clock_gen dut (.clk, .rst, .x1_clk);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int highs, last_rise, cyc;
    logic prev;
    highs = 0; last_rise = -1; cyc = 0; prev = 1'b0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    @(posedge clk);
    repeat (300) begin
      @(posedge clk); #1;
      cyc++;
      if (x1_clk) highs++;
      if (x1_clk && !prev) begin
        if (last_rise >= 0) begin
          checks++;
          if (cyc - last_rise != 3) begin
            failures++;
            $display("FAIL: X1 period %0d", cyc - last_rise);
          end
        end
        last_rise = cyc;
      end
      prev = x1_clk;
    end
    checks++;
    if (highs != 100) begin
      failures++;
      $display("FAIL: %0d high cycles in 300", highs);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
