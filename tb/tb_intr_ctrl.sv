// tb_intr_ctrl - random set events (ticks and EOP# falling edges) and clear
// writes, checked against a reference model of the three flip-flops.
module tb_intr_ctrl;
  logic clk = 1'b0, rst = 1'b1, set_1hz = 0, set_timing = 0, eop_n = 1;
  logic [2:0] clr = '0, irq, model;
  logic [2:0] eop_d;
  int checks = 0, failures = 0;
  always #50 clk = !clk;

  intr_ctrl dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: EOP# seen through two flops, fall detected on the third
  always @(posedge clk) begin
    if (rst) begin
      model <= '0; eop_d <= 3'b111;
    end else begin
      eop_d <= {eop_d[1:0], eop_n};
      model <= (model & ~clr) | {(!eop_d[1] && eop_d[2]), set_timing, set_1hz};
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      checks++;
      if (irq !== model) begin
        failures++;
        if (failures < 10) $display("FAIL: irq %b expected %b", irq, model);
      end
      set_1hz    = $urandom_range(0, 15) == 0;
      set_timing = $urandom_range(0, 7) == 0;
      if ($urandom_range(0, 9) == 0) eop_n = !eop_n;
      clr = ($urandom_range(0, 5) == 0) ? 3'($urandom) : 3'b000;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
