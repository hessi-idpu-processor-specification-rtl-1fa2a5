// tb_diag_reg - writes random bytes to the diagnostic register and checks the
// held value and the strobe, which follows the write one cycle late.
module tb_diag_reg;
  logic clk = 1'b0, rst = 1'b1, wr_active = 1'b0, we = 1'b0, stb;
  logic [7:0] wdata = '0, q, exp_q;
  int checks = 0, failures = 0;
  always #50 clk = !clk;

  diag_reg dut (.clk, .rst, .wr_active, .we, .wdata, .q, .stb);

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

  initial begin
    exp_q = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    chk(q == 8'h00 && !stb, "reset state");
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      wr_active = 1'b1; wdata = 8'($urandom);
      @(negedge clk);
      chk(stb, "strobe high during write");
      chk(q == exp_q, "register holds until write ends");
      repeat (2) @(negedge clk);
      wr_active = 1'b0; we = 1'b1;
      @(negedge clk);
      we = 1'b0; exp_q = wdata; wdata = 8'($urandom);
      chk(q == exp_q, "register loaded");
      @(negedge clk);
      chk(!stb, "strobe low after write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
