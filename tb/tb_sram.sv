// tb_sram - writes random bytes to random addresses of the full 32 KB array
// and reads them back against a reference copy; checks the one-cycle read.
module tb_sram;
  logic clk = 1'b0, we;
  logic [14:0] addr;
  logic [7:0] wdata, rdata;
  logic [7:0] ref_mem [32768];
  int checks = 0, failures = 0;
  always #50 clk = !clk;

  sram dut (.clk, .we, .addr, .wdata, .rdata);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32768; i++) ref_mem[i] = 8'h00;
    we = 1'b0; addr = '0; wdata = '0;
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      addr  = (i < 64) ? 15'(i) : 15'($urandom);
      if ($urandom_range(0, 1) == 1) begin
        we = 1'b1; wdata = 8'($urandom);
        ref_mem[addr] = wdata;
      end else begin
        we = 1'b0;
        @(posedge clk); #1;
        checks++;
        if (rdata !== ref_mem[addr]) begin
          failures++;
          if (failures < 10) $display("FAIL: addr %h read %h expected %h", addr, rdata, ref_mem[addr]);
        end
      end
    end
    @(negedge clk); we = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
