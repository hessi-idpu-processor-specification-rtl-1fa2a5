// tb_prom - loads a short program image into the PROM and checks that its
// bytes read back with one cycle of latency, and that the rest reads FFh
// like a blank part.
module tb_prom;
  logic clk = 1'b0;
  logic [12:0] addr;
  logic [7:0] rdata;
  logic [7:0] image [8] = '{8'h3E, 8'h01, 8'hD3, 8'hB0, 8'hC3, 8'h00, 8'h20, 8'h76};
  int checks = 0, failures = 0;
  always #50 clk = !clk;

  prom #(.INIT_FILE("tb/prom_boot.hex")) dut (.clk, .addr, .rdata);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      addr = (i < 16) ? 13'(i) : 13'($urandom);
      exp  = (addr < 8) ? image[addr] : 8'hFF;
      @(posedge clk); #1;
      checks++;
      if (rdata !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL: addr %h read %h expected %h", addr, rdata, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
