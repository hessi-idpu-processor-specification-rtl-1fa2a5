// tb_adc_if - starts conversions on an LTC1604 model and checks the result,
// the busy/done status, that RD# is only pulled after BUSY# returns high, and
// the conversion time seen as busy (conversion plus the pulse overheads).
module tb_adc_if;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic adc_busy_n, adc_cs_n, adc_convst_n, adc_rd_n, busy, done;
  logic [15:0] adc_d, data, sample;
  int conversions;
  int checks = 0, failures = 0, early_reads = 0;
  always #50 clk = !clk;

  adc_if dut (.*);
  ltc1604_model adc (.cs_n(adc_cs_n), .convst_n(adc_convst_n), .rd_n(adc_rd_n),
                     .busy_n(adc_busy_n), .d(adc_d), .sample, .conversions);

  always @(posedge clk) if (!adc_rd_n && !adc_busy_n) early_reads++;

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
    int cyc;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    chk(!busy && !done, "idle after reset");
    for (int i = 0; i < 20; i++) begin
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      chk(busy && !done, "busy after start");
      cyc = 0;
      while (busy && cyc < 1000) begin
        @(negedge clk); cyc++;
        if (cyc == 10) begin start = 1'b1; @(negedge clk) start = 1'b0; cyc++; end
      end
      chk(done, "done after conversion");
      chk(data == sample, $sformatf("result %h expected %h", data, sample));
      chk(conversions == i + 1, "one conversion per start");
      // 27 cycles of conversion, 4 of CONVST, 4 of RD, 2 sync, some edge slack
      chk(cyc >= 32 && cyc <= 40, $sformatf("conversion took %0d cycles", cyc));
      repeat ($urandom_range(1, 20)) @(negedge clk);
      chk(done && !busy, "done holds");
    end
    chk(early_reads == 0, "no read during conversion");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
