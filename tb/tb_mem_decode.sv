// tb_mem_decode - random memory cycles against the decode rule: reads below
// 8 KB go to the PROM while it is powered, everything else to the RAM.
module tb_mem_decode;
  import idpu_pkg::*;
  sysbus_t bus;
  logic prom_on, prom_rd, ram_rd, ram_we;
  int checks = 0, failures = 0;

  mem_decode dut (.bus, .prom_on, .prom_rd, .ram_rd, .ram_we);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_prom, exp_ram, exp_we;
    for (int i = 0; i < 4000; i++) begin
      bus = '0;
      bus.addr     = (i % 3 == 0) ? 16'($urandom_range(0, 16383)) : 16'($urandom);
      bus.memr     = $urandom_range(0, 1) == 1;
      bus.memw     = !bus.memr && $urandom_range(0, 1) == 1;
      bus.memw_end = $urandom_range(0, 3) == 0;
      prom_on      = $urandom_range(0, 1) == 1;
      #10;
      exp_prom = bus.memr && prom_on && bus.addr < 16'h2000;
      exp_ram  = bus.memr && !exp_prom;
      exp_we   = bus.memw_end;
      checks++;
      if (prom_rd !== exp_prom || ram_rd !== exp_ram || ram_we !== exp_we) begin
        failures++;
        if (failures < 10)
          $display("FAIL: addr=%h r=%b on=%b -> prom=%b ram=%b we=%b", bus.addr, bus.memr,
                   prom_on, prom_rd, ram_rd, ram_we);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
