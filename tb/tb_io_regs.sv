// tb_io_regs - processor I/O cycles on the system bus to every one of the 256
// ports: checks the backplane, board-register and DMA-controller selects
// against the port map, the glue register writes (PROM power, timing rate),
// the one-cycle write pulses and the read-back multiplexer, and that DMA cycles
// decode nothing.
module tb_io_regs;
  import idpu_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  sysbus_t bus;
  logic prom_on, wdog_wr, uart_clr, adc_start, diag_we, diag_active, local_rd;
  logic bp_sel, ext_sel, dma_cs_n;
  logic [2:0] rate, int_clr;
  logic [2:0] irq = 3'b101;
  logic [7:0] uart_status = 8'h3C, diag_q = 8'h96, rdata;
  logic adc_busy = 1'b1, adc_done = 1'b0;
  logic [15:0] adc_data = 16'hBEEF;
  int checks = 0, failures = 0;
  int n_wdog = 0, n_clr = 0, n_uclr = 0, n_adc = 0, n_diag = 0;
  always #50 clk = !clk;

  io_regs dut (.*);

  always @(posedge clk) begin
    if (wdog_wr)   n_wdog++;
    if (int_clr != 0) n_clr++;
    if (uart_clr)  n_uclr++;
    if (adc_start) n_adc++;
    if (diag_we)   n_diag++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic logic [7:0] exp_read(input logic [7:0] p);
    case (p)
      8'hB0: return {7'd0, prom_on};
      8'hB2: return {5'd0, irq};
      8'hB3: return {5'd0, rate};
      8'hB4: return uart_status;
      8'hB8: return {6'd0, adc_done, adc_busy};
      8'hB9: return adc_data[7:0];
      8'hBA: return adc_data[15:8];
      8'hBF: return diag_q;
      default: return 8'h00;
    endcase
  endfunction

  task automatic io(input logic wr, input logic [7:0] p, input logic [7:0] d, input logic dma);
    @(negedge clk);
    bus = '0; bus.addr = {p, p}; bus.dma = dma; bus.data = d;
    if (wr) bus.iow = 1'b1; else bus.ior = 1'b1;
    #1;
    chk(bp_sel  == (!dma && (p <= 8'hAF || p >= 8'hF0)), $sformatf("bp_sel port %h", p));
    chk(ext_sel == (!dma && p >= 8'hC0 && p <= 8'hDF), $sformatf("ext_sel port %h", p));
    chk(dma_cs_n == !(!dma && p >= 8'hE0 && p <= 8'hEF), $sformatf("dma_cs_n port %h", p));
    if (!wr) begin
      chk(local_rd == (!dma && p[7:4] == 4'hB), $sformatf("local_rd port %h", p));
      if (!dma && p[7:4] == 4'hB) chk(rdata == exp_read(p), $sformatf("read port %h = %h", p, rdata));
    end else begin
      chk(diag_active == (!dma && p == 8'hBF), "diag strobe level");
    end
    @(negedge clk);
    bus.ior = 1'b0; bus.iow = 1'b0; bus.wdata = d;
    if (wr) bus.iow_end = 1'b1; else bus.ior_end = 1'b1;
    @(negedge clk);
    bus = '0; bus.addr = {p, p};
  endtask

  initial begin
    bus = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    chk(prom_on && rate == 0, "reset values");
    for (int p = 0; p < 256; p++) io(1'b0, 8'(p), 8'h00, 1'b0);
    io(1'b1, 8'hB3, 8'h05, 1'b0); chk(rate == 3'd5, "timing rate written");
    io(1'b1, 8'hB0, 8'h00, 1'b0); chk(!prom_on, "PROM switched off");
    io(1'b0, 8'hB0, 8'h00, 1'b0);
    io(1'b1, 8'hB0, 8'h01, 1'b0); chk(prom_on, "PROM switched on");
    io(1'b1, 8'hB0, 8'h00, 1'b1); chk(prom_on, "DMA cycle does not write");
    io(1'b1, 8'hB1, 8'hA5, 1'b0);
    io(1'b1, 8'hB2, 8'h06, 1'b0);
    io(1'b1, 8'hB4, 8'h00, 1'b0);
    io(1'b1, 8'hB8, 8'h00, 1'b0);
    io(1'b1, 8'hBF, 8'h5A, 1'b0);
    io(1'b1, 8'h10, 8'h00, 1'b0);
    io(1'b1, 8'hB1, 8'hA5, 1'b1);
    chk(n_wdog == 1 && n_clr == 1 && n_uclr == 1 && n_adc == 1 && n_diag == 1,
        $sformatf("write pulses %0d %0d %0d %0d %0d", n_wdog, n_clr, n_uclr, n_adc, n_diag));
    for (int i = 0; i < 300; i++) io($urandom_range(0, 1) == 1, 8'($urandom), 8'h00, 1'b1);
    io(1'b1, 8'hB3, 8'h07, 1'b0); io(1'b0, 8'hB3, 8'h00, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
