// tb_addr_latch - runs 8085-style memory and I/O cycles (address on AD7..0
// under ALE, then a read or write strobe) and 82C37-style DMA cycles (upper
// address under ADSTB, own strobes) and checks the merged system bus: the
// latched 16-bit address, the strobe levels, the end-of-strobe pulses and the
// write data captured on the last strobe cycle.
module tb_addr_latch;
  import idpu_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic [7:0] ad_in = '0, a_hi = '0, dma_a_lo = '0;
  logic ale = 0, io_m = 0, rd_n = 1, wr_n = 1;
  logic dma_aen = 0, dma_adstb = 0, dma_memr_n = 1, dma_memw_n = 1, dma_ior_n = 1, dma_iow_n = 1;
  sysbus_t bus;
  int checks = 0, failures = 0;
  always #50 clk = !clk;

  addr_latch dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // one processor cycle; T-states of 6 BUSCLK cycles
  task automatic cpu_cycle(input logic io, input logic wr, input logic [15:0] a, input logic [7:0] d);
    int seen_level, seen_end;
    logic [7:0] got_w;
    seen_level = 0; seen_end = 0; got_w = '0;
    @(negedge clk);
    io_m = io; a_hi = a[15:8]; ad_in = a[7:0]; ale = 1'b1;
    repeat (3) @(negedge clk);
    ale = 1'b0;
    repeat (3) @(negedge clk);
    ad_in = wr ? d : 8'($urandom);
    if (wr) wr_n = 1'b0; else rd_n = 1'b0;
    for (int i = 0; i < 14; i++) begin
      @(negedge clk);
      if (i == 9) begin wr_n = 1'b1; rd_n = 1'b1; ad_in = 8'($urandom); end
      if (bus.addr == a && !bus.dma &&
          ((io && wr && bus.iow) || (io && !wr && bus.ior) || (!io && wr && bus.memw) || (!io && !wr && bus.memr)))
        seen_level++;
      if ((io && wr && bus.iow_end) || (io && !wr && bus.ior_end) || (!io && wr && bus.memw_end)) begin
        seen_end++;
        chk(bus.addr == a, "address held at end pulse");
        got_w = bus.wdata;
      end
    end
    chk(seen_level == 10, $sformatf("strobe level seen %0d cycles at %h", seen_level, a));
    if (io || wr) chk(seen_end == 1, "one end pulse");
    if (wr) chk(got_w == d, $sformatf("write data %h expected %h", got_w, d));
  endtask

  task automatic dma_cycle(input logic to_mem, input logic [15:0] a, input logic [7:0] d);
    int seen;
    seen = 0;
    @(negedge clk);
    dma_aen = 1'b1; ad_in = a[15:8]; dma_adstb = 1'b1; dma_a_lo = a[7:0];
    @(negedge clk);
    dma_adstb = 1'b0; ad_in = d;
    if (to_mem) begin dma_memw_n = 1'b0; dma_ior_n = 1'b0; end
    else        begin dma_memr_n = 1'b0; dma_iow_n = 1'b0; end
    repeat (6) begin
      @(negedge clk);
      if (bus.dma && bus.addr == a && (to_mem ? (bus.memw && bus.ior) : (bus.memr && bus.iow))) seen++;
    end
    {dma_memw_n, dma_ior_n, dma_memr_n, dma_iow_n} = '1;
    @(negedge clk);
    chk(to_mem ? bus.memw_end : bus.iow_end, "DMA end pulse");
    chk(bus.addr == a, "DMA address held");
    chk(bus.wdata == d, "DMA write data");
    dma_aen = 1'b0;
    chk(seen == 6, $sformatf("DMA strobes seen %0d", seen));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 300; i++) begin
      case ($urandom_range(0, 4))
        0: cpu_cycle(1'b0, 1'b0, 16'($urandom), '0);
        1: cpu_cycle(1'b0, 1'b1, 16'($urandom), 8'($urandom));
        2: cpu_cycle(1'b1, 1'b0, 16'($urandom), '0);
        3: cpu_cycle(1'b1, 1'b1, 16'($urandom), 8'($urandom));
        default: dma_cycle($urandom_range(0, 1) == 1, 16'($urandom), 8'($urandom));
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
