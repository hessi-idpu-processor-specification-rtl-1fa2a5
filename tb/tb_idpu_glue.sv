// tb_idpu_glue - end-to-end test of the processor glue at its default sizes.
//
// The testbench plays the parts around the glue FPGA: an 8085 bus-cycle model
// (T-states of six BUSCLK cycles, address under ALE, then RD# or WR#), an
// 82C37 model doing fly-by transfers between the UART and the SRAM, an LTC1604
// model, the spacecraft serial line, and the 1 Hz / stable clock references
// (one simulated "second" is 1024 stable clock periods of 80 BUSCLK cycles).
// It boots from a PROM image, exercises every glue function, and counts each
// mechanism of the design; a mechanism that never happened is a failure.
module tb_idpu_glue;
  import idpu_pkg::*;
  localparam int CPB    = 1042;   // UART bit time at the design default
  localparam int SHALF  = 40;     // stable clock half period, BUSCLK cycles

  logic clk = 1'b0, por_n = 1'b0, sc_reset = 1'b0;
  logic x1_clk, cpu_reset_n, bp_reset_n;
  logic [7:0] ad_in = '0, ad_out, a_hi = '0, dma_a_lo = '0;
  logic ad_oe, ale = 0, io_m = 0, rd_n = 1, wr_n = 1;
  logic dma_aen = 0, dma_adstb = 0, dma_memr_n = 1, dma_memw_n = 1, dma_ior_n = 1, dma_iow_n = 1;
  logic dma_dack_rx = 0, dma_dack_tx = 0, dma_eop_n = 1, dreq_rx, dreq_tx, dma_cs_n;
  logic rst55, rst65, rst75, clk1hz = 0, stable_clk = 0, uart_rxd = 1, uart_txd;
  logic adc_busy_n, adc_cs_n, adc_convst_n, adc_rd_n;
  logic [15:0] adc_d, adc_sample;
  int adc_conversions;
  logic [7:0] diag_q;
  logic diag_stb, prom_pwr, bp_sel, ext_sel;

  int checks = 0, failures = 0;
  always #50 clk = !clk;

  idpu_glue dut (.*);
  ltc1604_model adc (.cs_n(adc_cs_n), .convst_n(adc_convst_n), .rd_n(adc_rd_n),
                     .busy_n(adc_busy_n), .d(adc_d), .sample(adc_sample),
                     .conversions(adc_conversions));

  // ---------------- mechanism counters ----------------
  int n_prom_rd, n_ram_rd, n_ram_wr, n_prom_off_rd, n_mirror, n_por, n_sc_rst, n_wdog_rst;
  int n_rst55, n_rst65, n_rst75, n_int_clr, n_rate, n_dma_rx, n_dma_tx, n_perr;
  int n_adc, n_diag, n_bp, n_ext, n_dmacs, n_prom_restore, n_x1;
  initial begin
    {n_prom_rd, n_ram_rd, n_ram_wr, n_prom_off_rd, n_mirror, n_por, n_sc_rst, n_wdog_rst} = '0;
    {n_rst55, n_rst65, n_rst75, n_int_clr, n_rate, n_dma_rx, n_dma_tx, n_perr} = '0;
    {n_adc, n_diag, n_bp, n_ext, n_dmacs, n_prom_restore, n_x1} = '0;
  end

  logic p55, p65, p75, pstb, px1;
  always @(posedge clk) begin
    p55 <= rst55; p65 <= rst65; p75 <= rst75; pstb <= diag_stb; px1 <= x1_clk;
    if (rst55 && !p55) n_rst55++;
    if (rst65 && !p65) n_rst65++;
    if (rst75 && !p75) n_rst75++;
    if (diag_stb && !pstb) n_diag++;
    if (x1_clk && !px1) n_x1++;
  end

  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 30) $display("FAIL: %s", what); end
  endtask

  // ---------------- time references ----------------
  logic refs_on = 1'b0;
  int   sec_count = 0;
  initial begin
    forever begin
      for (int e = 0; e < 1024; e++) begin
        if (refs_on && e == 0)   clk1hz = 1'b1;
        if (e == 512) clk1hz = 1'b0;
        repeat (SHALF) @(negedge clk);
        stable_clk = refs_on;
        repeat (SHALF) @(negedge clk);
        stable_clk = 1'b0;
      end
      if (refs_on) sec_count++;
    end
  end

  // ---------------- 8085 bus-cycle model ----------------
  localparam int T = 6;   // BUSCLK cycles per T-state
  int max_read_lat = 0;

  task automatic cpu_cycle(input logic io, input logic wr, input logic [15:0] a,
                           input logic [7:0] wd, output logic [7:0] rdat);
    int lat;
    @(negedge clk);
    io_m = io; a_hi = a[15:8]; ad_in = a[7:0]; ale = 1'b1;
    repeat (T / 2) @(negedge clk);
    ale = 1'b0;
    repeat (T / 2) @(negedge clk);
    lat = -1;
    if (wr) begin ad_in = wd; wr_n = 1'b0; end
    else    begin ad_in = 8'h00; rd_n = 1'b0; end
    // strobe for T2 and half of T3
    for (int i = 0; i < T + T / 2; i++) begin
      @(negedge clk);
      if (!wr && ad_oe && lat < 0) lat = i + 1;
    end
    rdat = ad_oe ? ad_out : ad_in;
    if (!wr && lat > max_read_lat) max_read_lat = lat;
    rd_n = 1'b1; wr_n = 1'b1;
    repeat (T / 2) @(negedge clk);
  endtask

  task automatic mem_wr(input logic [15:0] a, input logic [7:0] d);
    logic [7:0] x;
    cpu_cycle(1'b0, 1'b1, a, d, x);
  endtask
  task automatic mem_rd(input logic [15:0] a, output logic [7:0] d);
    cpu_cycle(1'b0, 1'b0, a, 8'h00, d);
  endtask
  task automatic io_wr(input logic [7:0] p, input logic [7:0] d);
    logic [7:0] x;
    cpu_cycle(1'b1, 1'b1, {p, p}, d, x);
  endtask
  task automatic io_rd(input logic [7:0] p, output logic [7:0] d);
    cpu_cycle(1'b1, 1'b0, {p, p}, 8'h00, d);
  endtask

  // ---------------- 82C37 fly-by model ----------------
  task automatic dma_xfer(input logic to_mem, input logic [15:0] a);
    @(negedge clk);
    dma_aen = 1'b1; dma_adstb = 1'b1; ad_in = a[15:8]; dma_a_lo = a[7:0];
    repeat (2) @(negedge clk);
    dma_adstb = 1'b0;
    if (to_mem) dma_dack_rx = 1'b1; else dma_dack_tx = 1'b1;
    @(negedge clk);
    if (to_mem) begin dma_ior_n = 1'b0; dma_memw_n = 1'b0; end
    else        begin dma_memr_n = 1'b0; dma_iow_n = 1'b0; end
    repeat (T) @(negedge clk);
    {dma_ior_n, dma_memw_n, dma_memr_n, dma_iow_n} = '1;
    @(negedge clk);
    dma_dack_rx = 1'b0; dma_dack_tx = 1'b0; dma_aen = 1'b0;
    @(negedge clk);
  endtask

  task automatic eop_pulse();
    @(negedge clk) dma_eop_n = 1'b0;
    repeat (T) @(negedge clk);
    dma_eop_n = 1'b1;
  endtask

  // ---------------- serial line ----------------
  task automatic send(input logic [7:0] b, input logic bad_par);
    logic [10:0] f;
    f = {1'b1, (~^b) ^ bad_par, b, 1'b0};
    for (int i = 0; i < 11; i++) begin
      uart_rxd = f[i];
      repeat (CPB) @(negedge clk);
    end
  endtask

  logic [7:0] tx_exp [16];
  int tx_got = 0;
  initial begin
    logic [10:0] f;
    forever begin
      @(negedge clk);
      if (cpu_reset_n && !uart_txd) begin
        repeat (CPB / 2) @(negedge clk);
        for (int i = 1; i < 11; i++) begin
          repeat (CPB) @(negedge clk);
          f[i] = uart_txd;
        end
        chk(f[8:1] == tx_exp[tx_got] && (^f[9:1]) && f[10],
            $sformatf("serial out %h expected %h", f[8:1], tx_exp[tx_got]));
        tx_got++;
      end
    end
  end

  // ---------------- the test ----------------
  logic [7:0] image [8] = '{8'h3E, 8'h01, 8'hD3, 8'hB0, 8'hC3, 8'h00, 8'h20, 8'h76};
  logic [7:0] rx_block [4] = '{8'hC5, 8'h3A, 8'h00, 8'hFF};

  task automatic wait_run();
    while (!cpu_reset_n) @(negedge clk);
    repeat (4) @(negedge clk);
  endtask

  initial begin
    logic [7:0] d, lo, hi;
    int t0;
    // program the boot PROM (the part is programmed before it is fitted)
    #1 $readmemh("tb/prom_boot.hex", dut.u_prom.mem);
    // power-on
    repeat (20) @(negedge clk);
    chk(!cpu_reset_n && !bp_reset_n, "power-on reset held");
    por_n = 1'b1;
    wait_run();
    n_por++;
    chk(prom_pwr, "PROM powered after reset");

    // boot PROM image at address 0
    for (int i = 0; i < 8; i++) begin
      mem_rd(16'(i), d);
      chk(d == image[i], $sformatf("PROM byte %0d = %h", i, d));
      n_prom_rd++;
    end
    mem_rd(16'h1FFF, d); chk(d == 8'hFF, "blank PROM top byte"); n_prom_rd++;

    // RAM: writes everywhere, reads above 8 KB and the A15 mirror
    mem_wr(16'h0010, 8'h77); n_ram_wr++;
    mem_rd(16'h0010, d); chk(d == 8'hFF, "PROM shadows the RAM while powered");
    for (int i = 0; i < 16; i++) begin
      mem_wr(16'h2000 + 16'(i * 37), 8'(i * 11 + 3)); n_ram_wr++;
    end
    for (int i = 0; i < 16; i++) begin
      mem_rd(16'h2000 + 16'(i * 37), d);
      chk(d == 8'(i * 11 + 3), $sformatf("RAM read %h", d)); n_ram_rd++;
    end
    mem_rd(16'hA000, d); chk(d == 8'h03, "RAM repeats above 32 KB"); n_mirror++;
    chk(max_read_lat <= 3, $sformatf("read data after %0d cycles", max_read_lat));

    // PROM off: low addresses read the RAM
    io_wr(IO_PROMCTL, 8'h00);
    chk(!prom_pwr, "PROM switch off");
    mem_rd(16'h0010, d); chk(d == 8'h77, "RAM below 8 KB with PROM off"); n_prom_off_rd++;
    io_rd(IO_PROMCTL, d); chk(d == 8'h00, "PROM control read back");

    // I/O selects
    fork
      begin
        io_wr(8'h20, 8'h00); io_wr(8'hF3, 8'h00);
        io_rd(8'hC4, d); io_wr(8'hE8, 8'h00);
      end
      begin
        repeat (4 * 30) begin
          @(negedge clk);
          if (bp_sel) n_bp++;
          if (ext_sel) n_ext++;
          if (!dma_cs_n) n_dmacs++;
        end
      end
    join

    // diagnostic register
    io_wr(IO_DIAG, 8'h5C);
    chk(diag_q == 8'h5C, "diagnostic register"); io_rd(IO_DIAG, d); chk(d == 8'h5C, "diag read back");

    // ADC conversion, polled
    io_wr(IO_ADCCTL, 8'h01);
    io_rd(IO_ADCCTL, d); chk(d[0], "ADC busy");
    t0 = 0;
    do begin io_rd(IO_ADCCTL, d); t0++; end while (!d[1] && t0 < 100);
    io_rd(IO_ADCLO, lo); io_rd(IO_ADCHI, hi);
    chk({hi, lo} == adc_sample, $sformatf("ADC result %h expected %h", {hi, lo}, adc_sample));
    n_adc++;

    // time references on: 1 s and timing interrupts, watchdog fed
    refs_on = 1'b1;
    io_wr(IO_TIMRATE, 8'h02); n_rate++;
    io_wr(IO_INTCLR, 8'h07);
    t0 = sec_count;
    while (sec_count < t0 + 2) begin
      io_wr(IO_WDOG, 8'hA5);
      repeat (2000) @(negedge clk);
      if (rst65) begin io_wr(IO_INTCLR, 8'h02); n_int_clr++; chk(!rst65, "RST6.5 cleared"); end
    end
    chk(rst55, "1 second interrupt pending");
    io_rd(IO_INTCLR, d); chk(d[0], "pending register shows RST5.5");
    io_wr(IO_INTCLR, 8'h01); chk(!rst55, "RST5.5 cleared");
    chk(cpu_reset_n, "no watchdog reset while fed");

    // timing interrupt rate: count ticks over one second at 32 Hz
    begin
      int ticks;
      ticks = 0;
      io_wr(IO_WDOG, 8'hA5);
      @(posedge clk1hz);
      fork
        begin io_wr(IO_WDOG, 8'hA5); @(posedge clk1hz); end
        forever begin @(posedge clk); if (dut.tick_timing) ticks++; end
      join_any
      disable fork;
      chk(ticks == 32, $sformatf("%0d timing ticks in a second at rate 2", ticks));
    end
    io_wr(IO_WDOG, 8'hA5);

    // UART receive block by DMA into RAM, one byte with a parity error
    for (int i = 0; i < 4; i++) begin
      send(rx_block[i], i == 2);
      t0 = 0;
      while (!dreq_rx && t0 < 4 * CPB) begin @(negedge clk); t0++; end
      chk(dreq_rx, "receive DMA request");
      dma_xfer(1'b1, 16'h3000 + 16'(i));
      n_dma_rx++;
      io_wr(IO_WDOG, 8'hA5);
    end
    eop_pulse();
    repeat (5) @(negedge clk);
    chk(rst75, "DMA end interrupt"); io_wr(IO_INTCLR, 8'h04); chk(!rst75, "RST7.5 cleared");
    io_wr(IO_WDOG, 8'hA5);
    for (int i = 0; i < 4; i++) begin
      mem_rd(16'h3000 + 16'(i), d);
      chk(d == rx_block[i], $sformatf("received byte %h expected %h", d, rx_block[i]));
    end
    io_rd(IO_UARTSTAT, d); chk(d[0], "parity error latched"); n_perr += d[0];
    io_wr(IO_UARTSTAT, 8'h00);
    io_rd(IO_UARTSTAT, d); chk(!d[0], "parity error cleared");

    // UART transmit block by DMA from RAM
    for (int i = 0; i < 3; i++) begin
      tx_exp[i] = 8'(8'h81 + i * 7);
      mem_wr(16'h4000 + 16'(i), tx_exp[i]);
    end
    io_wr(IO_WDOG, 8'hA5);
    for (int i = 0; i < 3; i++) begin
      while (!dreq_tx) @(negedge clk);
      dma_xfer(1'b0, 16'h4000 + 16'(i));
      n_dma_tx++;
    end
    while (tx_got < 3) begin
      repeat (4000) @(negedge clk);
      io_wr(IO_WDOG, 8'hA5);
    end
    eop_pulse();
    io_wr(IO_INTCLR, 8'h07);

    // spacecraft reset: PROM comes back on
    io_wr(IO_PROMCTL, 8'h00);
    @(negedge clk) sc_reset = 1'b1;
    repeat (10) @(negedge clk);
    sc_reset = 1'b0;
    chk(!cpu_reset_n && !bp_reset_n, "spacecraft reset reaches processor and backplane");
    wait_run();
    n_sc_rst++;
    chk(prom_pwr, "PROM on after spacecraft reset"); n_prom_restore += prom_pwr;
    chk(diag_q == 8'h00, "glue registers reset");
    mem_rd(16'h0010, d); chk(d == 8'hFF, "reading the PROM again");
    mem_rd(16'h3001, d); chk(d == rx_block[1], "RAM keeps its contents over reset");

    // watchdog: stop writing and wait for the reset
    io_wr(IO_PROMCTL, 8'h00);
    io_wr(IO_WDOG, 8'hA5);
    t0 = sec_count;
    while (cpu_reset_n && sec_count < t0 + 4) @(negedge clk);
    chk(!cpu_reset_n, "watchdog reset");
    chk(sec_count - t0 <= 2, "watchdog within two seconds");
    wait_run();
    n_wdog_rst++;
    chk(prom_pwr, "PROM on after watchdog reset"); n_prom_restore += prom_pwr;

    // ---- every mechanism happened ----
    chk(n_x1 > 1000, "X1 clock runs");
    chk(n_por > 0, "power-on reset");
    chk(n_prom_rd > 0, "PROM read");
    chk(n_ram_wr > 0 && n_ram_rd > 0, "RAM read/write");
    chk(n_prom_off_rd > 0, "PROM off");
    chk(n_mirror > 0, "RAM mirror");
    chk(n_bp > 0, "backplane select");
    chk(n_ext > 0, "board register select");
    chk(n_dmacs > 0, "DMA chip select");
    chk(n_diag > 0, "diagnostic strobe");
    chk(n_adc > 0, "ADC conversion");
    chk(n_rst55 > 0, "RST5.5");
    chk(n_rst65 > 0, "RST6.5");
    chk(n_rst75 > 0, "RST7.5");
    chk(n_int_clr > 0, "interrupt clear");
    chk(n_rate > 0, "timing rate change");
    chk(n_dma_rx > 0, "receive DMA");
    chk(n_dma_tx > 0 && tx_got == 3, "transmit DMA");
    chk(n_perr > 0, "parity error latch");
    chk(n_sc_rst > 0, "spacecraft reset");
    chk(n_wdog_rst > 0, "watchdog reset");
    chk(n_prom_restore == 2, "PROM power restored by reset");
    $display("mechanisms: prom_rd=%0d ram_rd=%0d ram_wr=%0d prom_off=%0d mirror=%0d bp=%0d ext=%0d dmacs=%0d diag=%0d adc=%0d",
             n_prom_rd, n_ram_rd, n_ram_wr, n_prom_off_rd, n_mirror, n_bp, n_ext, n_dmacs, n_diag, n_adc);
    $display("mechanisms: rst55=%0d rst65=%0d rst75=%0d intclr=%0d rate=%0d dma_rx=%0d dma_tx=%0d perr=%0d por=%0d sc=%0d wdog=%0d",
             n_rst55, n_rst65, n_rst75, n_int_clr, n_rate, n_dma_rx, n_dma_tx, n_perr, n_por, n_sc_rst, n_wdog_rst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
