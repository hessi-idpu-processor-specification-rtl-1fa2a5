// tb_uart - the UART against a serial model and a DMA model.
// Receive: random bytes are sent with correct or wrong parity (and one bad
// stop bit); each must raise DREQ, be handed over during DACK + I/O read, and
// set the parity / framing flags exactly when they were wrong; a byte that
// arrives while the buffer is still full must set overrun. Transmit: bytes are
// written by DMA cycles whenever DREQ is high and decoded from TXD, checking
// data, parity, stop bit and the bit time.
module tb_uart;
  import idpu_pkg::*;
  localparam int CPB = 16;
  logic clk = 1'b0, rst = 1'b1, rxd = 1'b1, txd;
  sysbus_t bus;
  logic dack_rx = 0, dack_tx = 0, dreq_rx, dreq_tx, rx_drive, status_clr = 0;
  logic [7:0] rx_data, status;
  int checks = 0, failures = 0;
  always #50 clk = !clk;

  uart #(.CLKS_PER_BIT(CPB)) dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic send(input logic [7:0] b, input logic bad_par, input logic bad_stop);
    logic [10:0] f;
    f = {!bad_stop, (~^b) ^ bad_par, b, 1'b0};
    for (int i = 0; i < 11; i++) begin
      rxd = f[i];
      repeat (CPB) @(negedge clk);
    end
    rxd = 1'b1;
  endtask

  // DMA channel: I/O read with DACK (fly-by into memory)
  task automatic dma_read(output logic [7:0] b);
    @(negedge clk);
    dack_rx = 1'b1;
    @(negedge clk);
    chk(!dreq_rx, "DREQ drops with DACK");
    bus = '0; bus.dma = 1'b1; bus.ior = 1'b1; bus.memw = 1'b1;
    repeat (3) @(negedge clk);
    chk(rx_drive, "UART drives the bus during the DMA read");
    b = rx_data;
    bus.ior = 1'b0; bus.memw = 1'b0; bus.ior_end = 1'b1; bus.memw_end = 1'b1;
    @(negedge clk);
    bus = '0; dack_rx = 1'b0;
    @(negedge clk);
  endtask

  task automatic dma_write(input logic [7:0] b);
    @(negedge clk);
    dack_tx = 1'b1;
    bus = '0; bus.dma = 1'b1; bus.memr = 1'b1; bus.iow = 1'b1; bus.data = b;
    repeat (3) @(negedge clk);
    bus.iow = 1'b0; bus.memr = 1'b0; bus.iow_end = 1'b1; bus.wdata = b;
    @(negedge clk);
    bus = '0; dack_tx = 1'b0;
  endtask

  // transmit side: a DMA process feeding bytes and a serial decoder
  logic [7:0] tx_bytes [64];
  int tx_sent = 0, tx_got = 0;
  logic tx_run = 0;

  initial begin
    logic [10:0] f;
    forever begin
      @(negedge clk);
      if (!txd) begin
        repeat (CPB / 2) @(negedge clk);
        chk(!txd, "start bit lasts");
        for (int i = 1; i < 11; i++) begin
          repeat (CPB) @(negedge clk);
          f[i] = txd;
        end
        chk(f[8:1] == tx_bytes[tx_got], $sformatf("tx byte %h expected %h", f[8:1], tx_bytes[tx_got]));
        chk(^f[9:1] == 1'b1, "tx odd parity");
        chk(f[10], "tx stop bit");
        tx_got++;
      end
    end
  end

  initial begin
    logic [7:0] b, got;
    logic bp, bs;
    bus = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (5) @(negedge clk);
    chk(!dreq_rx && dreq_tx && status[4] && status[5], "reset status");
    // ---- receive ----
    for (int i = 0; i < 40; i++) begin
      b  = 8'($urandom);
      bp = (i % 5 == 3);
      bs = (i == 17);
      send(b, bp, bs);
      repeat (CPB) @(negedge clk);
      chk(dreq_rx && status[3], "DREQ after a byte");
      chk(status[0] == bp, $sformatf("parity flag %b for bad=%b", status[0], bp));
      chk(status[1] == bs, "framing flag");
      dma_read(got);
      chk(got == b, $sformatf("rx byte %h expected %h", got, b));
      chk(!dreq_rx && !status[3], "buffer empty after DMA");
      chk(status[0] == bp, "parity flag stays until cleared");
      if (bp || bs) begin
        @(negedge clk) status_clr = 1'b1;
        @(negedge clk) status_clr = 1'b0;
        chk(status[2:0] == 3'b000, "flags cleared");
      end
    end
    // overrun
    send(8'h11, 1'b0, 1'b0);
    repeat (CPB) @(negedge clk);
    send(8'h22, 1'b0, 1'b0);
    repeat (CPB) @(negedge clk);
    chk(status[2], "overrun flagged");
    dma_read(got);
    chk(got == 8'h11, "first byte kept on overrun");
    // ---- transmit ----
    for (int i = 0; i < 20; i++) tx_bytes[i] = 8'($urandom);
    while (tx_sent < 20) begin
      @(negedge clk);
      if (dreq_tx) begin
        dma_write(tx_bytes[tx_sent]);
        tx_sent++;
      end
    end
    repeat (CPB * 30) @(negedge clk);
    chk(tx_got == 20, $sformatf("%0d bytes transmitted", tx_got));
    chk(status[5] && status[4], "transmitter idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
