// uart - spacecraft serial interface UART with DMA handshakes.
//
// A full-duplex asynchronous serial port. The frame format belongs to the
// spacecraft interface control document and is this design's assumption:
// one start bit, 8 data bits LSB first, a parity bit (odd when PARITY_ODD=1)
// and one stop bit, CLKS_PER_BIT BUSCLK cycles per bit (1042 = 9600 baud at
// 10 MHz). As the specification asks, each direction is served by its own
// 82C37 DMA channel, so that blocks of bytes move between memory and the port
// without the processor.
//
// Receive: the line is synchronised, a start bit is checked at its middle and
// each further bit is sampled at its middle. A finished byte goes into the
// receive buffer and raises dreq_rx. The DMA controller answers with dack_rx
// and an I/O read strobe, during which the UART drives the byte onto the data
// bus (rx_drive) for the memory to take; the buffer empties when the strobe
// ends. A parity error, a bad stop bit, or a byte arriving with the buffer still
// full set sticky flags in the status register; the processor clears them by
// writing the status port (status_clr).
//
// Transmit: dreq_tx is high while the holding register is empty. The DMA
// controller reads memory and strobes I/O write with dack_tx; the byte on the
// bus is loaded when the strobe ends, and moves to the shift register as soon
// as the previous frame is out. DREQ drops as soon as DACK is seen, so a single
// transfer is made per request.
//
// Status byte: bit0 parity error, bit1 framing error, bit2 overrun (all
// sticky), bit3 receive buffer full, bit4 transmit holding register empty,
// bit5 transmitter idle.
module uart
  import idpu_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = 1042,
  parameter bit          PARITY_ODD   = 1'b1
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rxd,
  output logic       txd,
  input  sysbus_t    bus,
  input  logic       dack_rx,
  input  logic       dack_tx,
  output logic       dreq_rx,
  output logic       dreq_tx,
  output logic [7:0] rx_data,
  output logic       rx_drive,
  input  logic       status_clr,
  output logic [7:0] status
);
  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  // ---------------- receiver ----------------
  typedef enum logic [2:0] {R_IDLE, R_START, R_DATA, R_PAR, R_STOP} rstate_t;
  rstate_t       rxst;
  logic [1:0]    rx_s;
  logic [CW-1:0] rcnt;
  logic [2:0]    rbit;
  logic [7:0]    rshift;
  logic          rpar_ok;
  logic          rx_full, perr, ferr, oerr, rx_taking;

  always_ff @(posedge clk) begin
    if (rst) rx_s <= 2'b11;
    else     rx_s <= {rx_s[0], rxd};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rxst   <= R_IDLE;
      rcnt    <= '0;
      rbit    <= '0;
      rshift  <= '0;
      rpar_ok <= 1'b0;
      rx_data <= '0;
      rx_full <= 1'b0;
      perr    <= 1'b0;
      ferr    <= 1'b0;
      oerr    <= 1'b0;
      rx_taking <= 1'b0;
    end else begin
      if (status_clr) begin
        perr <= 1'b0;
        ferr <= 1'b0;
        oerr <= 1'b0;
      end
      // DMA read of the receive buffer
      if (dack_rx && bus.ior) rx_taking <= 1'b1;
      if (bus.ior_end && rx_taking) begin
        rx_taking <= 1'b0;
        rx_full   <= 1'b0;
      end

      case (rxst)
        R_IDLE: if (!rx_s[1]) begin
          rxst <= R_START;
          rcnt  <= CW'(CLKS_PER_BIT / 2);
        end
        R_START: if (rcnt != 0) rcnt <= rcnt - 1'b1;
                 else if (rx_s[1]) rxst <= R_IDLE;     // glitch, not a start bit
                 else begin
                   rxst <= R_DATA;
                   rcnt  <= CW'(CLKS_PER_BIT - 1);
                   rbit  <= '0;
                 end
        R_DATA: if (rcnt != 0) rcnt <= rcnt - 1'b1;
                else begin
                  rshift <= {rx_s[1], rshift[7:1]};
                  rcnt   <= CW'(CLKS_PER_BIT - 1);
                  rbit   <= rbit + 1'b1;
                  if (rbit == 3'd7) rxst <= R_PAR;
                end
        R_PAR: if (rcnt != 0) rcnt <= rcnt - 1'b1;
               else begin
                 rpar_ok <= ((^rshift) ^ rx_s[1]) == PARITY_ODD;
                 rcnt    <= CW'(CLKS_PER_BIT - 1);
                 rxst   <= R_STOP;
               end
        R_STOP: if (rcnt != 0) rcnt <= rcnt - 1'b1;
                else begin
                  rxst <= R_IDLE;
                  if (!rx_s[1]) ferr <= 1'b1;
                  if (!rpar_ok) perr <= 1'b1;
                  if (rx_full && !(bus.ior_end && rx_taking)) begin
                    oerr <= 1'b1;
                  end else begin
                    rx_data <= rshift;
                    rx_full <= 1'b1;
                  end
                end
        default: rxst <= R_IDLE;
      endcase
    end
  end

  assign dreq_rx  = rx_full && !dack_rx && !rx_taking;
  assign rx_drive = dack_rx && bus.ior;

  // ---------------- transmitter ----------------
  logic          hold_full, tx_taking, tx_busy;
  logic [7:0]    hold;
  logic [10:0]   tshift;
  logic [3:0]    tbits;
  logic [CW-1:0] tcnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      hold_full <= 1'b0;
      hold      <= '0;
      tx_taking <= 1'b0;
      tx_busy   <= 1'b0;
      tshift    <= '1;
      tbits     <= '0;
      tcnt      <= '0;
    end else begin
      if (dack_tx && bus.iow) tx_taking <= 1'b1;
      if (bus.iow_end && tx_taking) begin
        tx_taking <= 1'b0;
        hold      <= bus.wdata;
        hold_full <= 1'b1;
      end
      if (tx_busy) begin
        if (tcnt != 0) tcnt <= tcnt - 1'b1;
        else begin
          tshift <= {1'b1, tshift[10:1]};
          tcnt   <= CW'(CLKS_PER_BIT - 1);
          tbits  <= tbits - 1'b1;
          if (tbits == 4'd1) tx_busy <= 1'b0;
        end
      end else if (hold_full && !(bus.iow_end && tx_taking)) begin
        // stop, parity, data LSB first, start
        tshift    <= {1'b1, (^hold) ^ PARITY_ODD, hold, 1'b0};
        tbits     <= 4'd11;
        tcnt      <= CW'(CLKS_PER_BIT - 1);
        tx_busy   <= 1'b1;
        hold_full <= 1'b0;
      end
    end
  end

  assign txd     = tshift[0];
  assign dreq_tx = !hold_full && !dack_tx && !tx_taking;
  assign status  = {2'b00, !tx_busy, !hold_full, rx_full, oerr, ferr, perr};

  // DMA handshake: a request is withdrawn while it is acknowledged, and the
  // receive byte is only driven in a DMA cycle
  a_rx_req: assert property (@(posedge clk) disable iff (rst) dack_rx |-> !dreq_rx);
  a_tx_req: assert property (@(posedge clk) disable iff (rst) dack_tx |-> !dreq_tx);
  a_rx_dma: assert property (@(posedge clk) disable iff (rst) rx_drive |-> bus.dma)
    else $error("UART drives the bus outside a DMA cycle");
endmodule
