// adc_if - controller for the LTC1604 16-bit housekeeping ADC.
//
// The ADC sits behind the glue FPGA rather than on the processor bus, to keep
// bus noise away from it. The processor writes the ADC control port to start a
// conversion, polls the status for busy/done and reads the 16-bit result as two
// bytes. On start the controller pulls CS# and CONVST# low for CONVST_CYCLES
// BUSCLK cycles, then waits for the ADC's BUSY# to go low (conversion running)
// and high again (result ready), then pulls CS# and RD# low for RD_CYCLES and
// captures the data bus as RD# rises. The pin sequence follows the LTC1604 data
// sheet; the pulse widths are this design's choice. A start while a conversion
// is running is ignored. BUSY# is synchronised with two flip-flops. If BUSY#
// does not fall within BUSY_WAIT cycles the controller goes on as if the
// conversion had finished, so a missing ADC cannot hang the status.
//
// Status: busy is high from start until the result is captured; done is high
// from then until the next start.
module adc_if #(
  parameter int unsigned CONVST_CYCLES = 4,
  parameter int unsigned RD_CYCLES     = 4,
  parameter int unsigned BUSY_WAIT     = 16
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic        adc_busy_n,
  input  logic [15:0] adc_d,
  output logic        adc_cs_n,
  output logic        adc_convst_n,
  output logic        adc_rd_n,
  output logic        busy,
  output logic        done,
  output logic [15:0] data
);
  typedef enum logic [2:0] {A_IDLE, A_CONV, A_WAIT_LOW, A_WAIT_HIGH, A_READ} astate_t;
  astate_t    st;
  logic [1:0] bsync;
  logic [7:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) bsync <= 2'b11;
    else     bsync <= {bsync[0], adc_busy_n};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st           <= A_IDLE;
      cnt          <= '0;
      adc_cs_n     <= 1'b1;
      adc_convst_n <= 1'b1;
      adc_rd_n     <= 1'b1;
      busy         <= 1'b0;
      done         <= 1'b0;
      data         <= '0;
    end else begin
      case (st)
        A_IDLE: if (start) begin
          st           <= A_CONV;
          cnt          <= 8'(CONVST_CYCLES - 1);
          adc_cs_n     <= 1'b0;
          adc_convst_n <= 1'b0;
          busy         <= 1'b1;
          done         <= 1'b0;
        end
        A_CONV: if (cnt != 0) cnt <= cnt - 1'b1;
                else begin
                  adc_cs_n     <= 1'b1;
                  adc_convst_n <= 1'b1;
                  cnt          <= 8'(BUSY_WAIT);
                  st           <= A_WAIT_LOW;
                end
        A_WAIT_LOW: if (!bsync[1]) st <= A_WAIT_HIGH;
                    else if (cnt != 0) cnt <= cnt - 1'b1;
                    else st <= A_WAIT_HIGH;
        A_WAIT_HIGH: if (bsync[1]) begin
          st       <= A_READ;
          cnt      <= 8'(RD_CYCLES - 1);
          adc_cs_n <= 1'b0;
          adc_rd_n <= 1'b0;
        end
        A_READ: if (cnt != 0) cnt <= cnt - 1'b1;
                else begin
                  data     <= adc_d;
                  adc_cs_n <= 1'b1;
                  adc_rd_n <= 1'b1;
                  busy     <= 1'b0;
                  done     <= 1'b1;
                  st       <= A_IDLE;
                end
        default: st <= A_IDLE;
      endcase
    end
  end
endmodule
