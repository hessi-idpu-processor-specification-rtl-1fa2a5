// clock_gen - processor clock generation.
//
// Divides BUSCLK (10 MHz) by DIV (3) to make the 3.333 MHz X1 clock of the
// 80C85RH and the 82C37ARH, as the specification requires (BUSCLK/3). A
// modulo-DIV counter runs from reset; x1_clk is high on count 0 and low on the
// other counts, so with DIV=3 it is high for one BUSCLK cycle in three. That
// duty cycle is this design's choice: the 8085 halves X1 internally, so only
// the period matters.
//
// Timing: x1_clk is registered; the first X1 edge comes one cycle
// after reset is released.
module clock_gen #(
  parameter int unsigned DIV = 3
) (
  input  logic clk,     // BUSCLK
  input  logic rst,     // synchronous, active high
  output logic x1_clk
);
  localparam int unsigned CW = (DIV > 2) ? $clog2(DIV) : 1;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt    <= '0;
      x1_clk <= 1'b0;
    end else begin
      cnt    <= (cnt == CW'(DIV - 1)) ? '0 : cnt + 1'b1;
      x1_clk <= (cnt == '0);
    end
  end
endmodule
