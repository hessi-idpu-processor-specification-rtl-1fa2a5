// ltc1604_model - behavioural model of the LTC1604 16-bit sampling ADC pins,
// for testbenches. A falling CONVST# while CS# is low starts a conversion:
// BUSY# goes low for T_CONV and the next value of a simple sequence becomes
// the result. The result is driven on D15..D0 while CS# and RD# are both low.
// 'sample' is the value the last conversion produced, for checking.
module ltc1604_model #(
  parameter int unsigned T_CONV = 2700   // conversion time, ns
) (
  input  logic        cs_n,
  input  logic        convst_n,
  input  logic        rd_n,
  output logic        busy_n,
  output logic [15:0] d,
  output logic [15:0] sample,
  output int          conversions
);
  logic [15:0] next_val = 16'h1234;
  initial begin
    busy_n = 1'b1;
    sample = '0;
    conversions = 0;
  end

  always @(negedge convst_n) begin
    if (!cs_n && busy_n) begin
      #20 busy_n = 1'b0;
      sample = next_val;
      next_val = next_val * 16'd3 + 16'h0101;
      #(T_CONV) busy_n = 1'b1;
      conversions++;
    end
  end

  assign d = (!cs_n && !rd_n) ? sample : 16'h0000;
endmodule
