// diag_reg - diagnostic output register.
//
// An 8-bit register the processor writes through the diagnostic I/O port; its
// contents and the port's I/O write strobe go to the diagnostic connector for
// use while the flight software is developed. The register loads on the cycle
// after the write strobe ends (we); stb follows the write strobe, registered so
// the connector sees glitch-free levels. Both outputs clear on reset.
module diag_reg (
  input  logic       clk,
  input  logic       rst,
  input  logic       wr_active,  // I/O write to the diagnostic port in progress
  input  logic       we,         // one-cycle pulse after that write ends
  input  logic [7:0] wdata,
  output logic [7:0] q,
  output logic       stb
);
  always_ff @(posedge clk) begin
    if (rst) begin
      q   <= '0;
      stb <= 1'b0;
    end else begin
      stb <= wr_active;
      if (we) q <= wdata;
    end
  end
endmodule
