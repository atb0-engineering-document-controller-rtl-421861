// shiftreg_in: serial-in, parallel-out shift register that takes one bit per
// eight clocks, for serial ADCs clocked by the divided-by-8 slow clock.
//
// `shift` enables a 3-bit pacing counter; when the counter reads 7 the serial
// input is shifted into the LSB (the register moves left), otherwise the
// register holds. While `shift` is low the counter stays at zero and nothing
// is shifted. The first bit received therefore ends up as the MSB after WIDTH
// shifts. The width is a parameter; the pacing follows the original design.
module shiftreg_in #(
  parameter int unsigned WIDTH = 12
) (
  input  logic             clk,
  input  logic             nreset,
  input  logic             shift,
  input  logic             in,
  output logic [WIDTH-1:0] out
);
  logic [2:0] pace;

  counter #(.WIDTH(3)) u_pace (.clk(clk), .nreset(nreset), .en(shift), .count(pace));

  always_ff @(posedge clk or negedge nreset) begin
    if (!nreset)           out <= '0;
    else if (pace == 3'd7) out <= {out[WIDTH-2:0], in};
  end
endmodule
