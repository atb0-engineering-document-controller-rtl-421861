// shiftreg_out: parallel-in, serial-out shift register that emits one bit per
// eight clocks, for serial devices running on the divided-by-8 slow clock.
//
// While `shift` is low the register loads `in` every clock, its 3-bit pacing
// counter is held at zero and `out` is low. While `shift` is high, `out` is the
// register's MSB; each time the pacing counter reaches 7 the register shifts
// left by one, filling the LSB with 0. So the MSB is presented for the first
// eight clocks after `shift` rises, the next bit for the following eight, and
// so on. The width is a parameter; the pacing follows the original design.
module shiftreg_out #(
  parameter int unsigned WIDTH = 12
) (
  input  logic             clk,
  input  logic             nreset,
  input  logic             shift,
  input  logic [WIDTH-1:0] in,
  output logic             out
);
  logic [WIDTH-1:0] sreg;
  logic [2:0]       pace;

  counter #(.WIDTH(3)) u_pace (.clk(clk), .nreset(nreset), .en(shift), .count(pace));

  always_ff @(posedge clk or negedge nreset) begin
    if (!nreset)           sreg <= '0;
    else if (!shift)       sreg <= in;
    else if (pace == 3'd7) sreg <= {sreg[WIDTH-2:0], 1'b0};
  end

  assign out = shift ? sreg[WIDTH-1] : 1'b0;
endmodule
