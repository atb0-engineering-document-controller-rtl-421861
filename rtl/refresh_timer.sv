// refresh_timer: tells the SDRAM controller when a refresh is due.
//
// A counter climbs by one per clock until it reaches `maxvalue`, then stops and
// holds `expired` high. The original compares for equality; here `expired` is
// count >= maxvalue, so that lowering the refresh period below the current
// count does not skip refreshes until the counter wraps (own choice). Raising `reset` for a clock clears the counter and
// starts the next interval. `expired` is combinational on the count, as in the
// original block diagram; the 16-bit width follows that diagram.
module refresh_timer #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             nreset,
  input  logic             reset,
  input  logic [WIDTH-1:0] maxvalue,
  output logic             expired
);
  logic [WIDTH-1:0] count;

  assign expired = (count >= maxvalue);

  always_ff @(posedge clk or negedge nreset) begin
    if (!nreset)       count <= '0;
    else if (reset)    count <= '0;
    else if (!expired) count <= count + 1'b1;
  end
endmodule
