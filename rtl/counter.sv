// counter: free-running up-counter with an enable, used by the controller's
// state machines to time waits on the slow clock and to detect timeouts.
//
// While `en` is low the count is forced to zero on every clock edge; while it
// is high the count increases by one per clock and wraps at 2**WIDTH. The width
// is chosen by the instantiating module, as in the original design.
// Interface: clk, active-low asynchronous nreset, en in, count out (registered).
module counter #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             nreset,
  input  logic             en,
  output logic [WIDTH-1:0] count
);
  always_ff @(posedge clk or negedge nreset) begin
    if (!nreset)  count <= '0;
    else if (en)  count <= count + 1'b1;
    else          count <= '0;
  end
endmodule
