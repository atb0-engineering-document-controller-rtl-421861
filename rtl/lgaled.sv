// lgaled: the LGA_LED register. A 4-bit register written by the host; bit 0
// drives LED0, bit 1 LED1, bit 2 LGA0 and bit 3 LGA1 (LGA outputs go to a
// logic-analyzer header). It loads data_in[3:0] when enable and w_nr are both
// high and always presents its contents on data_out, so its done and da
// outputs are constant high (the module is never busy). Reset clears it.
module lgaled (
  input  logic        clk,
  input  logic        nreset,
  input  logic        enable,
  input  logic        w_nr,
  input  logic [31:0] data_in,
  output logic [31:0] data_out,
  output logic        done,
  output logic        da,
  output logic [1:0]  led,
  output logic [1:0]  lga
);
  logic [3:0] reg_q;

  always_ff @(posedge clk or negedge nreset) begin
    if (!nreset)              reg_q <= '0;
    else if (enable && w_nr)  reg_q <= data_in[3:0];
  end

  assign data_out = {28'd0, reg_q};
  assign led      = reg_q[1:0];
  assign lga      = reg_q[3:2];
  assign done     = 1'b1;
  assign da       = 1'b1;
endmodule
