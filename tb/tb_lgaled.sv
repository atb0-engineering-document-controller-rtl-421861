// tb_lgaled: self-checking testbench for the LGA_LED register. Every 4-bit
// value is written; the two LED outputs must follow bits 1:0, the two logic
// analyzer outputs bits 3:2, the read value must return the four bits, and a
// read cycle or an idle enable must not change the register.
`timescale 1ns/1ps
module tb_lgaled;
  logic clk = 1'b0, nreset = 1'b0, enable = 1'b0, w_nr = 1'b0;
  logic [31:0] data_in = '0, data_out;
  logic done, da;
  logic [1:0] led, lga;
  int checks = 0, failures = 0;

  lgaled dut (.clk(clk), .nreset(nreset), .enable(enable), .w_nr(w_nr), .data_in(data_in),
              .data_out(data_out), .done(done), .da(da), .led(led), .lga(lga));

  always #5 clk = ~clk;
  initial begin #100000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic check(input logic cond, input string what);
    checks++;
    if (cond !== 1'b1) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    check(led === 2'b00 && lga === 2'b00, "outputs low after reset");
    nreset = 1'b1;
    for (int v = 0; v < 16; v++) begin
      @(negedge clk); enable = 1'b1; w_nr = 1'b1; data_in = {28'hABCDEF0, 4'(v)};
      @(negedge clk); enable = 1'b0; data_in = '1;
      check(led === v[1:0] && lga === v[3:2], $sformatf("value %0d: led=%b lga=%b", v, led, lga));
      check(data_out === 32'(v), $sformatf("read back %h", data_out));
      check(done === 1'b1 && da === 1'b1, "never busy");
      @(negedge clk); enable = 1'b1; w_nr = 1'b0;
      @(negedge clk); enable = 1'b0;
      check(data_out === 32'(v), "a read does not change the register");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
