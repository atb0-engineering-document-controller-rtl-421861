// tb_shiftreg_in: self-checking testbench for the serial-in parallel-out
// register. A bit is presented for 8 clocks while shift is high; after 12 such
// periods the parallel output must equal the word sent MSB first. The register
// must hold its contents while shift is low.
`timescale 1ns/1ps
module tb_shiftreg_in;
  logic clk = 1'b0, nreset = 1'b0, shift = 1'b0, in = 1'b0;
  logic [11:0] out;
  int checks = 0, failures = 0;

  shiftreg_in #(.WIDTH(12)) dut (.clk(clk), .nreset(nreset), .shift(shift), .in(in), .out(out));

  always #5 clk = ~clk;
  initial begin #200000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic check(input logic cond, input string what);
    checks++;
    if (cond !== 1'b1) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    nreset = 1'b1;
    for (int w = 0; w < 6; w++) begin
      automatic logic [11:0] v = (w == 0) ? 12'hA5C : 12'($urandom);
      @(negedge clk);
      shift = 1'b1;
      for (int b = 11; b >= 0; b--) begin
        in = v[b];
        repeat (8) @(negedge clk);
      end
      shift = 1'b0;
      in = ~in;
      check(out === v, $sformatf("received %h exp %h", out, v));
      repeat (20) @(negedge clk);
      check(out === v, "holds while shift is low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
