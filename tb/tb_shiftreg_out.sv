// tb_shiftreg_out: self-checking testbench for the parallel-in serial-out
// register. Random 12-bit words are loaded while shift is low; with shift high
// the output must present bit 11 down to bit 0, each for exactly 8 clocks, and
// the output must be low whenever shift is low.
`timescale 1ns/1ps
module tb_shiftreg_out;
  logic clk = 1'b0, nreset = 1'b0, shift = 1'b0, out;
  logic [11:0] in = '0;
  int checks = 0, failures = 0;

  shiftreg_out #(.WIDTH(12)) dut (.clk(clk), .nreset(nreset), .shift(shift), .in(in), .out(out));

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
      automatic logic [11:0] v = (w == 0) ? 12'h801 : 12'($urandom);
      @(negedge clk);
      in = v; shift = 1'b0;
      @(negedge clk);
      check(out === 1'b0, "output low while loading");
      in = ~v;                     // must be ignored once shifting starts
      shift = 1'b1;
      for (int k = 0; k < 96; k++) begin
        #1 check(out === v[11 - k/8], $sformatf("word %h clock %0d: out=%b", v, k, out));
        @(negedge clk);
      end
      shift = 1'b0;
      #1 check(out === 1'b0, "output low after shifting");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
