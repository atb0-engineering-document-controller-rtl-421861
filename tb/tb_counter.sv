// tb_counter: self-checking testbench for the enable-gated counter.
// A 4-bit counter is held at zero while disabled, then counts one per clock,
// wraps from 15 to 0, and returns to zero one clock after the enable drops.
`timescale 1ns/1ps
module tb_counter;
  logic clk = 1'b0, nreset = 1'b0, en = 1'b0;
  logic [3:0] count;
  int checks = 0, failures = 0;

  counter #(.WIDTH(4)) dut (.clk(clk), .nreset(nreset), .en(en), .count(count));

  always #5 clk = ~clk;
  initial begin #100000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic check(input logic cond, input string what);
    checks++;
    if (cond !== 1'b1) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    check(count === 4'd0, "zero in reset");
    nreset = 1'b1;
    repeat (3) @(posedge clk);
    #1 check(count === 4'd0, "held at zero while disabled");
    en = 1'b1;
    for (int i = 1; i <= 40; i++) begin
      @(posedge clk); #1;
      check(count === 4'(i), $sformatf("count %0d after %0d clocks", count, i));
    end
    en = 1'b0;
    @(posedge clk); #1;
    check(count === 4'd0, "cleared one clock after disable");
    en = 1'b1;
    @(posedge clk); #1;
    check(count === 4'd1, "restarts from zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
