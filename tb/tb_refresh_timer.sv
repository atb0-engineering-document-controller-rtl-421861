// tb_refresh_timer: self-checking testbench for the SDRAM refresh timer.
// Checks that expired rises exactly maxvalue clocks after a reset, stays high
// until the next reset, and that lowering maxvalue below the running count
// raises expired at once.
`timescale 1ns/1ps
module tb_refresh_timer;
  logic clk = 1'b0, nreset = 1'b0, reset = 1'b0, expired;
  logic [15:0] maxvalue = 16'd10;
  int checks = 0, failures = 0;

  refresh_timer #(.WIDTH(16)) dut (.clk(clk), .nreset(nreset), .reset(reset),
                                   .maxvalue(maxvalue), .expired(expired));

  always #5 clk = ~clk;
  initial begin #200000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic check(input logic cond, input string what);
    checks++;
    if (cond !== 1'b1) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // clocks from a reset pulse until expired
  task automatic measure(output int n);
    @(negedge clk); reset = 1'b1;
    @(negedge clk); reset = 1'b0;
    n = 0;
    while (expired !== 1'b1 && n < 1000) begin @(negedge clk); n++; end
  endtask

  initial begin
    int n;
    repeat (2) @(negedge clk);
    nreset = 1'b1;
    for (int i = 0; i < 4; i++) begin
      automatic int mv = (i == 0) ? 10 : (i == 1) ? 1 : (i == 2) ? 78 : 33;
      maxvalue = 16'(mv);
      measure(n);
      check(n == mv, $sformatf("maxvalue %0d: expired after %0d clocks", mv, n));
      repeat (50) @(negedge clk);
      check(expired === 1'b1, "expired holds until reset");
    end
    maxvalue = 16'd100;
    @(negedge clk); reset = 1'b1;
    @(negedge clk); reset = 1'b0;
    repeat (30) @(negedge clk);
    check(expired === 1'b0, "not expired at count 30 of 100");
    maxvalue = 16'd5;
    #1 check(expired === 1'b1, "lowering maxvalue below the count expires at once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
