// tb_clock_set: self-checking testbench for the frequency synthesizer loader.
// A synthesizer model shifts CKSD in on each rising CKSC while CKSL is high and
// latches on the falling CKSL. Each write must deliver the 14-bit CLOCK value
// MSB first, hold done low while shifting and read back the written value.
`timescale 1ns/1ps
module tb_clock_set;
  logic clk = 1'b0, nreset = 1'b0, enable = 1'b0, w_nr = 1'b0;
  logic [2:0] div = '0;
  logic sclk;
  logic [31:0] data_in = '0, data_out;
  logic done, da, cksc, cksd, cksl;
  logic [13:0] synth_sr = '0, synth_reg = '0;
  int bits = 0, loads = 0;
  int checks = 0, failures = 0;

  always_ff @(posedge clk) div <= div + 1'b1;
  assign sclk = div[2];

  clock_set dut (.clk(clk), .nreset(nreset), .sclk(sclk), .enable(enable), .w_nr(w_nr),
    .data_in(data_in), .data_out(data_out), .done(done), .da(da),
    .cksc(cksc), .cksd(cksd), .cksl(cksl));

  always @(posedge cksc) if (cksl) begin synth_sr = {synth_sr[12:0], cksd}; bits++; end
  always @(negedge cksl) if (nreset) begin synth_reg = synth_sr; loads++; end

  always #5 clk = ~clk;
  initial begin #2000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic check(input logic cond, input string what);
    checks++;
    if (cond !== 1'b1) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    nreset = 1'b1;
    for (int i = 0; i < 8; i++) begin
      automatic logic [13:0] v = (i == 0) ? 14'h2001 : 14'($urandom);
      automatic int busy = 0;
      repeat ($urandom % 8) @(negedge clk);
      bits = 0;
      @(negedge clk); enable = 1'b1; w_nr = 1'b1; data_in = {18'h3FFFF, v};
      @(negedge clk); enable = 1'b0; data_in = 'x;
      while (done !== 1'b1 && busy < 1000) begin @(negedge clk); busy++; end
      check(busy > 100, $sformatf("done low while shifting (%0d clocks)", busy));
      repeat (4) @(negedge clk);
      check(bits == 14, $sformatf("14 bits shifted (%0d)", bits));
      check(synth_reg === v, $sformatf("synthesizer got %h exp %h", synth_reg, v));
      check(loads == i + 1, "one load per write");
      check(data_out === {18'd0, v}, "CLOCK reads back");
      check(cksl === 1'b0, "CKSL low when idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
