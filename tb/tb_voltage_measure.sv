// tb_voltage_measure: self-checking testbench for the supply voltage reader.
// Fourteen serial ADC models share the serial clock; each has its own convert
// line and the data line seen by the controller is that of the ADC converted
// last. Every VMRn read must start one conversion on ADC n only, hold da low
// until the 12-bit result is in, and return it in the low bits.
`timescale 1ns/1ps
module tb_voltage_measure;
  logic clk = 1'b0, nreset = 1'b0, enable = 1'b0, w_nr = 1'b0;
  logic [2:0] div = '0;
  logic sclk;
  logic [3:0] address = '0;
  logic [31:0] data_out;
  logic done, da, pvmck, pvmd;
  logic [13:0] pvmcvb, dout;
  logic [11:0] val [14];
  int conv [14];
  int last = 0;
  int checks = 0, failures = 0;

  always_ff @(posedge clk) div <= div + 1'b1;
  assign sclk = div[2];

  voltage_measure dut (.clk(clk), .nreset(nreset), .sclk(sclk), .enable(enable), .w_nr(w_nr),
    .address(address), .data_out(data_out), .done(done), .da(da),
    .pvmck(pvmck), .pvmcvb(pvmcvb), .pvmd(pvmd));

  for (genvar i = 0; i < 14; i++) begin : g_adc
    serial_adc_model u_adc (.sclk(pvmck), .cvb(pvmcvb[i]), .value(val[i]), .dout(dout[i]));
    always @(negedge pvmcvb[i]) if (nreset) begin last = i; conv[i]++; end
  end
  assign pvmd = dout[last];

  always #5 clk = ~clk;
  initial begin #5000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic check(input logic cond, input string what);
    checks++;
    if (cond !== 1'b1) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    foreach (conv[i]) conv[i] = 0;
    foreach (val[i]) val[i] = '0;
    repeat (3) @(negedge clk);
    nreset = 1'b1;
    @(negedge clk);
    check(pvmcvb === '1, "no conversion when idle");
    for (int r = 0; r < 42; r++) begin
      automatic int n = (r < 14) ? r : $urandom % 14;
      automatic int conv0 [14];
      automatic int busy = 0;
      foreach (val[i]) val[i] = 12'($urandom);
      if (r == 0) val[0] = 12'h801;
      conv0 = conv;
      repeat ($urandom % 8) @(negedge clk);
      @(negedge clk); enable = 1'b1; w_nr = 1'b0; address = 4'(n);
      @(negedge clk); enable = 1'b0;
      @(negedge clk);
      while (da !== 1'b1 && busy < 2000) begin @(negedge clk); busy++; end
      check(busy > 90, $sformatf("da low while converting (%0d clocks)", busy));
      check(data_out === {20'd0, val[n]}, $sformatf("VMR%0d = %h exp %h", n, data_out, val[n]));
      for (int i = 0; i < 14; i++)
        check(conv[i] == conv0[i] + (i == n), $sformatf("only ADC %0d converts (ADC %0d)", n, i));
      while (done !== 1'b1 && busy < 4000) begin @(negedge clk); busy++; end
      check(pvmcvb === '1, "convert lines idle afterwards");
    end
    // a write does nothing
    @(negedge clk); enable = 1'b1; w_nr = 1'b1; address = 4'd3;
    @(negedge clk); enable = 1'b0;
    repeat (20) @(negedge clk);
    check(pvmcvb === '1 && done === 1'b1 && da === 1'b1, "a write starts no conversion");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
