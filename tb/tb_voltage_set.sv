// tb_voltage_set: self-checking testbench for the supply voltage setter. A
// DAC chain model shifts PVSDI9 in on each rising PVSCK while PVSCSB is low
// and latches when PVSCSB rises. Registers VSR0-14 are written and read back
// without any DAC activity; a write to VSR15 must hold done low for the whole
// scan and deliver 16 words of 4 zero bits and 12 data bits, the register for
// the DAC at the far end of the chain first.
`timescale 1ns/1ps
module tb_voltage_set;
  logic clk = 1'b0, nreset = 1'b0, enable = 1'b0, w_nr = 1'b0;
  logic [2:0] div = '0;
  logic sclk;
  logic [3:0] address = '0;
  logic [31:0] data_in = '0, data_out;
  logic done, da, pvsck, pvscsb, pvsdi9, pvsrsb;
  logic [255:0] chain = '0;
  int bits = 0, loads = 0;
  logic [11:0] vsr [16];
  // far end of the chain first
  int order [16] = '{9, 1, 5, 15, 11, 7, 3, 13, 12, 2, 6, 10, 14, 4, 0, 8};
  int checks = 0, failures = 0;

  always_ff @(posedge clk) div <= div + 1'b1;
  assign sclk = div[2];

  voltage_set dut (.clk(clk), .nreset(nreset), .sclk(sclk), .enable(enable), .w_nr(w_nr),
    .address(address), .data_in(data_in), .data_out(data_out), .done(done), .da(da),
    .pvsck(pvsck), .pvscsb(pvscsb), .pvsdi9(pvsdi9), .pvsrsb(pvsrsb));

  always @(posedge pvsck) if (!pvscsb) begin chain = {chain[254:0], pvsdi9}; bits++; end
  always @(posedge pvscsb) if (nreset) loads++;

  always #5 clk = ~clk;
  initial begin #2000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic check(input logic cond, input string what);
    checks++;
    if (cond !== 1'b1) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  task automatic wr(input logic [3:0] a, input logic [31:0] d);
    @(negedge clk); enable = 1'b1; w_nr = 1'b1; address = a; data_in = d;
    @(negedge clk); enable = 1'b0; data_in = 'x;
  endtask
  task automatic rd(input logic [3:0] a, output logic [31:0] d);
    @(negedge clk); enable = 1'b1; w_nr = 1'b0; address = a;
    @(negedge clk); enable = 1'b0;
    @(negedge clk); d = data_out;
  endtask

  initial begin
    logic [31:0] r;
    repeat (3) @(negedge clk);
    check(pvsrsb === 1'b0, "DAC reset held during reset");
    nreset = 1'b1;
    #1 check(pvsrsb === 1'b1, "DAC reset released");
    for (int pass = 0; pass < 3; pass++) begin
      automatic int busy = 0;
      for (int i = 0; i < 16; i++) vsr[i] = 12'($urandom);
      for (int i = 0; i < 15; i++) wr(4'(i), {20'hFFFFF, vsr[i]});
      for (int i = 0; i < 15; i++) begin
        rd(4'(i), r);
        check(r === {20'd0, vsr[i]}, $sformatf("VSR%0d reads %h exp %h", i, r, vsr[i]));
      end
      check(loads == pass && pvscsb === 1'b1, "no DAC activity before VSR15");
      bits = 0;
      repeat ($urandom % 8) @(negedge clk);
      wr(4'd15, {20'd0, vsr[15]});
      while (done !== 1'b1 && busy < 5000) begin @(negedge clk); busy++; end
      check(busy > 2000, $sformatf("done low during the scan (%0d clocks)", busy));
      repeat (4) @(negedge clk);
      check(bits == 256 && loads == pass + 1, $sformatf("256 bits, one load (%0d, %0d)", bits, loads));
      for (int k = 0; k < 16; k++) begin
        automatic logic [15:0] w = chain[255 - 16*k -: 16];
        check(w === {4'd0, vsr[order[k]]}, $sformatf("DAC word %0d = %h exp VSR%0d %h", k, w, order[k], vsr[order[k]]));
      end
      rd(4'd15, r);
      check(r === {20'd0, vsr[15]}, "VSR15 reads back");
      check(da === 1'b1, "da stays high");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
