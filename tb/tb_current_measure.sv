// tb_current_measure: self-checking testbench for the supply current reader.
// Fourteen serial ADC models share the convert line and serial clock, each
// with its own data line. CMmn reads must return {ADC m, ADC n} as two 12-bit
// halves. A CM_BURST write sets the SDRAM pointer; each CM_BURST read must
// emit seven SDRAM write strobes at consecutive addresses carrying the pairs
// (1,0), (3,2) ... (13,12), then return the burst's first address, and the
// next burst must continue where the last one ended.
`timescale 1ns/1ps
module tb_current_measure;
  logic clk = 1'b0, nreset = 1'b0, enable = 1'b0, w_nr = 1'b0;
  logic [2:0] div = '0;
  logic sclk;
  logic [10:0] address_in = '0;
  logic [31:0] data_in = '0, data_out;
  logic done, da, sdram_we, pcmck, pcmcvb;
  logic [23:0] sdram_address;
  logic [13:0] pcmd;
  logic [11:0] val [14];
  logic [23:0] we_addr [$];
  logic [31:0] we_data [$];
  int convs = 0;
  int checks = 0, failures = 0;

  always_ff @(posedge clk) div <= div + 1'b1;
  assign sclk = div[2];

  current_measure dut (.clk(clk), .nreset(nreset), .sclk(sclk), .enable(enable), .w_nr(w_nr),
    .address_in(address_in), .data_in(data_in), .data_out(data_out), .done(done), .da(da),
    .sdram_we(sdram_we), .sdram_address(sdram_address),
    .pcmck(pcmck), .pcmcvb(pcmcvb), .pcmd(pcmd));

  for (genvar i = 0; i < 14; i++) begin : g_adc
    serial_adc_model u_adc (.sclk(pcmck), .cvb(pcmcvb), .value(val[i]), .dout(pcmd[i]));
  end
  always @(negedge pcmcvb) if (nreset) convs++;
  always @(posedge clk) if (nreset && sdram_we) begin we_addr.push_back(sdram_address); we_data.push_back(data_out); end

  always #5 clk = ~clk;
  initial begin #5000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic check(input logic cond, input string what);
    checks++;
    if (cond !== 1'b1) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  task automatic access(input logic wr, input logic [10:0] a, input logic [31:0] d, output logic [31:0] r);
    int busy = 0;
    repeat ($urandom % 8) @(negedge clk);
    @(negedge clk); enable = 1'b1; w_nr = wr; address_in = a; data_in = d;
    @(negedge clk); enable = 1'b0; data_in = 'x;
    @(negedge clk);
    while (!(da === 1'b1 && done === 1'b1) && busy < 3000) begin @(negedge clk); busy++; end
    r = data_out;
  endtask

  initial begin
    logic [31:0] r;
    foreach (val[i]) val[i] = '0;
    repeat (3) @(negedge clk);
    nreset = 1'b1;
    for (int k = 0; k < 20; k++) begin
      automatic int m = $urandom % 14, n = $urandom % 14;
      automatic int c0 = convs;
      foreach (val[i]) val[i] = 12'($urandom);
      access(1'b0, 11'h400 | 11'(m << 6) | 11'(n << 2), '0, r);
      check(r === {4'd0, val[m], 4'd0, val[n]}, $sformatf("CM%0d%0d = %h exp %h %h", m, n, r, val[m], val[n]));
      check(convs == c0 + 1, "one conversion per read");
    end
    begin
      automatic logic [23:0] base = 24'h00_1230;
      access(1'b1, 11'h000, {8'hFF, base}, r);
      check(convs == 20 && we_addr.size() == 0, "CM_BURST write converts nothing");
      for (int b = 0; b < 4; b++) begin
        foreach (val[i]) val[i] = 12'($urandom);
        access(1'b0, 11'h000, '0, r);
        check(we_addr.size() == 7, $sformatf("burst %0d: 7 SDRAM writes (%0d)", b, we_addr.size()));
        for (int k = 0; k < 7 && k < we_addr.size(); k++) begin
          check(we_addr[k] === base + 24'(k), $sformatf("write %0d address %h exp %h", k, we_addr[k], base + 24'(k)));
          check(we_data[k] === {4'd0, val[2*k+1], 4'd0, val[2*k]}, $sformatf("write %0d data %h", k, we_data[k]));
        end
        check(r === {8'd0, base}, $sformatf("CM_BURST read returns %h exp %h", r, base));
        we_addr.delete(); we_data.delete();
        base = base + 24'd7;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
