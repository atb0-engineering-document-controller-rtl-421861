// tb_sdram_ctrl: self-checking testbench for the SDRAM controller, run
// against a behavioural SDRAM model that flags protocol errors. Checks the
// power-up sequence (one PRECHARGE, at least two REFRESH, one mode-register
// load), random word writes and reads through the module port, writes through
// the current-measure port (cs_we/cs_address), the refresh-time register, the
// refresh rate, and accesses that arrive in the same clock as a refresh.
`timescale 1ns/1ps
module tb_sdram_ctrl;
  logic clk = 1'b0, nreset = 1'b0;
  logic enable_in = 1'b0, w_nr_in = 1'b0, cs_we = 1'b0;
  logic [24:0] address_in = '0;
  logic [23:0] cs_address = '0;
  logic [31:0] data_in = '0, data_out;
  logic done, da;
  logic sdck, sdcke, sddqm, sdras_b, sdcas_b, sdwe_b, sddq_oe;
  logic [1:0] sdba;
  logic [11:0] sda, sddq_out, sddq_model;
  logic [31:0] expect_mem [int];
  int collide = 0;
  int checks = 0, failures = 0;

  sdram_ctrl dut (.clk(clk), .nreset(nreset), .enable_in(enable_in), .w_nr_in(w_nr_in),
    .address_in(address_in), .data_in(data_in), .data_out(data_out), .done(done), .da(da),
    .cs_we(cs_we), .cs_address(cs_address),
    .sdck(sdck), .sdcke(sdcke), .sddqm(sddqm), .sdras_b(sdras_b), .sdcas_b(sdcas_b),
    .sdwe_b(sdwe_b), .sdba(sdba), .sda(sda),
    .sddq_in(sddq_oe ? sddq_out : sddq_model), .sddq_out(sddq_out), .sddq_oe(sddq_oe));

  sdram_model u_mem (.clk(sdck && nreset), .ras_b(sdras_b), .cas_b(sdcas_b), .we_b(sdwe_b), .ba(sdba),
    .a(sda), .dq_in(sddq_out), .dq_in_valid(sddq_oe), .dq_out(sddq_model));

  always @(posedge clk) if (nreset && dut.latch_address && dut.refresh_expired) collide++;

  always #5 clk = ~clk;
  initial begin #5000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic check(input logic cond, input string what);
    checks++;
    if (cond !== 1'b1) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  task automatic wait_idle();
    int n = 0;
    @(negedge clk);
    while (!(done === 1'b1 && da === 1'b1) && n < 200) begin @(negedge clk); n++; end
    check(n < 200, "access finishes");
  endtask
  task automatic wr(input logic [24:0] a, input logic [31:0] d);
    @(negedge clk); enable_in = 1'b1; w_nr_in = 1'b1; address_in = a; data_in = d;
    @(negedge clk); enable_in = 1'b0; w_nr_in = 1'b0; data_in = 'x;
    wait_idle();
  endtask
  task automatic rd(input logic [24:0] a, output logic [31:0] d);
    @(negedge clk); enable_in = 1'b1; w_nr_in = 1'b0; address_in = a;
    @(negedge clk); enable_in = 1'b0;
    wait_idle();
    d = data_out;
  endtask
  task automatic cs_wr(input logic [23:0] a, input logic [31:0] d);
    @(negedge clk); cs_we = 1'b1; cs_address = a; data_in = d;
    @(negedge clk); cs_we = 1'b0; data_in = 'x;
    wait_idle();
  endtask

  function automatic logic [23:0] rand_addr();
    return 24'($urandom) & 24'h7F_FDFF;   // SDRAM space, column bit 9 unused
  endfunction

  initial begin
    logic [31:0] r;
    int n_ref;
    repeat (3) @(negedge clk);
    nreset = 1'b1;
    wait_idle();
    check(u_mem.n_prechg == 1 && u_mem.n_refresh >= 2 && u_mem.n_lmr == 1,
          $sformatf("power-up: %0d precharge, %0d refresh, %0d LMR", u_mem.n_prechg, u_mem.n_refresh, u_mem.n_lmr));
    check(sdcke === 1'b1 && sddqm === 1'b0, "clock enable high, data mask low");
    // refresh-time register
    rd(25'h80_0000, r);
    check(r === 32'd78, $sformatf("refresh time defaults to 78 (%0d)", r));
    wr(25'h80_0000, 32'd200);
    rd(25'h80_0000, r);
    check(r === 32'd200, "refresh time written");
    n_ref = u_mem.n_refresh;
    repeat (2010) @(negedge clk);
    check(u_mem.n_refresh - n_ref == 10, $sformatf("one refresh per 201 clocks when idle (%0d in 2010)", u_mem.n_refresh - n_ref));
    wr(25'h80_0000, 32'd78);
    // word writes and reads
    for (int i = 0; i < 100; i++) begin
      automatic logic [23:0] a = rand_addr();
      automatic logic [31:0] d = $urandom;
      if (i % 3 == 2) cs_wr(a, d); else wr({1'b0, a}, d);
      expect_mem[int'(a)] = d & 32'h0FFF_0FFF;
      if (i % 4 == 0) begin
        rd({1'b0, a}, r);
        check(r === expect_mem[int'(a)], $sformatf("read %h = %h exp %h", a, r, expect_mem[int'(a)]));
      end
    end
    foreach (expect_mem[k]) begin
      rd({1'b0, 24'(k)}, r);
      check(r === expect_mem[k], $sformatf("read back %h = %h exp %h", k, r, expect_mem[k]));
    end
    // accesses landing on a refresh
    wr(25'h80_0000, 32'd4);
    for (int i = 0; i < 300 && collide < 5; i++) begin
      automatic logic [23:0] a = rand_addr();
      automatic logic [31:0] d = $urandom & 32'h0FFF_0FFF;
      repeat ($urandom % 6) @(negedge clk);
      wr({1'b0, a}, d);
      repeat ($urandom % 6) @(negedge clk);
      rd({1'b0, a}, r);
      check(r === d, $sformatf("read %h during frequent refresh = %h exp %h", a, r, d));
    end
    check(collide > 0, $sformatf("accesses collided with a refresh (%0d)", collide));
    check(u_mem.errors == 0, $sformatf("SDRAM protocol errors: %0d", u_mem.errors));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
