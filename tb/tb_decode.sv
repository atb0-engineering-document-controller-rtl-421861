// tb_decode: self-checking testbench for the PLX bus decoder. The PLX side is
// driven cycle by cycle (address strobe, then data once ready is low); eight
// module models answer with done/da after random delays and may be busy when
// an access starts. Checks module selection from the address, a single enable
// pulse per access with the right direction, address and data, read data
// routing, the status word, the timeout path (no enable on a timed-out write,
// 0xDEADBEEF on a timed-out read) and the current-measure address override.
// The timeout counter is made 6 bits wide so a timeout takes 63 clocks.
`timescale 1ns/1ps
module tb_decode;
  import atb0_pkg::*;
  logic clk = 1'b0, nreset = 1'b0;
  logic hads = 1'b1, hlwnr = 1'b0;
  logic [31:0] had = '0;
  logic hlrdy_out, hxdir_out, hadsel_out;
  logic [31:0] status_out, data_out;
  logic [7:0] done_in, da_in, enable_out;
  logic cs_we = 1'b0;
  logic [23:0] cs_address = '0;
  logic [24:0] address_out;
  logic w_nr_out;
  logic [3:0] datasel_out;
  logic [31:0] mod_data [8];
  int busy_w [8], busy_r [8];
  logic stuck = 1'b0, no_data = 1'b0;
  typedef struct { int m; logic w; logic [24:0] a; logic [31:0] d; } en_t;
  en_t ens [$];
  int checks = 0, failures = 0;

  decode #(.TIMEOUT_W(6)) dut (.clk(clk), .nreset(nreset), .hads(hads), .hlwnr(hlwnr), .had(had),
    .hlrdy_out(hlrdy_out), .hxdir_out(hxdir_out), .hadsel_out(hadsel_out), .status_out(status_out),
    .done_in(done_in), .da_in(da_in), .cs_we(cs_we), .cs_address(cs_address),
    .address_out(address_out), .data_out(data_out), .enable_out(enable_out),
    .w_nr_out(w_nr_out), .datasel_out(datasel_out));

  // module models
  always_comb for (int i = 0; i < 8; i++) begin
    done_in[i] = (busy_w[i] == 0) && !stuck;
    da_in[i]   = (busy_r[i] == 0) && !no_data;
  end
  always @(posedge clk) begin
    for (int i = 0; i < 8; i++) begin
      if (busy_w[i] > 0) busy_w[i]--;
      if (busy_r[i] > 0) busy_r[i]--;
    end
    for (int i = 0; i < 8; i++) if (enable_out[i]) begin
      ens.push_back('{i, w_nr_out, address_out, data_out});
      if (w_nr_out) busy_w[i] = 1 + $urandom % 6;
      else begin busy_r[i] = 1 + $urandom % 6; busy_w[i] = busy_r[i]; end
    end
  end

  always #5 clk = ~clk;
  initial begin #5000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic check(input logic cond, input string what);
    checks++;
    if (cond !== 1'b1) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  function automatic int module_of(input logic [26:0] a);
    if (a[26]) return MOD_AHIP;
    if (!a[25]) return MOD_SDRAM;
    return int'(a[23:20]);
  endfunction

  // what the top level puts on HAD for a read
  function automatic logic [31:0] had_read();
    if (hadsel_out) return status_out;
    return (datasel_out < 8) ? mod_data[datasel_out[2:0]] : 32'h0;
  endfunction

  task automatic plx_write(input logic [26:0] a, input logic [31:0] d, output int lat);
    @(negedge clk); hads = 1'b0; hlwnr = 1'b1; had = {5'd0, a};
    @(negedge clk); hads = 1'b1; had = 32'h0BAD_0BAD;
    lat = 1;
    while (hlrdy_out !== 1'b0 && lat < 500) begin @(negedge clk); lat++; end
    check(hxdir_out === 1'b1, "controller does not drive HAD during a write");
    had = d;
    repeat (2) @(negedge clk);
    had = 32'h0BAD_0BAD;
  endtask

  task automatic plx_read(input logic [26:0] a, output logic [31:0] d, output int lat);
    @(negedge clk); hads = 1'b0; hlwnr = 1'b0; had = {5'd0, a};
    @(negedge clk); hads = 1'b1; had = 32'h0BAD_0BAD;
    lat = 1;
    while (hlrdy_out !== 1'b0 && lat < 500) begin @(negedge clk); lat++; end
    check(hxdir_out === 1'b0, "controller drives HAD while ready on a read");
    d = had_read();
    @(negedge clk);
  endtask

  function automatic logic [26:0] rand_addr(input int m);
    logic [26:0] a = 27'($urandom) & ~27'h3;
    if (m == MOD_SDRAM) a[26:25] = 2'b00;
    else if (m == MOD_AHIP) a[26] = 1'b1;
    else begin a[26:25] = 2'b01; a[23:20] = 4'(m); end
    return a;
  endfunction

  initial begin
    logic [31:0] r;
    int lat;
    for (int i = 0; i < 8; i++) begin busy_w[i] = 0; busy_r[i] = 0; mod_data[i] = '0; end
    repeat (3) @(negedge clk);
    check(hlrdy_out === 1'b1 && hxdir_out === 1'b1 && enable_out === '0, "idle outputs in reset");
    nreset = 1'b1;
    for (int i = 0; i < 300; i++) begin
      automatic int m = $urandom % 9;               // 8 = a status read
      automatic logic [26:0] a = (m == 8) ? 27'h2800000 : rand_addr(m);
      automatic logic [31:0] d = $urandom;
      automatic logic wr = (m != 8) && $urandom % 2;
      foreach (mod_data[k]) mod_data[k] = $urandom;
      if (m < 8 && $urandom % 3 == 0) busy_w[module_of(a)] = 1 + $urandom % 20;
      ens.delete();
      if (wr) begin
        plx_write(a, d, lat);
        repeat (2) @(negedge clk);
        check(ens.size() == 1, $sformatf("write %h: %0d enables", a, ens.size()));
        if (ens.size() == 1)
          check(ens[0].m == module_of(a) && ens[0].w === 1'b1 && ens[0].a === a[26:2] && ens[0].d === d,
                $sformatf("write %h went to module %0d addr %h data %h", a, ens[0].m, ens[0].a, ens[0].d));
      end else if (m == 8) begin
        plx_read(a, r, lat);
        check(ens.size() == 0, "status read enables no module");
        check(r === {16'd0, da_in, done_in} || r[31:16] === 16'd0, $sformatf("status %h", r));
        check(lat == 2, $sformatf("status read takes 2 clocks here (%0d)", lat));
      end else begin
        plx_read(a, r, lat);
        check(ens.size() == 1, $sformatf("read %h: %0d enables", a, ens.size()));
        if (ens.size() == 1)
          check(ens[0].m == module_of(a) && ens[0].w === 1'b0 && ens[0].a === a[26:2],
                $sformatf("read %h went to module %0d", a, ens[0].m));
        check(r === mod_data[module_of(a)], $sformatf("read %h = %h exp %h", a, r, mod_data[module_of(a)]));
      end
    end
    // idle status word
    repeat (20) @(negedge clk);
    plx_read(27'h2800000, r, lat);
    check(r === 32'h0000_FFFF, $sformatf("idle status %h", r));
    // unused module numbers complete without enabling anything
    ens.delete();
    plx_write(27'h2900000, 32'h1, lat);
    plx_read(27'h2A00000, r, lat);
    repeat (2) @(negedge clk);
    check(ens.size() == 0, "unused module numbers enable nothing");
    // timeouts
    stuck = 1'b1;
    ens.delete();
    plx_write(rand_addr(MOD_USER), 32'h55, lat);
    check(lat > 60, $sformatf("write times out (%0d clocks)", lat));
    plx_read(rand_addr(MOD_CLOCK), r, lat);
    check(lat > 60, $sformatf("read times out (%0d clocks)", lat));
    check(r === ERROR_WORD, $sformatf("timed-out read returns %h", r));
    repeat (2) @(negedge clk);
    check(ens.size() == 0, "a timed-out access enables nothing");
    stuck = 1'b0;
    // a module that never returns data
    no_data = 1'b1;
    plx_read(rand_addr(MOD_VMEAS), r, lat);
    check(r === ERROR_WORD && lat > 60, "read with no data times out");
    no_data = 1'b0;
    repeat (5) @(negedge clk);
    plx_read(rand_addr(MOD_LGALED), r, lat);
    check(r === mod_data[MOD_LGALED], "works again after timeouts");
    // current-measure address override
    @(negedge clk); cs_we = 1'b1; cs_address = 24'hABCDEF;
    #1 check(address_out === 25'h0ABCDEF, "cs_address drives the address bus");
    @(negedge clk); cs_we = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
