// tb_atb0_controller: end-to-end test of the whole controller at its default
// parameters, driven through the PLX local-bus pins the way the host would.
//
// Around the controller it places behavioural models of the SDRAM, the 14
// voltage ADCs (shared data line), the 14 current ADCs (one convert line), the
// DAC daisy chain, the frequency synthesizer's serial port, a daughtercard
// driving the user pins it does not get from the controller, and an AHIP slave.
// It then exercises every register of the memory map and every transfer mode,
// compares each result with values the testbench computes itself, checks the
// PLX handshake latencies of the decoder, and counts how often each mechanism
// happened (SDRAM write/read/refresh, a refresh colliding with an access,
// waiting for a busy module, DAC scan, voltage and current conversions, burst
// store to SDRAM, synthesizer load, user pins, LEDs, status word, AHIP in all
// four modes and an AHIP timeout). A mechanism that never happened counts as a
// failure.
module tb_atb0_controller;
  logic clk = 1'b0;
  logic nreset = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // PLX side
  logic        hads = 1'b1, hlwnr = 1'b0;
  logic [31:0] had_drv = '0;
  logic [31:0] had_out;
  logic        had_oe, hlrdy, hxdir;

  // SDRAM
  logic sdck, sdcke, sddqm, sdras_b, sdcas_b, sdwe_b, sddq_oe;
  logic [1:0]  sdba;
  logic [11:0] sda, sddq_out, sddq_model;

  // serial parts
  logic pvsck, pvscsb, pvsdi9, pvsrsb, pvmck, pvmd, pcmck, pcmcvb, cksc, cksd, cksl;
  logic [13:0] pvmcvb, pcmd;
  logic [13:0] vm_dout;
  logic [11:0] vm_val [14];
  logic [11:0] cm_val [14];

  // user pins, AHIP, LEDs
  logic [25:0] user_in, user_out, user_oe, dc_drive;
  logic        ahip_req, ahip_ack, ahip_bus_oe, slave_oe;
  logic [31:0] ahip_bus_out, slave_out, ahip_bus_in;
  logic        bus8 = 1'b0, stuck = 1'b0;
  logic [1:0]  led, lga;

  atb0_controller dut (
    .clk(clk), .nreset(nreset),
    .hads(hads), .hlwnr(hlwnr), .had_in(had_oe ? had_out : had_drv),
    .had_out(had_out), .had_oe(had_oe), .hlrdy(hlrdy), .hxdir(hxdir),
    .sdck(sdck), .sdcke(sdcke), .sddqm(sddqm), .sdras_b(sdras_b), .sdcas_b(sdcas_b),
    .sdwe_b(sdwe_b), .sdba(sdba), .sda(sda),
    .sddq_in(sddq_oe ? sddq_out : sddq_model), .sddq_out(sddq_out), .sddq_oe(sddq_oe),
    .pvsck(pvsck), .pvscsb(pvscsb), .pvsdi9(pvsdi9), .pvsrsb(pvsrsb),
    .pvmck(pvmck), .pvmcvb(pvmcvb), .pvmd(pvmd),
    .pcmck(pcmck), .pcmcvb(pcmcvb), .pcmd(pcmd),
    .cksc(cksc), .cksd(cksd), .cksl(cksl),
    .user_in(user_in), .user_out(user_out), .user_oe(user_oe),
    .ahip_req(ahip_req), .ahip_ack(ahip_ack), .ahip_bus_in(ahip_bus_in),
    .ahip_bus_out(ahip_bus_out), .ahip_bus_oe(ahip_bus_oe),
    .led(led), .lga(lga));

  sdram_model u_sdram (
    .clk(clk && nreset), .ras_b(sdras_b), .cas_b(sdcas_b), .we_b(sdwe_b), .ba(sdba), .a(sda),
    .dq_in(sddq_out), .dq_in_valid(sddq_oe), .dq_out(sddq_model));

  // Voltage ADCs share PVMD: the one converted last drives it.
  int vm_last = 0;
  int vm_conv [14];
  initial foreach (vm_conv[i]) vm_conv[i] = 0;
  for (genvar i = 0; i < 14; i++) begin : g_vm
    serial_adc_model u_adc (.sclk(pvmck), .cvb(pvmcvb[i]), .value(vm_val[i]), .dout(vm_dout[i]));
    always @(negedge pvmcvb[i]) begin vm_last = i; vm_conv[i]++; end
  end
  assign pvmd = vm_dout[vm_last];

  for (genvar i = 0; i < 14; i++) begin : g_cm
    serial_adc_model u_adc (.sclk(pcmck), .cvb(pcmcvb), .value(cm_val[i]), .dout(pcmd[i]));
  end

  // DAC daisy chain: 16 x 16-bit, shifts on the rising DAC clock while selected.
  logic [255:0] dac_chain = '0;
  int           dac_bits = 0, dac_loads = 0;
  always @(posedge pvsck) if (!pvscsb) begin dac_chain = {dac_chain[254:0], pvsdi9}; dac_bits++; end
  always @(posedge pvscsb) if (nreset) dac_loads++;

  // Frequency synthesizer serial port: shifts on the rising CKSC while CKSL.
  logic [31:0] synth_sr = '0;
  int          synth_bits = 0;
  always @(posedge cksc) if (cksl) begin synth_sr = {synth_sr[30:0], cksd}; synth_bits++; end

  // Daughtercard side of the user pins.
  assign user_in = (user_oe & user_out) | (~user_oe & dc_drive);

  ahip_slave_model u_slave (
    .clk(clk), .bus8(bus8), .stuck(stuck), .req(ahip_req), .bus_from_host(ahip_bus_out),
    .ack(ahip_ack), .bus_out(slave_out), .bus_oe(slave_oe));
  assign ahip_bus_in = slave_oe ? slave_out : ahip_bus_out;

  // Mechanism counters
  int m_collide = 0, m_busy_wait = 0, m_refresh_op = 0;
  int contention = 0;
  always @(posedge clk) begin
    if (nreset && dut.u_sdram.latch_address && dut.u_sdram.refresh_expired) m_collide++;
    if (slave_oe && ahip_bus_oe) contention++;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (cond !== 1'b1) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // PLX write. Returns the number of clock edges from the HADS edge to the
  // first edge at which HLRDY is seen low.
  task automatic plx_write(input logic [26:0] addr, input logic [31:0] data, output int lat);
    @(negedge clk);
    hads = 1'b0; hlwnr = 1'b1; had_drv = {5'd0, addr};
    lat = 0;
    @(negedge clk);
    hads = 1'b1; had_drv = 32'h0BAD_0BAD;
    lat = 1;
    while (hlrdy) begin @(negedge clk); lat++; end
    had_drv = data;
    @(negedge clk);
    had_drv = 32'h0BAD_0BAD;
  endtask

  task automatic plx_read(input logic [26:0] addr, output logic [31:0] data, output int lat);
    @(negedge clk);
    hads = 1'b0; hlwnr = 1'b0; had_drv = {5'd0, addr};
    lat = 0;
    @(negedge clk);
    hads = 1'b1; had_drv = 32'h0BAD_0BAD;
    lat = 1;
    while (hlrdy) begin @(negedge clk); lat++; end
    check(had_oe == 1'b1, "controller drives HAD while HLRDY is low on a read");
    data = had_out;
    @(negedge clk);
  endtask

  task automatic wr(input logic [26:0] addr, input logic [31:0] data);
    int lat;
    plx_write(addr, data, lat);
  endtask

  task automatic rd(input logic [26:0] addr, output logic [31:0] data);
    int lat;
    plx_read(addr, data, lat);
  endtask

  // Register addresses (byte addresses)
  localparam logic [26:0] A_LGA_LED   = 27'h2000000;
  localparam logic [26:0] A_VS        = 27'h2100000;
  localparam logic [26:0] A_VM        = 27'h2200000;
  localparam logic [26:0] A_CM_BURST  = 27'h2300000;
  localparam logic [26:0] A_CLOCK     = 27'h2400000;
  localparam logic [26:0] A_SDRAM_RT  = 27'h2500000;
  localparam logic [26:0] A_USER_ALL  = 27'h2600000;
  localparam logic [26:0] A_USER_DIR  = 27'h2600004;
  localparam logic [26:0] A_AHIP_MODE = 27'h2700000;
  localparam logic [26:0] A_STATUS    = 27'h2800000;

  function automatic logic [26:0] a_user(input int p);  return 27'h2601000 | 27'(p << 4); endfunction
  function automatic logic [26:0] a_cm(input int m, input int n);
    return 27'h2301000 | 27'(m << 8) | 27'(n << 4);
  endfunction
  function automatic logic [26:0] a_ahip(input logic [23:0] w); return 27'h4000000 | 27'({w, 2'b00}); endfunction

  // Independent copy of the DAC chain order (first shifted = last DAC).
  int chain_order [16] = '{9, 1, 5, 15, 11, 7, 3, 13, 12, 2, 6, 10, 14, 4, 0, 8};

  logic [31:0] rdata, exp;
  int          lat;
  logic [11:0] vsr [16];
  logic [31:0] sd_exp [int];
  int          sd_key;
  int m_sdram_w = 0, m_sdram_r = 0, m_rt = 0, m_vset_scan = 0, m_vmeas = 0, m_cm_pair = 0;
  int m_cm_burst = 0, m_clock = 0, m_user = 0, m_led = 0, m_status = 0;
  int m_ahip32 = 0, m_ahip_test = 0, m_ahip8 = 0, m_ahip8_test = 0, m_ahip_timeout = 0;

  initial begin
    for (int i = 0; i < 14; i++) begin
      vm_val[i] = 12'($urandom);
      cm_val[i] = 12'($urandom);
    end
    dc_drive = 26'($urandom);
    repeat (5) @(posedge clk);
    nreset = 1'b1;
    repeat (40) @(posedge clk);

    // SDRAM initialisation sequence seen by the device.
    check(u_sdram.n_prechg == 1 && u_sdram.n_lmr == 1 && u_sdram.n_refresh >= 2,
          "SDRAM init: one PRECHARGE ALL, two REFRESH, one LOAD MODE");

    // STATUS word and decoder latency straight to SEND.
    plx_read(A_STATUS, rdata, lat);
    check(rdata == 32'h0000_FFFF, $sformatf("STATUS idle = %h", rdata));
    check(lat == 3, $sformatf("STATUS read latency %0d, expected 3", lat));
    m_status++;

    // LGA_LED and the PLX write/read handshake latencies.
    plx_write(A_LGA_LED, 32'hA, lat);
    check(lat == 4, $sformatf("write latency %0d, expected 4", lat));
    repeat (2) @(posedge clk);
    check(led == 2'b10 && lga == 2'b10, "LED/LGA outputs follow LGA_LED");
    plx_read(A_LGA_LED, rdata, lat);
    check(rdata == 32'hA, "LGA_LED read back");
    check(lat == 7, $sformatf("read latency %0d, expected 7", lat));
    m_led++;

    // SDRAM refresh-time register
    wr(A_SDRAM_RT, 32'd120);
    rd(A_SDRAM_RT, rdata);
    check(rdata == 32'd120, "SDRAM_RT read back");
    wr(A_SDRAM_RT, 32'd78);
    rd(A_SDRAM_RT, rdata);
    check(rdata == 32'd78, "SDRAM_RT restored");
    m_rt++;

    // SDRAM words
    for (int i = 0; i < 24; i++) begin
      automatic logic [22:0] wa = 23'($urandom) & ~23'h200;
      automatic logic [31:0] d  = $urandom;
      wr({2'b00, wa, 2'b00}, d);
      sd_exp[int'(wa)] = d & 32'h0FFF_0FFF;
      m_sdram_w++;
    end
    if (sd_exp.first(sd_key)) begin
      do begin
        rd({2'b00, 23'(sd_key), 2'b00}, rdata);
        check(rdata == sd_exp[sd_key], $sformatf("SDRAM word %h: got %h exp %h", sd_key, rdata, sd_exp[sd_key]));
        m_sdram_r++;
      end while (sd_exp.next(sd_key));
    end

    // Refresh colliding with an access: a short refresh period and random
    // gaps between accesses make a refresh fall in the access cycle.
    wr(A_SDRAM_RT, 32'd5);
    for (int i = 0; i < 200 && m_collide < 3; i++) begin
      automatic logic [22:0] wa = 23'h100 + 23'(i);
      automatic logic [31:0] d  = $urandom & 32'h0FFF_0FFF;
      repeat ($urandom % 7) @(posedge clk);
      wr({2'b00, wa, 2'b00}, d);
      repeat ($urandom % 7) @(posedge clk);
      rd({2'b00, wa, 2'b00}, rdata);
      check(rdata == d, $sformatf("SDRAM word %h with short refresh: %h exp %h", wa, rdata, d));
    end
    wr(A_SDRAM_RT, 32'd78);

    // Voltage set registers, scan on VSR15
    for (int i = 0; i < 16; i++) begin
      vsr[i] = 12'($urandom);
      if (i != 15) wr(A_VS | 27'(i << 4), {20'hFFFFF, vsr[i]});
    end
    for (int i = 0; i < 15; i++) begin
      rd(A_VS | 27'(i << 4), rdata);
      check(rdata == {20'd0, vsr[i]}, $sformatf("VSR%0d read back", i));
    end
    check(dac_loads == 0, "no DAC load n_before VSR15 is written");
    wr(A_VS | 27'(15 << 4), {20'd0, vsr[15]});
    // a read right away must wait for the scan to finish
    plx_read(A_VS | 27'(3 << 4), rdata, lat);
    check(rdata == {20'd0, vsr[3]}, "VSR3 read after scan");
    if (lat > 1500) m_busy_wait++;
    check(lat > 1500, $sformatf("read waited for the DAC scan (%0d cycles)", lat));
    check(dac_bits == 256 && dac_loads == 1, $sformatf("DAC chain got %0d bits", dac_bits));
    for (int k = 0; k < 16; k++) begin
      automatic logic [15:0] w;
      w = dac_chain[255 - 16*k -: 16];
      check(w == {4'd0, vsr[chain_order[k]]},
            $sformatf("DAC %0d from chain end holds VSR%0d: %h", k, chain_order[k], w));
    end
    m_vset_scan++;

    // Voltage measure
    for (int n = 0; n < 14; n++) begin
      automatic int total;
      total = 0;
      rd(A_VM | 27'(n << 4), rdata);
      check(rdata == {20'd0, vm_val[n]}, $sformatf("VMR%0d = %h exp %h", n, rdata, vm_val[n]));
      foreach (vm_conv[i]) total += vm_conv[i];
      check(vm_conv[n] == 1 && total == n + 1, "only ADC n converts");
      m_vmeas++;
    end

    // Current measure pairs
    for (int k = 0; k < 6; k++) begin
      automatic int m = $urandom % 14, n = $urandom % 14;
      rd(a_cm(m, n), rdata);
      check(rdata == {4'd0, cm_val[m], 4'd0, cm_val[n]}, $sformatf("CM%0d%0d = %h", m, n, rdata));
      m_cm_pair++;
    end

    // Current measure bursts into SDRAM; repeat until a refresh has collided
    // with one of the burst writes (at least 3 bursts).
    begin
      automatic logic [23:0] base = 24'h001000;
      automatic int b = 0;
      wr(A_CM_BURST, {8'd0, base});
      while (b < 3) begin
        for (int i = 0; i < 14; i++) cm_val[i] = 12'($urandom);
        rd(A_CM_BURST, rdata);
        check(rdata == {8'd0, base}, $sformatf("CM_BURST returns first address %h", rdata));
        for (int k = 0; k < 7; k++) begin
          rd({2'b00, 23'(base + 24'(k)), 2'b00}, rdata);
          check(rdata == {4'd0, cm_val[2*k+1], 4'd0, cm_val[2*k]},
                $sformatf("burst word %0d = %h", k, rdata));
        end
        base = base + 24'd7;
        b++;
        m_cm_burst++;
      end
    end

    // Clock synthesizer
    begin
      automatic logic [13:0] v = 14'h1ABC;
      synth_bits = 0;
      wr(A_CLOCK, {18'h3FFFF, v});
      rd(A_CLOCK, rdata);
      check(rdata == {18'd0, v}, "CLOCK read back");
      repeat (300) @(posedge clk);
      check(synth_bits == 14 && synth_sr[13:0] == v,
            $sformatf("synthesizer got %0d bits %h", synth_bits, synth_sr[13:0]));
      m_clock++;
    end

    // User pins
    wr(a_user(3), 32'd1);
    wr(a_user(4), 32'd0);
    rd(a_user(3), rdata); check(rdata == 32'd3, "USER3 = output high");
    rd(a_user(4), rdata); check(rdata == 32'd2, "USER4 = output low");
    rd(a_user(5), rdata); check(rdata == {30'd0, 1'b0, dc_drive[5]}, "USER5 = input");
    wr(a_user(3), 32'd2);
    rd(a_user(3), rdata); check(rdata == {30'd0, 1'b0, dc_drive[3]}, "USER3 back to input");
    begin
      automatic logic [25:0] dir = 26'($urandom), val = 26'($urandom);
      wr(A_USER_DIR, {6'd0, dir});
      wr(A_USER_ALL, {6'd0, val});
      rd(A_USER_DIR, rdata); check(rdata == {6'd0, dir}, "USER_DIR read back");
      rd(A_USER_ALL, rdata);
      check(rdata == {6'd0, (dir & val) | (~dir & dc_drive)}, "USER_ALL read");
      check(user_oe == dir && (user_out & dir) == (val & dir), "user pin drivers");
    end
    m_user++;

    // AHIP normal 32-bit
    wr(A_AHIP_MODE, 32'd0);
    bus8 = 1'b0;
    for (int i = 0; i < 4; i++) begin
      automatic logic [23:0] a = 24'($urandom);
      automatic logic [31:0] d = $urandom;
      wr(a_ahip(a), d);
      rd(a_ahip(a), rdata);
      check(rdata == d, $sformatf("AHIP32 %h = %h exp %h", a, rdata, d));
      m_ahip32++;
    end
    // AHIP test mode
    wr(A_AHIP_MODE, 32'd1);
    rd(A_AHIP_MODE, rdata); check(rdata == 32'd1, "AHIP_MODE read back");
    wr(a_ahip(24'h00ABCD), 32'hCAFE_F00D);
    rd(a_ahip(24'h000000), rdata); check(rdata == 32'h0000_ABCD, "AHIP test read address");
    rd(a_ahip(24'h000010), rdata); check(rdata == 32'hCAFE_F00D, "AHIP test read data");
    check(u_slave.n_test_write == 1 && u_slave.n_test_read == 2, "slave saw test opcodes");
    m_ahip_test++;
    // AHIP 8-bit
    wr(A_AHIP_MODE, 32'd2);
    bus8 = 1'b1;
    for (int i = 0; i < 4; i++) begin
      automatic logic [23:0] a = 24'($urandom);
      automatic logic [31:0] d = $urandom;
      wr(a_ahip(a), d);
      rd(a_ahip(a), rdata);
      check(rdata == d, $sformatf("AHIP8 %h = %h exp %h", a, rdata, d));
      m_ahip8++;
    end
    // AHIP 8-bit test
    wr(A_AHIP_MODE, 32'd3);
    wr(a_ahip(24'h123456), 32'h8765_4321);
    rd(a_ahip(24'h000000), rdata); check(rdata == 32'h0012_3456, "AHIP8 test read address");
    rd(a_ahip(24'h000004), rdata); check(rdata == 32'h8765_4321, "AHIP8 test read data");
    m_ahip8_test++;
    // AHIP timeout: the slave stops answering
    wr(A_AHIP_MODE, 32'd0);
    bus8 = 1'b0;
    stuck = 1'b1;
    rd(a_ahip(24'h000100), rdata);
    check(rdata == 32'hDEAD_BEEF, $sformatf("AHIP timeout returns %h", rdata));
    if (rdata == 32'hDEAD_BEEF) m_ahip_timeout++;
    stuck = 1'b0;
    repeat (20) @(posedge clk);
    wr(a_ahip(24'h000100), 32'h1234_5678);
    rd(a_ahip(24'h000100), rdata);
    check(rdata == 32'h1234_5678, "AHIP works again after a timeout");

    // Final status and device-level checks
    repeat (40) @(posedge clk);  // AHIP finishes its closing handshake after returning data
    rd(A_STATUS, rdata);
    check(rdata == 32'h0000_FFFF, $sformatf("STATUS idle at end: %h", rdata));
    m_status++;
    m_refresh_op = u_sdram.n_refresh;
    check(u_sdram.errors == 0, $sformatf("SDRAM protocol errors: %0d", u_sdram.errors));
    check(contention == 0, "no AHIP bus contention");

    // Every mechanism must have happened
    check(m_sdram_w > 0,     "mechanism: SDRAM write");
    check(m_sdram_r > 0,     "mechanism: SDRAM read");
    check(m_refresh_op > 10, "mechanism: SDRAM refresh");
    check(m_collide > 0,     "mechanism: refresh colliding with an access");
    check(m_rt > 0,          "mechanism: refresh-time register");
    check(m_busy_wait > 0,   "mechanism: decoder waits for a busy module");
    check(m_vset_scan > 0,   "mechanism: DAC scan");
    check(m_vmeas > 0,       "mechanism: voltage measurement");
    check(m_cm_pair > 0,     "mechanism: current pair read");
    check(m_cm_burst > 0,    "mechanism: current burst to SDRAM");
    check(m_clock > 0,       "mechanism: synthesizer load");
    check(m_user > 0,        "mechanism: user pins");
    check(m_led > 0,         "mechanism: LEDs");
    check(m_status > 0,      "mechanism: status word");
    check(m_ahip32 > 0,      "mechanism: AHIP 32-bit");
    check(m_ahip_test > 0,   "mechanism: AHIP test mode");
    check(m_ahip8 > 0,       "mechanism: AHIP 8-bit");
    check(m_ahip8_test > 0,  "mechanism: AHIP 8-bit test");
    check(m_ahip_timeout > 0,"mechanism: AHIP timeout");
    $display("mechanisms: sdram_w=%0d sdram_r=%0d refresh=%0d collide=%0d busy_wait=%0d scan=%0d vmeas=%0d cm_pair=%0d cm_burst=%0d clock=%0d user=%0d led=%0d status=%0d ahip32=%0d test=%0d ahip8=%0d ahip8test=%0d timeout=%0d",
             m_sdram_w, m_sdram_r, m_refresh_op, m_collide, m_busy_wait, m_vset_scan, m_vmeas,
             m_cm_pair, m_cm_burst, m_clock, m_user, m_led, m_status, m_ahip32, m_ahip_test,
             m_ahip8, m_ahip8_test, m_ahip_timeout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
