// tb_ahip: self-checking testbench for the AHIP host, run against a
// behavioural daughtercard client that answers each request edge after a
// random delay. Covers the mode register, normal writes and reads, test-mode
// writes and the two test-mode reads (address and data), all on both the
// 32-bit and the 8-bit bus, a client that never answers (timeout, with
// 0xDEADBEEF returned for a read) and recovery afterwards. The timeout counter
// is made 10 bits wide so a timeout takes about a thousand clocks.
`timescale 1ns/1ps
module tb_ahip;
  logic clk = 1'b0, nreset = 1'b0, enable = 1'b0, w_nr = 1'b0;
  logic [24:0] address = '0;
  logic [31:0] data_in = '0, data_out;
  logic done, da;
  logic ahip_req, ahip_ack, ahip_bus_oe, slave_oe;
  logic [31:0] ahip_bus_out, ahip_bus_in, slave_out;
  logic bus8 = 1'b0, stuck = 1'b0;
  int contention = 0;
  int checks = 0, failures = 0;

  ahip #(.TIMEOUT_W(10)) dut (.clk(clk), .nreset(nreset), .enable(enable), .w_nr(w_nr),
    .address(address), .data_in(data_in), .data_out(data_out), .done(done), .da(da),
    .ahip_req(ahip_req), .ahip_ack_in(ahip_ack), .ahip_bus_in(ahip_bus_in),
    .ahip_bus_out(ahip_bus_out), .ahip_bus_oe(ahip_bus_oe));

  ahip_slave_model u_slave (.clk(clk), .bus8(bus8), .stuck(stuck), .req(ahip_req),
    .bus_from_host(ahip_bus_out), .ack(ahip_ack), .bus_out(slave_out), .bus_oe(slave_oe));
  assign ahip_bus_in = slave_oe ? slave_out : ahip_bus_out;
  always @(posedge clk) if (slave_oe && ahip_bus_oe) contention++;

  always #5 clk = ~clk;
  initial begin #20000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic check(input logic cond, input string what);
    checks++;
    if (cond !== 1'b1) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  task automatic wr(input logic [24:0] a, input logic [31:0] d, output int lat);
    @(negedge clk); enable = 1'b1; w_nr = 1'b1; address = a; data_in = d;
    @(negedge clk); enable = 1'b0; data_in = 'x;
    lat = 0;
    while (done !== 1'b1 && lat < 5000) begin @(negedge clk); lat++; end
  endtask
  task automatic rd(input logic [24:0] a, output logic [31:0] d, output int lat);
    @(negedge clk); enable = 1'b1; w_nr = 1'b0; address = a;
    @(negedge clk); enable = 1'b0;
    lat = 0;
    @(negedge clk);
    while (da !== 1'b1 && lat < 5000) begin @(negedge clk); lat++; end
    d = data_out;
    while (done !== 1'b1 && lat < 5000) begin @(negedge clk); lat++; end
  endtask

  initial begin
    logic [31:0] r;
    int lat;
    repeat (3) @(negedge clk);
    nreset = 1'b1;
    repeat (3) @(negedge clk);
    check(ahip_req === 1'b0 && ahip_bus_oe === 1'b1, "idle: no request, host drives the bus");
    for (int mode = 0; mode < 4; mode++) begin
      bus8 = mode[1];
      wr(25'h000_0000, 32'(mode), lat);
      rd(25'h000_0000, r, lat);
      check(r === 32'(mode), $sformatf("mode register reads %0d", r));
      if (!mode[0]) begin
        for (int i = 0; i < 6; i++) begin
          automatic logic [23:0] a = 24'($urandom);
          automatic logic [31:0] d = $urandom;
          automatic int nw = u_slave.n_write, nr = u_slave.n_read;
          wr({1'b1, a}, d, lat);
          check(lat < 5000 && u_slave.n_write == nw + 1, $sformatf("mode %0d write %h", mode, a));
          check(u_slave.mem.exists(int'(a)) && u_slave.mem[int'(a)] === d, $sformatf("mode %0d client stored %h", mode, d));
          rd({1'b1, a}, r, lat);
          check(u_slave.n_read == nr + 1, "client saw one read");
          check(r === d, $sformatf("mode %0d read %h = %h exp %h", mode, a, r, d));
        end
      end else begin
        automatic logic [23:0] a = 24'($urandom) | 24'h1;
        automatic logic [31:0] d = $urandom;
        wr({1'b1, a}, d, lat);
        check(u_slave.n_test_write > 0 && u_slave.test_data === d, $sformatf("mode %0d test write", mode));
        rd({1'b1, 24'd0}, r, lat);
        check(r === {8'd0, a}, $sformatf("mode %0d test read address %h exp %h", mode, r, a));
        rd({1'b1, 24'd4}, r, lat);
        check(r === d, $sformatf("mode %0d test read data %h exp %h", mode, r, d));
      end
    end
    // client that never answers
    wr(25'h000_0000, 32'd0, lat);
    bus8 = 1'b0;
    stuck = 1'b1;
    rd({1'b1, 24'h000100}, r, lat);
    check(lat > 1000 && lat < 5000, $sformatf("read times out (%0d clocks)", lat));
    check(r === 32'hDEAD_BEEF, $sformatf("timed-out read returns %h", r));
    wr({1'b1, 24'h000200}, 32'h1, lat);
    check(lat > 1000 && lat < 5000, $sformatf("write times out (%0d clocks)", lat));
    stuck = 1'b0;
    repeat (20) @(negedge clk);
    check(ahip_req === 1'b0, "request dropped after a timeout");
    wr({1'b1, 24'h000300}, 32'h1234_5678, lat);
    rd({1'b1, 24'h000300}, r, lat);
    check(r === 32'h1234_5678, "works again after a timeout");
    check(contention == 0, $sformatf("host and client never drive the bus together (%0d)", contention));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
