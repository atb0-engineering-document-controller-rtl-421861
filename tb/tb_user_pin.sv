// tb_user_pin: self-checking testbench for the 26 user pins. A pin model
// resolves each pin from the controller's drive (when its output enable is
// high) or from an external value. Checks single-pin writes of 0, 1 and 2
// (input), single-pin reads {direction, value}, USER_ALL and USER_DIR writes
// and reads, and that writes to a pin number past 25 are ignored.
`timescale 1ns/1ps
module tb_user_pin;
  logic clk = 1'b0, nreset = 1'b0, enable = 1'b0, w_nr = 1'b0;
  logic [10:0] address = '0;
  logic [31:0] data_in = '0, data_out;
  logic done, da;
  logic [25:0] user_in, user_out, user_oe, ext = '0;
  logic [25:0] m_def = '0, m_dir = '0;
  int checks = 0, failures = 0;

  user_pin #(.NPINS(26)) dut (.clk(clk), .nreset(nreset), .enable(enable), .w_nr(w_nr),
    .address(address), .data_in(data_in), .data_out(data_out), .done(done), .da(da),
    .user_in(user_in), .user_out(user_out), .user_oe(user_oe));

  // a driven pin reads back what the controller drives
  assign user_in = (user_oe & user_out) | (~user_oe & ext);

  always #5 clk = ~clk;
  initial begin #1000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end

  task automatic check(input logic cond, input string what);
    checks++;
    if (cond !== 1'b1) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  task automatic wr(input logic [10:0] a, input logic [31:0] d);
    @(negedge clk); enable = 1'b1; w_nr = 1'b1; address = a; data_in = d;
    @(negedge clk); enable = 1'b0; data_in = 'x;
  endtask
  task automatic rd(input logic [10:0] a, output logic [31:0] d);
    @(negedge clk); enable = 1'b1; w_nr = 1'b0; address = a;
    @(negedge clk); enable = 1'b0; d = data_out;
  endtask

  function automatic logic [25:0] pins();
    return (m_dir & m_def) | (~m_dir & ext);
  endfunction

  initial begin
    logic [31:0] r;
    repeat (2) @(negedge clk);
    nreset = 1'b1;
    check(user_oe === '0, "all pins inputs after reset");
    for (int i = 0; i < 200; i++) begin
      automatic int p = $urandom % 28;
      automatic int v = $urandom % 3;
      ext = 26'($urandom);
      wr(11'h400 | 11'(p << 2), 32'(v));
      if (p < 26) begin
        if (v == 2) m_dir[p] = 1'b0;
        else begin m_dir[p] = 1'b1; m_def[p] = v[0]; end
      end
      check(user_oe === m_dir, $sformatf("pin %0d write %0d: direction %h exp %h", p, v, user_oe, m_dir));
      check((user_out & m_dir) === (m_def & m_dir), "driven values");
      p = $urandom % 28;
      rd(11'h400 | 11'(p << 2), r);
      if (p < 26) check(r === {30'd0, m_dir[p], pins()[p]}, $sformatf("pin %0d read %h", p, r));
      else        check(r === '0, "pin past 25 reads zero");
      rd(11'h000, r);
      check(r === {6'd0, pins()}, $sformatf("USER_ALL read %h exp %h", r, pins()));
      rd(11'h001, r);
      check(r === {6'd0, m_dir}, "USER_DIR read");
    end
    // block writes
    for (int i = 0; i < 20; i++) begin
      automatic logic [25:0] d = 26'($urandom), v = 26'($urandom);
      ext = 26'($urandom);
      wr(11'h001, {6'd0, d}); m_dir = d;
      wr(11'h000, {6'd0, v}); m_def = v;
      check(user_oe === d, "USER_DIR sets all directions");
      check((user_out & d) === (v & d), "USER_ALL sets driven values");
      rd(11'h000, r);
      check(r === {6'd0, pins()}, "USER_ALL read after block writes");
      check(done === 1'b1 && da === 1'b1, "never busy");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
