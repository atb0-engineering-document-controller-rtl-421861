// ahip_slave_model: behavioural AHIP daughtercard slave for testbenches. Not
// synthesizable. It follows the four-phase req/ack protocol in its 32-bit and
// 8-bit (bus8 = 1) forms, answering each req edge after a random delay of
// 1 to 4 clock cycles of its own clock. Normal writes and reads use a sparse
// memory; a test write stores the address and the data, and test reads return
// the stored data (opcode 1001) or the stored address (opcode 1101). With
// stuck = 1 it never answers, so the host times out.
module ahip_slave_model (
  input  logic        clk,
  input  logic        bus8,
  input  logic        stuck,
  input  logic        req,
  input  logic [31:0] bus_from_host,
  output logic        ack,
  output logic [31:0] bus_out,
  output logic        bus_oe
);
  logic [31:0] mem [int];
  logic [31:0] test_addr = '0, test_data = '0;
  logic [31:0] header, data;
  int          n_write = 0, n_read = 0, n_test_write = 0, n_test_read = 0;

  initial begin
    ack = 1'b0; bus_out = '0; bus_oe = 1'b0;
  end

  task automatic pause();
    repeat (1 + ($urandom % 4)) @(posedge clk);
  endtask

  task automatic wait_req(input logic level);
    while (req !== level) @(posedge clk);
  endtask

  // Receive a 32-bit word: one req edge (32-bit bus) or four req edges.
  task automatic get_word(output logic [31:0] w, input logic first_level);
    if (!bus8) begin
      wait_req(first_level); pause();
      w = bus_from_host;
      ack = first_level;
    end else begin
      for (int b = 0; b < 4; b++) begin
        automatic logic lvl = (b % 2 == 0) ? first_level : !first_level;
        wait_req(lvl); pause();
        w[8*b +: 8] = bus_from_host[7:0];
        ack = lvl;
      end
    end
  endtask

  initial begin
    forever begin
      @(posedge clk);
      if (stuck || req !== 1'b1) continue;
      // header: starts with req high
      get_word(header, 1'b1);
      if (!header[28]) begin
        // write: data words follow; 32-bit: req low carries the data
        if (!bus8) get_word(data, 1'b0);
        else       get_word(data, 1'b1);
        if (header[31]) begin
          test_addr = {8'd0, header[23:0]};
          test_data = data;
          n_test_write++;
        end else begin
          mem[int'(header[23:0])] = data;
          n_write++;
        end
        // 32-bit: ack was lowered by get_word(.,0); 8-bit ends with ack low too
      end else begin
        if (header[31]) begin
          data = header[30] ? test_addr : test_data;
          n_test_read++;
        end else begin
          data = mem.exists(int'(header[23:0])) ? mem[int'(header[23:0])] : 32'h0;
          n_read++;
        end
        if (!bus8) begin
          wait_req(1'b0); pause();
          bus_out = data; bus_oe = 1'b1;
          pause();
          ack = 1'b0;
        end else begin
          for (int b = 0; b < 4; b++) begin
            automatic logic lvl = (b % 2 == 0) ? 1'b1 : 1'b0;
            wait_req(lvl); pause();
            bus_out = {24'd0, data[8*b +: 8]}; bus_oe = 1'b1;
            pause();
            ack = lvl;
          end
        end
        // host acknowledges the data with req high; release the bus, raise ack
        wait_req(1'b1); pause();
        bus_oe = 1'b0;
        pause();
        ack = 1'b1;
        wait_req(1'b0); pause();
        ack = 1'b0;
      end
    end
  end
endmodule
