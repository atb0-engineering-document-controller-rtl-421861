// sdram_model: behavioural model of the board's 12-bit SDRAM, enough to test
// the controller. Not synthesizable. It decodes {RAS#, CAS#, WE#} on each
// rising clock edge, tracks the open row of each of the four banks, stores
// data sparsely, and implements a burst of two with CAS latency 2: the first
// read word is driven during the second cycle after the READ command and the
// second word one cycle later. It counts commands and protocol errors (an
// access to a bank with no open row, a command other than NOP/REFRESH/LMR/
// PRECHARGE before the mode register is loaded, and a wrong mode word).
module sdram_model (
  input  logic        clk,
  input  logic        ras_b,
  input  logic        cas_b,
  input  logic        we_b,
  input  logic [1:0]  ba,
  input  logic [11:0] a,
  input  logic [11:0] dq_in,
  input  logic        dq_in_valid,
  output logic [11:0] dq_out
);
  logic [11:0] mem [int];
  logic [11:0] open_row [4];
  logic        row_open [4];
  int          n_refresh = 0, n_active = 0, n_write = 0, n_read = 0, n_lmr = 0, n_prechg = 0;
  int          errors = 0;
  logic        mode_loaded = 1'b0;
  int          wr_phase = 0, rd_phase = 0;
  int          wr_key, rd_key;

  initial begin
    for (int i = 0; i < 4; i++) begin row_open[i] = 1'b0; open_row[i] = '0; end
    dq_out = '0;
  end

  function automatic int key(input logic [1:0] b, input logic [11:0] r, input logic [9:0] c);
    return int'({b, r, c});
  endfunction

  function automatic logic [11:0] peek(input logic [1:0] b, input logic [11:0] r, input logic [9:0] c);
    int k = key(b, r, c);
    return mem.exists(k) ? mem[k] : 12'h000;
  endfunction

  task automatic err(input string what);
    errors++;
    $display("SDRAM model: %s (t=%0t)", what, $time);
  endtask

  always @(posedge clk) begin
    // second beat of a write burst
    if (wr_phase == 1) begin
      if (!dq_in_valid) err("second write beat without data");
      mem[wr_key + 1] = dq_in;
      wr_phase = 0;
    end
    // read data pipeline
    if (rd_phase == 1) begin
      dq_out <= mem.exists(rd_key) ? mem[rd_key] : 12'h000;
      rd_phase = 2;
    end else if (rd_phase == 2) begin
      dq_out <= mem.exists(rd_key + 1) ? mem[rd_key + 1] : 12'h000;
      rd_phase = 0;
    end
    case ({ras_b, cas_b, we_b})
      3'b000: begin
        n_lmr++;
        if (a != 12'h021) err("wrong mode word");
        mode_loaded = 1'b1;
      end
      3'b001: n_refresh++;
      3'b010: begin
        n_prechg++;
        if (a[10]) for (int i = 0; i < 4; i++) row_open[i] = 1'b0;
      end
      3'b011: begin
        n_active++;
        if (!mode_loaded) err("ACTIVE before mode load");
        row_open[ba] = 1'b1;
        open_row[ba] = a;
      end
      3'b100: begin
        n_write++;
        if (!row_open[ba] || !dq_in_valid) err("WRITE to a closed bank or without data");
        wr_key = key(ba, open_row[ba], a[9:0]);
        mem[wr_key] = dq_in;
        wr_phase = 1;
        if (a[10]) row_open[ba] = 1'b0;
      end
      3'b101: begin
        n_read++;
        if (!row_open[ba]) err("READ from a closed bank");
        rd_key = key(ba, open_row[ba], a[9:0]);
        rd_phase = 1;
        if (a[10]) row_open[ba] = 1'b0;
      end
      default: ;
    endcase
  end
endmodule
