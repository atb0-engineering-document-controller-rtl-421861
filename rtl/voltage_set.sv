// voltage_set: holds the sixteen voltage-set registers VSR0-VSR15 and loads
// them into the daisy-chained power-supply DACs.
//
// Registers are 12 bits; a write with enable and w_nr high stores data_in[11:0]
// into register `address` (only while the state machine is idle). data_out
// always shows the addressed register one cycle later, so da is constant high.
// Writing VSR15 also starts a scan: the machine first aligns with the slow
// clock (SYNC1 waits for sclk low, SYNC2 for sclk high), then lowers PVSCSB and,
// for each of the 16 DACs, sends four zero bits (ZEROS, 32 clocks) followed by
// the 12-bit register value MSB first (SHIFT, 96 clocks), one bit per slow-clock
// period through a shiftreg_out. Registers are sent in the chain order 9, 1, 5,
// 15, 11, 7, 3, 13, 12, 2, 6, 10, 14, 4, 0, 8 (the first sent ends up in the
// last DAC). An 11-bit counter paces the scan (2048 clocks); count[10:7] picks
// the register. PVSCK is the slow clock and PVSRSB follows the global reset.
//
// done is registered and drops in the cycle after the VSR15 write is seen; it
// is also low during the write cycle itself so that the decoder cannot start
// another access before the scan has begun (a choice of this design).
module voltage_set
  import atb0_pkg::*;
(
  input  logic        clk,
  input  logic        nreset,
  input  logic        sclk,
  input  logic        enable,
  input  logic        w_nr,
  input  logic [3:0]  address,
  input  logic [31:0] data_in,
  output logic [31:0] data_out,
  output logic        done,
  output logic        da,
  output logic        pvsck,
  output logic        pvscsb,
  output logic        pvsdi9,
  output logic        pvsrsb
);
  typedef enum logic [2:0] {S_IDLE, S_SYNC1, S_SYNC2, S_ZEROS, S_SHIFT} state_e;

  state_e      state, next_state;
  logic [10:0] count;
  logic        count_go, sr_shift, vsreg_we, done_c, start;
  logic [11:0] vsreg [16];
  logic [11:0] sr_in;

  counter #(.WIDTH(11)) u_count (.clk(clk), .nreset(nreset), .en(count_go), .count(count));

  assign sr_in = vsreg[dac_chain_reg(count[10:7])];

  shiftreg_out #(.WIDTH(12)) u_sr (
    .clk(clk), .nreset(nreset), .shift(sr_shift), .in(sr_in), .out(pvsdi9));

  assign start = enable && w_nr && (address == 4'hF);

  always_comb begin
    next_state = state;
    pvscsb     = 1'b1;
    sr_shift   = 1'b0;
    vsreg_we   = 1'b0;
    count_go   = 1'b0;
    done_c     = 1'b0;
    unique case (state)
      S_IDLE: begin
        done_c   = !start;
        vsreg_we = enable && w_nr;
        if (start) next_state = sclk ? S_SYNC1 : S_SYNC2;
      end
      S_SYNC1: if (!sclk) next_state = S_SYNC2;
      S_SYNC2: if (sclk)  next_state = S_ZEROS;
      S_ZEROS: begin
        pvscsb   = 1'b0;
        count_go = 1'b1;
        if (count[6:0] == 7'h1F) next_state = S_SHIFT;
      end
      S_SHIFT: begin
        pvscsb   = 1'b0;
        sr_shift = 1'b1;
        count_go = 1'b1;
        done_c   = (count == 11'h7FF);
        if (count[6:0] == 7'h7F) next_state = (count[10:7] == 4'hF) ? S_IDLE : S_ZEROS;
      end
      default: next_state = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge nreset) begin
    if (!nreset) begin
      state    <= S_IDLE;
      done     <= 1'b1;
      data_out <= '0;
      for (int i = 0; i < 16; i++) vsreg[i] <= '0;
    end else begin
      state    <= next_state;
      done     <= done_c;
      if (vsreg_we) vsreg[address] <= data_in[11:0];
      data_out <= {20'd0, vsreg[address]};
    end
  end

  assign da     = 1'b1;
  assign pvsck  = sclk;
  assign pvsrsb = nreset;
endmodule
