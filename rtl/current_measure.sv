// current_measure: reads the current drawn from supplies 0-13 through 14 serial
// ADCs that share one convert line (PCMCVB, active low) and each have their own
// data line (PCMD[13:0]); optionally stores a burst of all 14 results in SDRAM.
//
// Register map (11-bit word address): 0 = CM_BURST, 1 = CM_MASK (not
// implemented: reads do not convert, writes are ignored), 0x400 + m*16 + n*4 =
// CMmn. A read of CM_BURST or of a CMmn register (conv) latches the address,
// aligns with the slow clock, holds PCMCVB low for about two slow-clock periods
// (CONVERT) and shifts 12 bits into each of 14 shiftreg_in registers (SHIFT, 96
// clocks); the first bit received becomes the MSB. During SHIFT the current
// SDRAM pointer is copied to start_sdram_address. Then:
//  * CMmn: SAMPLE_NEXT waits one slow-clock period with da high; data_out is
//    {4'b0, result m, 4'b0, result n}.
//  * CM_BURST: WRITE_SDRAM runs seven eight-clock rounds. Round k sets the
//    internal address to pair (2k+1, 2k), so data_out holds results 2k+1
//    (bits 27:16) and 2k (bits 11:0), and pulses sdram_we in its last clock to
//    write that word at sdram_address. sdram_address advances by one word at
//    the start of every round after the first and once after the last, so the
//    next burst starts on a fresh word. Back in IDLE data_out shows
//    start_sdram_address, the word address of the first result.
// A write to CM_BURST sets sdram_address (a word address in SDRAM space) from
// data_in[23:0].
//
// done and da are registered; sdram_we and sdram_address go straight to the
// SDRAM controller (and to the decoder, which puts the address on the bus).
// Counts and state sequence follow the original design. Its register table
// advances the SDRAM pointer by 4 and its text by one word; this design uses
// one word, because the SDRAM controller takes word addresses.
module current_measure (
  input  logic        clk,
  input  logic        nreset,
  input  logic        sclk,
  input  logic        enable,
  input  logic        w_nr,
  input  logic [10:0] address_in,
  input  logic [31:0] data_in,
  output logic [31:0] data_out,
  output logic        done,
  output logic        da,
  output logic        sdram_we,
  output logic [23:0] sdram_address,
  output logic        pcmck,
  output logic        pcmcvb,
  input  logic [13:0] pcmd
);
  typedef enum logic [2:0] {S_IDLE, S_SYNC1, S_SYNC2, S_CONVERT, S_SHIFT, S_SAMPLE_NEXT, S_WRITE_SDRAM} state_e;

  state_e      state, next_state;
  logic [6:0]  count;
  logic [3:0]  bit_count;
  logic [10:0] address;
  logic [23:0] start_sdram_address;
  logic        conv, count_go, sr_shift, convert, write_sdram, done_c, da_c;
  logic        latch_address, latch_sda;
  logic [11:0] sr [14];
  logic [11:0] res_m, res_n;

  assign conv      = enable && !w_nr && !address_in[0];
  assign bit_count = count[6:3];

  counter #(.WIDTH(7)) u_count (.clk(clk), .nreset(nreset), .en(count_go), .count(count));

  for (genvar i = 0; i < 14; i++) begin : g_sr
    shiftreg_in #(.WIDTH(12)) u_sr (.clk(clk), .nreset(nreset), .shift(sr_shift), .in(pcmd[i]), .out(sr[i]));
  end

  always_comb begin
    next_state  = state;
    done_c      = 1'b0;
    da_c        = 1'b0;
    count_go    = 1'b0;
    sr_shift    = 1'b0;
    convert     = 1'b0;
    write_sdram = 1'b0;
    sdram_we    = 1'b0;
    unique case (state)
      S_IDLE: begin
        done_c = !conv;
        da_c   = !conv;
        if (conv) next_state = sclk ? S_SYNC1 : S_SYNC2;
      end
      S_SYNC1: if (!sclk) next_state = S_SYNC2;
      S_SYNC2: if (sclk)  next_state = S_CONVERT;
      S_CONVERT: begin
        count_go = 1'b1;
        convert  = 1'b1;
        if (bit_count == 4'h1) next_state = S_SHIFT;
      end
      S_SHIFT: begin
        count_go = !(bit_count == 4'hD);
        sr_shift = 1'b1;
        if (bit_count == 4'hD) next_state = address[10] ? S_SAMPLE_NEXT : S_WRITE_SDRAM;
      end
      S_SAMPLE_NEXT: begin
        count_go = 1'b1;
        da_c     = 1'b1;
        if (bit_count == 4'h1) next_state = S_IDLE;
      end
      S_WRITE_SDRAM: begin
        count_go    = 1'b1;
        write_sdram = 1'b1;
        sdram_we    = (count[2:0] == 3'h7);
        if (bit_count == 4'h7) next_state = S_IDLE;
      end
      default: next_state = S_IDLE;
    endcase
  end

  assign latch_address = (state == S_IDLE && enable) || write_sdram;
  assign latch_sda     = (state == S_IDLE && enable && w_nr && address_in == 11'd0) ||
                         (write_sdram && count[2:0] == 3'h0 && count[6:3] != 4'h0);

  assign res_m = (address[9:6] < 4'd14) ? sr[address[9:6]] : 12'd0;
  assign res_n = (address[5:2] < 4'd14) ? sr[address[5:2]] : 12'd0;

  always_ff @(posedge clk or negedge nreset) begin
    if (!nreset) begin
      state               <= S_IDLE;
      address             <= '0;
      sdram_address       <= '0;
      start_sdram_address <= '0;
      data_out            <= '0;
      done                <= 1'b1;
      da                  <= 1'b1;
    end else begin
      state <= next_state;
      done  <= done_c;
      da    <= da_c;
      if (latch_address)
        address <= write_sdram ? {1'b0, count[5:3], 1'b1, count[5:3], 3'b000} : address_in;
      if (latch_sda)
        sdram_address <= write_sdram ? sdram_address + 24'd1 : data_in[23:0];
      if (sr_shift) start_sdram_address <= sdram_address;
      data_out <= (write_sdram || address[10]) ? {4'd0, res_m, 4'd0, res_n}
                                                : {8'd0, start_sdram_address};
    end
  end

  assign pcmcvb = !convert;
  assign pcmck  = sclk;
endmodule
