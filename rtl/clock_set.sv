// clock_set: the CLOCK register, which programs the serial interface of the
// daughtercard frequency synthesizer.
//
// The 14-bit register holds {test[2:0], N[1:0], M[8:0]}. A write (enable and
// w_nr high) stores data_in[13:0] for read-back and starts a load: the state
// machine aligns with the slow clock (SYNC1/SYNC2), waits three more clocks
// (WAIT) so that the data changes in the middle of a CKSC period, then raises
// CKSL and shifts the 14 bits out on CKSD, MSB first, one per slow-clock period
// (SHIFT, 0x70 clocks plus one), and returns to IDLE. CKSC is the slow clock.
// Reads return the stored value at any time, so da is constant high; done is
// registered and low while a load is in progress. Counts and states follow the
// original design; the shift register is fed from the stored register rather
// than from the data bus, which may change during the load (a choice of this
// design).
module clock_set (
  input  logic        clk,
  input  logic        nreset,
  input  logic        sclk,
  input  logic        enable,
  input  logic        w_nr,
  input  logic [31:0] data_in,
  output logic [31:0] data_out,
  output logic        done,
  output logic        da,
  output logic        cksc,
  output logic        cksd,
  output logic        cksl
);
  typedef enum logic [2:0] {S_IDLE, S_SYNC1, S_SYNC2, S_WAIT, S_SHIFT} state_e;

  state_e      state, next_state;
  logic [6:0]  count;
  logic [13:0] clk_reg;
  logic        write, count_go, sr_shift, latch_data, done_c;

  assign write = enable && w_nr;

  counter #(.WIDTH(7)) u_count (.clk(clk), .nreset(nreset), .en(count_go), .count(count));
  shiftreg_out #(.WIDTH(14)) u_sr (.clk(clk), .nreset(nreset), .shift(sr_shift), .in(clk_reg), .out(cksd));

  always_comb begin
    next_state = state;
    done_c     = 1'b0;
    cksl       = 1'b0;
    sr_shift   = 1'b0;
    count_go   = 1'b0;
    latch_data = 1'b0;
    unique case (state)
      S_IDLE: begin
        done_c     = !write;
        latch_data = write;
        if (write) next_state = sclk ? S_SYNC1 : S_SYNC2;
      end
      S_SYNC1: if (!sclk) next_state = S_SYNC2;
      S_SYNC2: if (sclk)  next_state = S_WAIT;
      S_WAIT: begin
        count_go = !(count == 7'h2);
        if (count == 7'h2) next_state = S_SHIFT;
      end
      S_SHIFT: begin
        cksl     = 1'b1;
        sr_shift = 1'b1;
        count_go = 1'b1;
        if (count == 7'h70) next_state = S_IDLE;
      end
      default: next_state = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge nreset) begin
    if (!nreset) begin
      state   <= S_IDLE;
      clk_reg <= '0;
      done    <= 1'b1;
    end else begin
      state <= next_state;
      done  <= done_c;
      if (latch_data) clk_reg <= data_in[13:0];
    end
  end

  assign data_out = {18'd0, clk_reg};
  assign da       = 1'b1;
  assign cksc     = sclk;
endmodule
