// voltage_measure: reads the actual output voltage of supplies 0-13 through 14
// serial ADCs that share one data line (PVMD) and have one convert line each
// (PVMCVB[n], active low).
//
// A read (enable high, w_nr low) of register VMRn latches n, aligns with the
// slow clock (SYNC1/SYNC2), holds PVMCVB[n] low for about two slow-clock periods
// (CONVERT), then shifts 12 bits from PVMD into a shiftreg_in, one per
// slow-clock period (SHIFT, 96 clocks). It then raises da with the result on
// data_out[11:0] and waits two more slow-clock periods (SAMPLE_NEXT) so the ADC
// can take its next sample before done returns high. The first bit received
// becomes the MSB. Writes are ignored. A 7-bit counter paces the steps; the
// state machine looks at count[6:3], which advances once per slow-clock
// period. PVMCK is the slow clock. done and da are registered. Indices above 13
// select no ADC. The state sequence and counts follow the original design.
module voltage_measure (
  input  logic        clk,
  input  logic        nreset,
  input  logic        sclk,
  input  logic        enable,
  input  logic        w_nr,
  input  logic [3:0]  address,
  output logic [31:0] data_out,
  output logic        done,
  output logic        da,
  output logic        pvmck,
  output logic [13:0] pvmcvb,
  input  logic        pvmd
);
  typedef enum logic [2:0] {S_IDLE, S_SYNC1, S_SYNC2, S_CONVERT, S_SHIFT, S_SAMPLE_NEXT} state_e;

  state_e     state, next_state;
  logic [6:0] count;
  logic [3:0] bit_count, address_q;
  logic       read, count_go, sr_shift, convert, done_c, da_c;
  logic [11:0] sr;

  assign read      = enable && !w_nr;
  assign bit_count = count[6:3];

  counter #(.WIDTH(7)) u_count (.clk(clk), .nreset(nreset), .en(count_go), .count(count));
  shiftreg_in #(.WIDTH(12)) u_sr (.clk(clk), .nreset(nreset), .shift(sr_shift), .in(pvmd), .out(sr));

  always_comb begin
    next_state = state;
    done_c     = 1'b0;
    da_c       = 1'b0;
    count_go   = 1'b0;
    sr_shift   = 1'b0;
    convert    = 1'b0;
    unique case (state)
      S_IDLE: begin
        done_c = !read;
        da_c   = !read;
        if (read) next_state = sclk ? S_SYNC1 : S_SYNC2;
      end
      S_SYNC1: if (!sclk) next_state = S_SYNC2;
      S_SYNC2: if (sclk)  next_state = S_CONVERT;
      S_CONVERT: begin
        count_go = 1'b1;
        convert  = 1'b1;
        if (bit_count == 4'h1) next_state = S_SHIFT;
      end
      S_SHIFT: begin
        count_go = 1'b1;
        sr_shift = 1'b1;
        if (bit_count == 4'hD) next_state = S_SAMPLE_NEXT;
      end
      S_SAMPLE_NEXT: begin
        count_go = 1'b1;
        da_c     = 1'b1;
        if (bit_count == 4'hF) next_state = S_IDLE;
      end
      default: next_state = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge nreset) begin
    if (!nreset) begin
      state     <= S_IDLE;
      address_q <= '0;
      done      <= 1'b1;
      da        <= 1'b1;
    end else begin
      state <= next_state;
      done  <= done_c;
      da    <= da_c;
      if (state == S_IDLE && read) address_q <= address;
    end
  end

  always_comb begin
    for (int i = 0; i < 14; i++) pvmcvb[i] = !(convert && address_q == 4'(i));
  end

  assign data_out = {20'd0, sr};
  assign pvmck    = sclk;
endmodule
