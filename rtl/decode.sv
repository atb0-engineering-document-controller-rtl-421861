// decode: PLX local-bus slave and sequencer for every other controller module.
//
// The PLX card starts an access by dropping HADS with a byte address on HAD
// and HLWNR giving the direction. In IDLE the decoder latches HAD[26:2] as the
// 25-bit word address and picks the target module: SDRAM space (HAD[26:25]=00)
// goes to the SDRAM module, AHIP space (HAD[26]=1) to the AHIP module and
// control-register space (01) to module HAD[23:20]; number 8 is the decoder
// itself (the STATUS word). It then waits (WAIT_START) for the target's done
// flag. A write drops HLRDY for one cycle (WRITE); two cycles later
// (WAIT_WRITE), when the PLX is driving the write data, it latches HAD and
// pulses the target's enable and returns to IDLE, leaving the module to finish
// on its own. A read pulses enable (READ), waits a cycle (STALL) for the
// module's da flag to fall, waits for da to rise (WAIT_READ) and then drops
// HLRDY and HXDIR for one cycle (SEND) with the module's data selected onto the
// shared data bus. A 16-bit counter times WAIT_START and WAIT_READ; on
// reaching TIMEOUT the access is abandoned and a read returns 0xDEADBEEF.
//
// Every output is registered, as in the original block diagram; the
// controller adds one more register stage before the pins. HXDIR low means the
// controller drives HAD, as the state table and the SEND description give it.
// In TIMEOUT the status word (holding 0xDEADBEEF) is selected for reads. While
// the current-measure module writes to SDRAM (cs_we), its address replaces the
// host address on the address bus. The state encoding and the timeout
// parameter are this design's choices; the sequence follows the original.
module decode
  import atb0_pkg::*;
#(
  parameter int unsigned     TIMEOUT_W = 16,
  parameter logic [TIMEOUT_W-1:0] TIMEOUT = '1
) (
  input  logic        clk,
  input  logic        nreset,
  // PLX side
  input  logic        hads,        // active low address strobe
  input  logic        hlwnr,       // 1 = write, 0 = read
  input  logic [31:0] had,         // multiplexed address/data from the PLX
  output logic        hlrdy_out,   // active low ready
  output logic        hxdir_out,   // 0 = controller drives HAD
  output logic        hadsel_out,  // 1 = status word to HAD, 0 = data bus
  output logic [31:0] status_out,
  // module side
  input  logic [NUM_MODULES-1:0] done_in,
  input  logic [NUM_MODULES-1:0] da_in,
  input  logic        cs_we,
  input  logic [23:0] cs_address,
  output logic [24:0] address_out,
  output logic [31:0] data_out,
  output logic [NUM_MODULES-1:0] enable_out,
  output logic        w_nr_out,
  output logic [3:0]  datasel_out
);
  typedef enum logic [3:0] {
    S_IDLE, S_WAIT_START, S_WRITE, S_WAIT_WRITE, S_READ, S_STALL,
    S_WAIT_READ, S_SEND, S_TIMEOUT
  } state_e;

  state_e state, next_state;
  logic [TIMEOUT_W-1:0] count;
  logic [3:0]  selected_module, next_selected_module;
  logic [24:0] address_q;
  logic        latch_address, latch_data, datasel_sel, hadsel, hlrdy, hxdir;
  logic        module_en, count_go, error;
  logic        module_done, module_da;

  counter #(.WIDTH(TIMEOUT_W)) u_count (.clk(clk), .nreset(nreset), .en(count_go), .count(count));

  always_comb begin
    unique case (had[26:25])
      2'b00:   next_selected_module = MOD_SDRAM;
      2'b01:   next_selected_module = had[23:20];
      default: next_selected_module = MOD_AHIP;
    endcase
  end

  assign module_done = (selected_module < 4'(NUM_MODULES)) ? done_in[selected_module[2:0]] : 1'b1;
  assign module_da   = (selected_module < 4'(NUM_MODULES)) ? da_in[selected_module[2:0]]   : 1'b1;

  always_comb begin
    latch_data    = 1'b0;
    latch_address = 1'b0;
    datasel_sel   = 1'b1;
    hadsel        = 1'b1;
    hlrdy         = 1'b1;
    hxdir         = 1'b1;
    module_en     = 1'b0;
    count_go      = 1'b0;
    error         = 1'b0;
    next_state    = state;
    unique case (state)
      S_IDLE: begin
        latch_address = !hads;
        if (!hads) next_state = (next_selected_module == MOD_DECODE) ? S_SEND : S_WAIT_START;
      end
      S_WAIT_START: begin
        count_go = 1'b1;
        if (module_done)           next_state = hlwnr ? S_WRITE : S_READ;
        else if (count == TIMEOUT) next_state = S_TIMEOUT;
      end
      S_WRITE: begin
        hlrdy      = 1'b0;
        next_state = S_WAIT_WRITE;
      end
      S_WAIT_WRITE: begin
        count_go   = 1'b1;
        latch_data = (count == 1);
        module_en  = (count == 1);
        if (count == 1) next_state = S_IDLE;
      end
      S_READ: begin
        datasel_sel = 1'b0;
        hadsel      = 1'b0;
        hxdir       = 1'b0;
        module_en   = 1'b1;
        next_state  = S_STALL;
      end
      S_STALL: begin
        datasel_sel = 1'b0;
        hadsel      = 1'b0;
        hxdir       = 1'b0;
        next_state  = S_WAIT_READ;
      end
      S_WAIT_READ: begin
        datasel_sel = 1'b0;
        hadsel      = 1'b0;
        hxdir       = 1'b0;
        count_go    = 1'b1;
        if (module_da)             next_state = S_SEND;
        else if (count == TIMEOUT) next_state = S_TIMEOUT;
      end
      S_SEND: begin
        datasel_sel = 1'b0;
        hadsel      = (selected_module == MOD_DECODE);
        hlrdy       = 1'b0;
        hxdir       = 1'b0;
        next_state  = S_IDLE;
      end
      S_TIMEOUT: begin
        datasel_sel = 1'b0;
        hadsel      = !hlwnr;
        hlrdy       = 1'b0;
        hxdir       = hlwnr;
        error       = 1'b1;
        next_state  = S_IDLE;
      end
      default: next_state = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge nreset) begin
    if (!nreset) begin
      state           <= S_IDLE;
      selected_module <= MOD_DECODE;
      address_q       <= '0;
      data_out        <= '0;
      hlrdy_out       <= 1'b1;
      hxdir_out       <= 1'b1;
      hadsel_out      <= 1'b1;
      status_out      <= '0;
      enable_out      <= '0;
      w_nr_out        <= 1'b0;
      datasel_out     <= MOD_DECODE;
    end else begin
      state <= next_state;
      if (latch_address) begin
        address_q       <= had[26:2];
        selected_module <= next_selected_module;
      end
      if (latch_data) data_out <= had;
      hlrdy_out   <= hlrdy;
      hxdir_out   <= hxdir;
      hadsel_out  <= hadsel;
      status_out  <= error ? ERROR_WORD : {16'd0, da_in, done_in};
      enable_out  <= (module_en && selected_module < 4'(NUM_MODULES))
                     ? NUM_MODULES'(1) << selected_module[2:0] : '0;
      w_nr_out    <= hlwnr;
      datasel_out <= datasel_sel ? MOD_DECODE : selected_module;
    end
  end

  assign address_out = cs_we ? {1'b0, cs_address} : address_q;

  // The decoder never enables more than one module at a time.
  a_onehot_enable: assert property (@(posedge clk) disable iff (!nreset) $onehot0(enable_out));
endmodule
