// sdram_ctrl: controller for the board's 12-bit wide SDRAM.
//
// Each 32-bit word of SDRAM memory space holds two 12-bit SDRAM locations: bits
// 27:16 and 11:0 (the other bits read as zero). After reset the state machine
// initialises the devices: NOP, PRECHARGE ALL (SDA = 0x400), two REFRESH
// commands, each followed by a three-cycle wait, and LOAD MODE REGISTER with
// 0x021 (burst of two, sequential, CAS latency 2). In IDLE it issues a REFRESH
// whenever the refresh timer has expired and restarts the timer.
//
// A word access opens the row (ACTIVE, bank = address[23:22], row =
// address[21:10]), waits a cycle, then issues WRITE or READ with auto
// precharge: SDA = {0, 1, column}, the column being the word's column doubled,
// since two locations make one word. A write drives the high 12 bits in the
// WRITE cycle and the low 12 bits in the next. A read latches the high half
// two cycles after READ and the low half a cycle later, then raises da. Each
// access ends with one wait cycle for the auto precharge. The wait states
// WAIT3, WAIT2 and WAIT1 count down and then jump to the state held in
// wait_state.
//
// The refresh-time register (SDRAM_RT, reset value 78) is written and read
// through the same port: address bit 23 marks control-register space. The
// current-measure module writes with cs_we and cs_address; such a write
// behaves like a host write. The outputs da and done are registered.
//
// This design's own choices: the SDA column is {0, 1, address[8:0], 0}, so
// address[9] does not reach the SDRAM (the original field list gives a 10-bit
// column that cannot be doubled in the 10 column bits left next to the auto
// precharge bit). An access that arrives in the same cycle as a refresh is not
// dropped: it waits one cycle (WAIT1) after the REFRESH and then
// goes to its BEGIN state, short enough that back-to-back current-measure
// writes eight cycles apart are all served. The SDDQ
// tri-state pad is split into sddq_in, sddq_out and sddq_oe.
module sdram_ctrl
  import atb0_pkg::*;
(
  input  logic        clk,
  input  logic        nreset,
  // decode / module bus
  input  logic        enable_in,
  input  logic        w_nr_in,
  input  logic [24:0] address_in,
  input  logic [31:0] data_in,
  output logic [31:0] data_out,
  output logic        done,
  output logic        da,
  // current-measure write port
  input  logic        cs_we,
  input  logic [23:0] cs_address,
  // SDRAM pins
  output logic        sdck,
  output logic        sdcke,
  output logic        sddqm,
  output logic        sdras_b,
  output logic        sdcas_b,
  output logic        sdwe_b,
  output logic [1:0]  sdba,
  output logic [11:0] sda,
  input  logic [11:0] sddq_in,
  output logic [11:0] sddq_out,
  output logic        sddq_oe
);
  typedef enum logic [4:0] {
    S_INIT, S_PRECHARGE_ALL, S_INIT_REFRESH, S_INIT_REFRESH2, S_INIT_LMR,
    S_IDLE, S_BEGIN_WRITE, S_WRITE_1, S_WRITE_2, S_BEGIN_READ, S_READ_ISSUE,
    S_READ_1, S_READ_2, S_WAIT3, S_WAIT2, S_WAIT1
  } state_e;

  typedef enum logic [1:0] {DS_SAVE = 2'b00, DS_RT = 2'b01, DS_GET_HI = 2'b10, DS_GET_LO = 2'b11} data_sel_e;
  typedef enum logic [1:0] {SA_PRECHG = 2'b00, SA_MODE = 2'b01, SA_ROW = 2'b10, SA_COL = 2'b11} sda_sel_e;

  state_e    state, next_state, wait_state, next_wait_state;
  sdram_op_e sdram_op;
  data_sel_e data_sel;
  sda_sel_e  sda_sel;
  logic      enable, w_nr, ctl_reg, access;
  logic      latch_write_data, latch_rt, latch_address;
  logic      sddq_hilo, drive_sddq, da_c, done_c;
  logic      refresh_expired, reset_refresh;
  logic [23:0] address, write_data;
  logic [15:0] refresh_time;

  assign enable  = enable_in | cs_we;
  assign w_nr    = cs_we | w_nr_in;
  assign ctl_reg = !cs_we && address_in[23];
  assign access  = enable && !ctl_reg;

  refresh_timer #(.WIDTH(16)) u_rt (
    .clk(clk), .nreset(nreset), .reset(reset_refresh),
    .maxvalue(refresh_time), .expired(refresh_expired));

  always_comb begin
    sdram_op         = SD_NOP;
    data_sel         = DS_SAVE;
    sda_sel          = SA_ROW;
    latch_write_data = 1'b0;
    latch_rt         = 1'b0;
    latch_address    = 1'b0;
    sddq_hilo        = 1'b0;
    drive_sddq       = 1'b0;
    da_c             = 1'b0;
    done_c           = 1'b0;
    reset_refresh    = 1'b0;
    next_state       = state;
    next_wait_state  = wait_state;
    unique case (state)
      S_INIT: next_state = S_PRECHARGE_ALL;
      S_PRECHARGE_ALL: begin
        sdram_op = SD_PRECHARGE; sda_sel = SA_PRECHG;
        next_state = S_WAIT3; next_wait_state = S_INIT_REFRESH;
      end
      S_INIT_REFRESH: begin
        sdram_op = SD_REFRESH;
        next_state = S_WAIT3; next_wait_state = S_INIT_REFRESH2;
      end
      S_INIT_REFRESH2: begin
        sdram_op = SD_REFRESH;
        next_state = S_WAIT3; next_wait_state = S_INIT_LMR;
      end
      S_INIT_LMR: begin
        sdram_op = SD_LMR; sda_sel = SA_MODE;
        reset_refresh = 1'b1;
        next_state = S_IDLE;
      end
      S_IDLE: begin
        sdram_op         = refresh_expired ? SD_REFRESH : SD_NOP;
        reset_refresh    = refresh_expired;
        data_sel         = (enable && ctl_reg && !w_nr) ? DS_RT : DS_SAVE;
        latch_write_data = access;
        latch_address    = access;
        latch_rt         = enable && ctl_reg && w_nr;
        da_c             = !access;
        done_c           = !access;
        if (access) begin
          if (!refresh_expired) begin
            next_state = w_nr ? S_BEGIN_WRITE : S_BEGIN_READ;
          end else begin
            next_state      = S_WAIT1;
            next_wait_state = w_nr ? S_BEGIN_WRITE : S_BEGIN_READ;
          end
        end
      end
      S_BEGIN_WRITE: begin
        sdram_op = SD_ACTIVE; sda_sel = SA_ROW; da_c = 1'b1;
        next_state = S_WAIT1; next_wait_state = S_WRITE_1;
      end
      S_WRITE_1: begin
        sdram_op = SD_WRITE; sda_sel = SA_COL; sddq_hilo = 1'b1; drive_sddq = 1'b1; da_c = 1'b1;
        next_state = S_WRITE_2;
      end
      S_WRITE_2: begin
        drive_sddq = 1'b1; da_c = 1'b1;
        next_state = S_WAIT1; next_wait_state = S_IDLE;
      end
      S_BEGIN_READ: begin
        sdram_op = SD_ACTIVE; sda_sel = SA_ROW;
        next_state = S_WAIT1; next_wait_state = S_READ_ISSUE;
      end
      S_READ_ISSUE: begin
        sdram_op = SD_READ; sda_sel = SA_COL;
        next_state = S_WAIT1; next_wait_state = S_READ_1;
      end
      S_READ_1: begin
        data_sel = DS_GET_HI;
        next_state = S_READ_2;
      end
      S_READ_2: begin
        data_sel = DS_GET_LO; da_c = 1'b1; done_c = 1'b1;
        next_state = S_WAIT1; next_wait_state = S_IDLE;
      end
      S_WAIT3: next_state = S_WAIT2;
      S_WAIT2: next_state = S_WAIT1;
      S_WAIT1: next_state = wait_state;
      default: next_state = S_INIT;
    endcase
  end

  always_ff @(posedge clk or negedge nreset) begin
    if (!nreset) begin
      state        <= S_INIT;
      wait_state   <= S_INIT;
      address      <= '0;
      write_data   <= '0;
      refresh_time <= SDRAM_RT_DEFAULT;
      data_out     <= '0;
      da           <= 1'b0;
      done         <= 1'b0;
    end else begin
      state      <= next_state;
      wait_state <= next_wait_state;
      da         <= da_c;
      done       <= done_c;
      if (latch_address)    address    <= cs_we ? cs_address : address_in[23:0];
      if (latch_write_data) write_data <= {data_in[27:16], data_in[11:0]};
      if (latch_rt)         refresh_time <= data_in[15:0];
      unique case (data_sel)
        DS_RT:     data_out <= {16'd0, refresh_time};
        DS_GET_HI: data_out <= {4'd0, sddq_in, 16'd0};
        DS_GET_LO: data_out[11:0]  <= sddq_in;
        default:   ;
      endcase
    end
  end

  always_comb begin
    unique case (sda_sel)
      SA_PRECHG: sda = SDRAM_PRECHG_ALL;
      SA_MODE:   sda = SDRAM_MODE_WORD;
      SA_ROW:    sda = address[21:10];
      default:   sda = {1'b0, 1'b1, address[8:0], 1'b0};
    endcase
  end

  assign {sdras_b, sdcas_b, sdwe_b} = sdram_op;
  assign sdba     = address[23:22];
  assign sddq_out = sddq_hilo ? write_data[23:12] : write_data[11:0];
  assign sddq_oe  = drive_sddq;
  assign sdck     = clk;
  assign sdcke    = 1'b1;
  assign sddqm    = 1'b0;
endmodule
