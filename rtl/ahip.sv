// ahip: host side of the Asynchronous Host Interface Port, which carries the
// host's reads and writes of the AHIP daughtercard memory space to a slave on
// the daughtercard over a 32-bit bidirectional bus with a req/ack four-phase
// handshake. The slave runs on its own clock.
//
// Address bit 24 (word address) separates daughtercard space (1) from the
// AHIP_MODE register (0). The mode register (data_in[1:0]) selects test mode
// (bit 0) and the 8-bit bus variant (bit 1). An access builds a header
// {opcode, bmc = 0, address[23:0]}; opcode is 0000 write / 0001 read, or in test
// mode 1000 test write, 1101 test read of address 0 (returns the stored
// address) and 1001 other test reads (return the stored data).
//
// 32-bit transfer. Write: drive header, raise req (ISSUE); on ack drive the
// data and drop req (W_SENDDATA); done when ack falls. Read: drive header, raise
// req; on ack release the bus and drop req (R_GETDATA), capturing the bus until
// ack falls; raise req (R_ACK) until the slave raises ack after releasing the
// bus; drop req and drive the bus again (R_DONE) until ack falls.
// 8-bit transfer: the header and then the data move one byte per req or ack
// edge on bus bits 7:0, lowest byte first (ISSUE1-4, W8_SENDDATA1-4,
// R8_GETDATA1-4); a read finishes with R_ACK/R_DONE as above.
// While idle the host drives the bus. A 16-bit counter runs during a
// transaction; if it wraps to all ones the machine goes to TIMEOUT and a read
// returns 0xDEADBEEF.
//
// ack_in is synchronised by two flip-flops. req, the bus value, the bus enable,
// done and da are registered. The tri-state bus is split into ahip_bus_in,
// ahip_bus_out and ahip_bus_oe. data_out shows the mode after a read of
// AHIP_MODE and otherwise the last transferred data word. Byte order follows
// the protocol description (low byte first); the module's block diagram
// numbers its byte multiplexer the other way, and was not followed there.
module ahip
  import atb0_pkg::*;
#(
  parameter int unsigned TIMEOUT_W = 16
) (
  input  logic        clk,
  input  logic        nreset,
  input  logic        enable,
  input  logic        w_nr,
  input  logic [24:0] address,
  input  logic [31:0] data_in,
  output logic [31:0] data_out,
  output logic        done,
  output logic        da,
  output logic        ahip_req,
  input  logic        ahip_ack_in,
  input  logic [31:0] ahip_bus_in,
  output logic [31:0] ahip_bus_out,
  output logic        ahip_bus_oe
);
  typedef enum logic [4:0] {
    S_IDLE, S_ISSUE, S_R_GETDATA, S_R_ACK, S_R_DONE, S_W_SENDDATA,
    S_ISSUE1, S_ISSUE2, S_ISSUE3, S_ISSUE4,
    S_R8_GETDATA1, S_R8_GETDATA2, S_R8_GETDATA3, S_R8_GETDATA4,
    S_W8_SENDDATA1, S_W8_SENDDATA2, S_W8_SENDDATA3, S_W8_SENDDATA4,
    S_TIMEOUT
  } state_e;

  state_e      state, next_state;
  logic [1:0]  mode;
  logic [31:0] header, ahipdata;
  logic [TIMEOUT_W-1:0] count;
  logic        ack_s1, ack;
  logic        go, latch_mode, outdata_sel, out_mode_q;
  logic        da_c, done_c, req_c, latch_header, latch_ahipdata, ahipdata_sel;
  logic        bus_sel, ahip_dir, count_go, error;
  logic [1:0]  byte_sel;
  logic [3:0]  opcode;
  logic [31:0] bus_word;
  logic [7:0]  bus_byte;

  assign go          = enable && address[24];
  assign latch_mode  = enable && w_nr && !address[24];
  assign outdata_sel = enable && !w_nr && !address[24];

  counter #(.WIDTH(TIMEOUT_W)) u_count (.clk(clk), .nreset(nreset), .en(count_go), .count(count));

  always_comb begin
    if (w_nr)                       opcode = mode[0] ? AHIP_OP_TEST_WRITE : AHIP_OP_WRITE;
    else if (!mode[0])              opcode = AHIP_OP_READ;
    else if (address[23:0] == 24'd0) opcode = AHIP_OP_TEST_RADDR;
    else                            opcode = AHIP_OP_TEST_RDATA;
  end

  always_comb begin
    next_state     = state;
    da_c           = 1'b0;
    done_c         = 1'b0;
    req_c          = 1'b0;
    latch_header   = 1'b0;
    latch_ahipdata = 1'b0;
    ahipdata_sel   = 1'b0;
    bus_sel        = 1'b0;
    ahip_dir       = 1'b1;
    count_go       = 1'b1;
    error          = 1'b0;
    byte_sel       = 2'd0;
    unique case (state)
      S_IDLE: begin
        da_c           = !go;
        done_c         = !go;
        latch_header   = 1'b1;
        latch_ahipdata = go && w_nr;
        ahipdata_sel   = go && w_nr;
        count_go       = 1'b0;
        if (go) next_state = mode[1] ? S_ISSUE1 : S_ISSUE;
      end
      S_ISSUE: begin
        req_c = 1'b1;
        if (ack) next_state = header[28] ? S_R_GETDATA : S_W_SENDDATA;
      end
      S_R_GETDATA: begin
        latch_ahipdata = 1'b1;
        ahip_dir       = 1'b0;
        if (!ack) next_state = S_R_ACK;
      end
      S_R_ACK: begin
        da_c = 1'b1; req_c = 1'b1; ahip_dir = 1'b0;
        if (ack) next_state = S_R_DONE;
      end
      S_R_DONE: begin
        da_c = 1'b1;
        if (!ack) next_state = S_IDLE;
      end
      S_W_SENDDATA: begin
        da_c = 1'b1; bus_sel = 1'b1;
        if (!ack) next_state = S_IDLE;
      end
      S_ISSUE1: begin req_c = 1'b1; byte_sel = 2'd0; if (ack)  next_state = S_ISSUE2; end
      S_ISSUE2: begin               byte_sel = 2'd1; if (!ack) next_state = S_ISSUE3; end
      S_ISSUE3: begin req_c = 1'b1; byte_sel = 2'd2; if (ack)  next_state = S_ISSUE4; end
      S_ISSUE4: begin
        byte_sel = 2'd3;
        if (!ack) next_state = header[28] ? S_R8_GETDATA1 : S_W8_SENDDATA1;
      end
      S_R8_GETDATA1: begin req_c = 1'b1; ahip_dir = 1'b0; latch_ahipdata = 1'b1; byte_sel = 2'd0;
                           if (ack)  next_state = S_R8_GETDATA2; end
      S_R8_GETDATA2: begin               ahip_dir = 1'b0; latch_ahipdata = 1'b1; byte_sel = 2'd1;
                           if (!ack) next_state = S_R8_GETDATA3; end
      S_R8_GETDATA3: begin req_c = 1'b1; ahip_dir = 1'b0; latch_ahipdata = 1'b1; byte_sel = 2'd2;
                           if (ack)  next_state = S_R8_GETDATA4; end
      S_R8_GETDATA4: begin               ahip_dir = 1'b0; latch_ahipdata = 1'b1; byte_sel = 2'd3;
                           if (!ack) next_state = S_R_ACK; end
      S_W8_SENDDATA1: begin da_c = 1'b1; req_c = 1'b1; bus_sel = 1'b1; byte_sel = 2'd0;
                            if (ack)  next_state = S_W8_SENDDATA2; end
      S_W8_SENDDATA2: begin da_c = 1'b1;               bus_sel = 1'b1; byte_sel = 2'd1;
                            if (!ack) next_state = S_W8_SENDDATA3; end
      S_W8_SENDDATA3: begin da_c = 1'b1; req_c = 1'b1; bus_sel = 1'b1; byte_sel = 2'd2;
                            if (ack)  next_state = S_W8_SENDDATA4; end
      S_W8_SENDDATA4: begin da_c = 1'b1;               bus_sel = 1'b1; byte_sel = 2'd3;
                            if (!ack) next_state = S_IDLE; end
      S_TIMEOUT: begin
        ahip_dir       = 1'b0;
        count_go       = 1'b0;
        error          = 1'b1;
        latch_ahipdata = header[28];
        next_state     = S_IDLE;
      end
      default: next_state = S_IDLE;
    endcase
    if (state != S_IDLE && state != S_TIMEOUT && count == '1) next_state = S_TIMEOUT;
  end

  // Word or byte to drive onto the bus.
  always_comb begin
    logic [31:0] src;
    src      = bus_sel ? ahipdata : header;
    bus_byte = src[8*byte_sel +: 8];
    bus_word = mode[1] ? {24'd0, bus_byte} : src;
  end

  always_ff @(posedge clk or negedge nreset) begin
    if (!nreset) begin
      state        <= S_IDLE;
      mode         <= 2'd0;
      header       <= '0;
      ahipdata     <= '0;
      ack_s1       <= 1'b0;
      ack          <= 1'b0;
      out_mode_q   <= 1'b0;
      done         <= 1'b1;
      da           <= 1'b1;
      ahip_req     <= 1'b0;
      ahip_bus_out <= '0;
      ahip_bus_oe  <= 1'b1;
    end else begin
      state        <= next_state;
      ack_s1       <= ahip_ack_in;
      ack          <= ack_s1;
      done         <= done_c;
      da           <= da_c;
      ahip_req     <= req_c;
      ahip_bus_out <= bus_word;
      ahip_bus_oe  <= ahip_dir;
      if (latch_mode) mode <= data_in[1:0];
      if (outdata_sel)  out_mode_q <= 1'b1;
      else if (go)      out_mode_q <= 1'b0;
      if (latch_header) header <= {opcode, 4'd0, address[23:0]};
      if (latch_ahipdata) begin
        if (error)             ahipdata <= ERROR_WORD;
        else if (ahipdata_sel) ahipdata <= data_in;
        else if (mode[1])      ahipdata[8*byte_sel +: 8] <= ahip_bus_in[7:0];
        else                   ahipdata <= ahip_bus_in;
      end
    end
  end

  assign data_out = out_mode_q ? {30'd0, mode} : ahipdata;
endmodule
