// atb0_pkg: constants and types shared by the ATB0 board controller.
//
// Module numbers: the decode module routes an access to one of eight function
// modules by number. For control registers the number is taken from address
// bits 23:20 of the byte address (bits 21:18 of the 25-bit word address bus),
// so the numbering here follows the register map (LGA_LED at 0x2000000,
// voltage set at 0x2100000, ... status at 0x2800000). The STATUS word carries
// each module's done flag in bit <number> and its data-available flag in bit
// 8 + <number>.
//
// SDRAM commands are the standard {RAS#, CAS#, WE#} encodings.
package atb0_pkg;

  typedef enum logic [3:0] {
    MOD_LGALED  = 4'd0,
    MOD_VSET    = 4'd1,
    MOD_VMEAS   = 4'd2,
    MOD_CMEAS   = 4'd3,
    MOD_CLOCK   = 4'd4,
    MOD_SDRAM   = 4'd5,
    MOD_USER    = 4'd6,
    MOD_AHIP    = 4'd7,
    MOD_DECODE  = 4'd8
  } module_num_e;

  localparam int unsigned NUM_MODULES = 8;

  // Value returned to the host when an access times out.
  localparam logic [31:0] ERROR_WORD = 32'hDEADBEEF;

  // SDRAM command encodings {SDRAS_B, SDCAS_B, SDWE_B}.
  typedef enum logic [2:0] {
    SD_LMR       = 3'b000,
    SD_REFRESH   = 3'b001,
    SD_PRECHARGE = 3'b010,
    SD_ACTIVE    = 3'b011,
    SD_WRITE     = 3'b100,
    SD_READ      = 3'b101,
    SD_NOP       = 3'b111
  } sdram_op_e;

  // SDRAM mode register: burst length 2, sequential, CAS latency 2.
  localparam logic [11:0] SDRAM_MODE_WORD   = 12'h021;
  localparam logic [11:0] SDRAM_PRECHG_ALL  = 12'h400;
  // Default refresh interval in clock ticks (15.6 us at 5 MHz).
  localparam logic [15:0] SDRAM_RT_DEFAULT  = 16'd78;

  // AHIP header opcodes.
  localparam logic [3:0] AHIP_OP_WRITE      = 4'b0000;
  localparam logic [3:0] AHIP_OP_READ       = 4'b0001;
  localparam logic [3:0] AHIP_OP_TEST_WRITE = 4'b1000;
  localparam logic [3:0] AHIP_OP_TEST_RDATA = 4'b1001;
  localparam logic [3:0] AHIP_OP_TEST_RADDR = 4'b1101;

  // Order in which the voltage-set registers are shifted into the DAC daisy
  // chain: entry k is the register shifted k-th (it ends up in the DAC k places
  // from the end of the chain).
  function automatic logic [3:0] dac_chain_reg(input logic [3:0] k);
    case (k)
      4'd0:  return 4'd9;
      4'd1:  return 4'd1;
      4'd2:  return 4'd5;
      4'd3:  return 4'd15;
      4'd4:  return 4'd11;
      4'd5:  return 4'd7;
      4'd6:  return 4'd3;
      4'd7:  return 4'd13;
      4'd8:  return 4'd12;
      4'd9:  return 4'd2;
      4'd10: return 4'd6;
      4'd11: return 4'd10;
      4'd12: return 4'd14;
      4'd13: return 4'd4;
      4'd14: return 4'd0;
      default: return 4'd8;
    endcase
  endfunction

endpackage
