// atb0_controller: top level of the ATB0 test-baseboard controller. Every port
// is an FPGA pin.
//
// The baseboard powers and talks to a daughtercard under test. A host PC reads
// and writes a 27-bit byte address space through a PLX local-bus bridge
// (HADS, HLWNR, HAD, HLRDY, HXDIR): 0x0000000-0x1FFFFFF is SDRAM memory,
// 0x2000000-0x3FFFFFF control registers, 0x4000000-0x7FFFFFF daughtercard
// memory reached over AHIP. The decode module turns each access into an
// enable pulse for one of eight function modules, which share a 25-bit word
// address bus, a write/read line and a 32-bit data bus:
//   0 lgaled           LEDs and logic-analyzer outputs
//   1 voltage_set      16 supply DACs (serial daisy chain)
//   2 voltage_measure  14 supply-voltage ADCs
//   3 current_measure  14 supply-current ADCs, burst results into SDRAM
//   4 clock_set        daughtercard frequency synthesizer
//   5 sdram_ctrl       12-bit SDRAM
//   6 user_pin         26 general-purpose daughtercard pins
//   7 ahip             AHIP host port to the daughtercard
// Each module returns done (idle) and da (data available) flags; the data bus
// carries either the decoder's write data or the selected module's read data
// (datasel). HLRDY, HXDIR and the HAD read data are registered once more here
// before the pins, after the decoder's own output registers. HXDIR low means
// the controller drives HAD.
//
// A 3-bit counter divides the global clock by eight; its top bit, sclk, paces
// the serial parts and is sent to them as their clock. All logic runs on clk.
// Tri-state pins are split into _in, _out and _oe signals. nreset is an active
// low asynchronous reset.
module atb0_controller
  import atb0_pkg::*;
#(
  parameter int unsigned TIMEOUT_W = 16
) (
  input  logic        clk,
  input  logic        nreset,
  // PLX local bus
  input  logic        hads,
  input  logic        hlwnr,
  input  logic [31:0] had_in,
  output logic [31:0] had_out,
  output logic        had_oe,
  output logic        hlrdy,
  output logic        hxdir,
  // SDRAM
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
  output logic        sddq_oe,
  // voltage-set DACs
  output logic        pvsck,
  output logic        pvscsb,
  output logic        pvsdi9,
  output logic        pvsrsb,
  // voltage-measure ADCs
  output logic        pvmck,
  output logic [13:0] pvmcvb,
  input  logic        pvmd,
  // current-measure ADCs
  output logic        pcmck,
  output logic        pcmcvb,
  input  logic [13:0] pcmd,
  // frequency synthesizer
  output logic        cksc,
  output logic        cksd,
  output logic        cksl,
  // user pins
  input  logic [25:0] user_in,
  output logic [25:0] user_out,
  output logic [25:0] user_oe,
  // AHIP
  output logic        ahip_req,
  input  logic        ahip_ack,
  input  logic [31:0] ahip_bus_in,
  output logic [31:0] ahip_bus_out,
  output logic        ahip_bus_oe,
  // LEDs and logic-analyzer header
  output logic [1:0]  led,
  output logic [1:0]  lga
);
  logic [2:0]  clk_div;
  logic        sclk;
  logic [24:0] address;
  logic [31:0] decode_data, data_bus, status;
  logic [NUM_MODULES-1:0] enable, done, da;
  logic        w_nr, hlrdy_d, hxdir_d, hadsel;
  logic [3:0]  datasel;
  logic [31:0] mod_data [NUM_MODULES];
  logic        cs_we;
  logic [23:0] cs_address;

  // Clock divider: sclk = clk / 8.
  always_ff @(posedge clk or negedge nreset) begin
    if (!nreset) clk_div <= '0;
    else         clk_div <= clk_div + 3'd1;
  end
  assign sclk = clk_div[2];

  decode #(.TIMEOUT_W(TIMEOUT_W)) u_decode (
    .clk(clk), .nreset(nreset),
    .hads(hads), .hlwnr(hlwnr), .had(had_in),
    .hlrdy_out(hlrdy_d), .hxdir_out(hxdir_d), .hadsel_out(hadsel), .status_out(status),
    .done_in(done), .da_in(da), .cs_we(cs_we), .cs_address(cs_address),
    .address_out(address), .data_out(decode_data), .enable_out(enable),
    .w_nr_out(w_nr), .datasel_out(datasel));

  lgaled u_lgaled (
    .clk(clk), .nreset(nreset), .enable(enable[3'(MOD_LGALED)]), .w_nr(w_nr), .data_in(data_bus),
    .data_out(mod_data[3'(MOD_LGALED)]), .done(done[3'(MOD_LGALED)]), .da(da[3'(MOD_LGALED)]),
    .led(led), .lga(lga));

  voltage_set u_vset (
    .clk(clk), .nreset(nreset), .sclk(sclk), .enable(enable[3'(MOD_VSET)]), .w_nr(w_nr),
    .address(address[5:2]), .data_in(data_bus), .data_out(mod_data[3'(MOD_VSET)]),
    .done(done[3'(MOD_VSET)]), .da(da[3'(MOD_VSET)]),
    .pvsck(pvsck), .pvscsb(pvscsb), .pvsdi9(pvsdi9), .pvsrsb(pvsrsb));

  voltage_measure u_vmeas (
    .clk(clk), .nreset(nreset), .sclk(sclk), .enable(enable[3'(MOD_VMEAS)]), .w_nr(w_nr),
    .address(address[5:2]), .data_out(mod_data[3'(MOD_VMEAS)]),
    .done(done[3'(MOD_VMEAS)]), .da(da[3'(MOD_VMEAS)]),
    .pvmck(pvmck), .pvmcvb(pvmcvb), .pvmd(pvmd));

  current_measure u_cmeas (
    .clk(clk), .nreset(nreset), .sclk(sclk), .enable(enable[3'(MOD_CMEAS)]), .w_nr(w_nr),
    .address_in(address[10:0]), .data_in(data_bus), .data_out(mod_data[3'(MOD_CMEAS)]),
    .done(done[3'(MOD_CMEAS)]), .da(da[3'(MOD_CMEAS)]),
    .sdram_we(cs_we), .sdram_address(cs_address),
    .pcmck(pcmck), .pcmcvb(pcmcvb), .pcmd(pcmd));

  clock_set u_clock (
    .clk(clk), .nreset(nreset), .sclk(sclk), .enable(enable[3'(MOD_CLOCK)]), .w_nr(w_nr),
    .data_in(data_bus), .data_out(mod_data[3'(MOD_CLOCK)]),
    .done(done[3'(MOD_CLOCK)]), .da(da[3'(MOD_CLOCK)]),
    .cksc(cksc), .cksd(cksd), .cksl(cksl));

  sdram_ctrl u_sdram (
    .clk(clk), .nreset(nreset), .enable_in(enable[3'(MOD_SDRAM)]), .w_nr_in(w_nr),
    .address_in(address), .data_in(data_bus), .data_out(mod_data[3'(MOD_SDRAM)]),
    .done(done[3'(MOD_SDRAM)]), .da(da[3'(MOD_SDRAM)]),
    .cs_we(cs_we), .cs_address(cs_address),
    .sdck(sdck), .sdcke(sdcke), .sddqm(sddqm), .sdras_b(sdras_b), .sdcas_b(sdcas_b),
    .sdwe_b(sdwe_b), .sdba(sdba), .sda(sda),
    .sddq_in(sddq_in), .sddq_out(sddq_out), .sddq_oe(sddq_oe));

  user_pin #(.NPINS(26)) u_user (
    .clk(clk), .nreset(nreset), .enable(enable[3'(MOD_USER)]), .w_nr(w_nr),
    .address(address[10:0]), .data_in(data_bus), .data_out(mod_data[3'(MOD_USER)]),
    .done(done[3'(MOD_USER)]), .da(da[3'(MOD_USER)]),
    .user_in(user_in), .user_out(user_out), .user_oe(user_oe));

  ahip #(.TIMEOUT_W(TIMEOUT_W)) u_ahip (
    .clk(clk), .nreset(nreset), .enable(enable[3'(MOD_AHIP)]), .w_nr(w_nr),
    .address(address), .data_in(data_bus), .data_out(mod_data[3'(MOD_AHIP)]),
    .done(done[3'(MOD_AHIP)]), .da(da[3'(MOD_AHIP)]),
    .ahip_req(ahip_req), .ahip_ack_in(ahip_ack),
    .ahip_bus_in(ahip_bus_in), .ahip_bus_out(ahip_bus_out), .ahip_bus_oe(ahip_bus_oe));

  // Shared data bus: the decoder's write data or the selected module's output.
  assign data_bus = (datasel < 4'(NUM_MODULES)) ? mod_data[datasel[2:0]] : decode_data;

  // Output registers toward the PLX.
  always_ff @(posedge clk or negedge nreset) begin
    if (!nreset) begin
      hlrdy   <= 1'b1;
      hxdir   <= 1'b1;
      had_out <= '0;
    end else begin
      hlrdy   <= hlrdy_d;
      hxdir   <= hxdir_d;
      had_out <= hadsel ? status : data_bus;
    end
  end
  assign had_oe = !hxdir;
endmodule
