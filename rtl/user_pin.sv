// user_pin: 26 general-purpose pins to the daughtercard, each either driven by
// the controller or left as an input.
//
// Two 26-bit registers: user_def (value to drive) and drive_pin (1 = output).
// Pin p shows user_def[p] when drive_pin[p] is set, otherwise the daughtercard's
// level; that pad level is the USER bus that reads return. The tri-state pads
// are split into user_out/user_oe and user_in (the level seen at the pin).
//
// Word-address decoding (11 bits): address[10] = 1 selects pin address[6:2]
// (USERp), otherwise address[0] selects USER_ALL (0) or USER_DIR (1).
//  * write USERp (valid pin, < 26): data_in 0 or 1 drives the pin with that
//    value; 2 makes the pin an input; other values are ignored.
//  * write USER_ALL: user_def takes data_in[25:0]; directions are unchanged,
//    so only output pins change.
//  * write USER_DIR: drive_pin takes data_in[25:0].
//  * read: data_out is loaded on the next clock with {drive_pin[p], USER[p]}
//    for a pin, the USER bus for USER_ALL or drive_pin for USER_DIR, and holds
//    until the next read.
// The module is never busy: done and da are constant high. The write rules for
// USER_ALL and USER_DIR follow the user-level register description; the
// module-level description (USER_ALL also turns every pin into an output,
// USER_DIR only clears) was not followed. Reset makes every pin an input.
module user_pin #(
  parameter int unsigned NPINS = 26
) (
  input  logic             clk,
  input  logic             nreset,
  input  logic             enable,
  input  logic             w_nr,
  input  logic [10:0]      address,
  input  logic [31:0]      data_in,
  output logic [31:0]      data_out,
  output logic             done,
  output logic             da,
  input  logic [NPINS-1:0] user_in,
  output logic [NPINS-1:0] user_out,
  output logic [NPINS-1:0] user_oe
);
  logic [NPINS-1:0] user_def, drive_pin, user_bus;
  logic [4:0]       pin;
  logic             addr_okay, write_pin, write_all, write_dir, read;

  assign pin       = address[6:2];
  assign addr_okay = (pin < 5'(NPINS));
  assign write_pin = enable && w_nr && address[10] && addr_okay;
  assign write_all = enable && w_nr && !address[10] && !address[0];
  assign write_dir = enable && w_nr && !address[10] && address[0];
  assign read      = enable && !w_nr;
  assign user_bus  = (drive_pin & user_def) | (~drive_pin & user_in);

  always_ff @(posedge clk or negedge nreset) begin
    if (!nreset) begin
      user_def  <= '0;
      drive_pin <= '0;
      data_out  <= '0;
    end else begin
      if (write_pin) begin
        if (data_in[31:1] == 31'd0) begin
          user_def[pin]  <= data_in[0];
          drive_pin[pin] <= 1'b1;
        end else if (data_in == 32'd2) begin
          drive_pin[pin] <= 1'b0;
        end
      end
      if (write_all) user_def  <= data_in[NPINS-1:0];
      if (write_dir) drive_pin <= data_in[NPINS-1:0];
      if (read) begin
        if (address[10])
          data_out <= addr_okay ? {30'd0, drive_pin[pin], user_bus[pin]} : '0;
        else
          data_out <= {(32-NPINS)'(0), address[0] ? drive_pin : user_bus};
      end
    end
  end

  assign user_out = user_def;
  assign user_oe  = drive_pin;
  assign done     = 1'b1;
  assign da       = 1'b1;
endmodule
