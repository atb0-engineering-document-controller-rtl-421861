// serial_adc_model: behavioural model of a 12-bit serial ADC as used for the
// supply voltage and current measurements. When the active-low convert input
// returns high the model samples `value`; on each following falling edge of
// the serial clock it presents the next bit on dout, MSB first. Not
// synthesizable.
module serial_adc_model (
  input  logic        sclk,
  input  logic        cvb,
  input  logic [11:0] value,
  output logic        dout
);
  logic [11:0] sample = '0;
  int          idx = -1;
  int          conversions = 0;

  initial dout = 1'b0;

  always @(posedge cvb) begin
    sample = value;
    idx    = 11;
    conversions++;
  end

  always @(negedge sclk) begin
    if (idx >= 0) begin
      dout = sample[idx];
      idx--;
    end else begin
      dout = 1'b0;
    end
  end
endmodule
