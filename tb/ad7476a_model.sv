// ad7476a_model: behavioural model of the AD7476A 12-bit ADC, for
// simulation only (not synthesizable).
//
// The falling edge of CS samples the input code `vin` and drives the first
// of four leading zeros on SDATA; each falling SCLK edge while CS is low
// presents the next bit, DB11 after the fourth edge and DB0 after the
// fifteenth; the sixteenth edge ends the transfer (SDATA returns to 0 in
// this two-state model). `conversions` counts CS falling edges.
//
// The CS/SCLK framing and four leading zeros follow the AD7476A timing as
// summarised in the design description; conversion delays are not modelled.
module ad7476a_model (
  input  logic        cs_n,
  input  logic        sclk,
  input  logic [11:0] vin,
  output logic        sdata,
  output int          conversions
);
  logic [15:0] frame;
  int          idx;

  initial begin
    sdata       = 1'b0;
    conversions = 0;
    idx         = 16;
    frame       = '0;
  end

  always @(negedge cs_n) begin
    frame       = {4'b0000, vin};
    idx         = 0;
    sdata       = frame[15];
    conversions = conversions + 1;
  end

  always @(negedge sclk) begin
    if (!cs_n && idx < 16) begin
      idx   = idx + 1;
      sdata = (idx < 16) ? frame[15 - idx] : 1'b0;
    end
  end
endmodule
