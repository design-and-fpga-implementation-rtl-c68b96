// adc_spi: serial interface to the AD7476A 12-bit ADC.
//
// Once per line sample CS falls, 16 SCLK cycles clock out four leading zeros
// and then DB11..DB0, MSB first, and CS rises again for the quiet time until
// the next frame. The result, offset binary 0..4095, is turned into a signed
// sample (code - 2048) <<< SHIFT; with SHIFT = 4 one constellation unit
// (16 DAC codes = 256 ADC codes) becomes 4096. The transfer format follows
// the design description; the frame placement and scaling are this design's
// choice.
//
// Frame timing, in system clocks: CS falls at the end of slot 0; SCLK runs
// during slots 2..17 (SCLK = clk while enabled, idle high, falling in the
// middle of each slot); SDATA is sampled at the end of slots 1..16, half a
// clock after the falling edge that presented the bit; CS rises and `valid`
// pulses with the new `out` at the end of slot 17.
module adc_spi
  import fb_pkg::*;
#(
  parameter int SHIFT = 4,
  parameter int SW    = 5
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [SW-1:0] slot,
  input  logic          sdata,
  output logic          cs_n,
  output logic          sclk,
  output logic          valid,
  output sample_t       out,
  output logic [11:0]   code
);
  logic [11:0] shreg;  // the four leading zeros shift out at the top
  logic        active;

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg  <= '0;
      cs_n   <= 1'b1;
      active <= 1'b0;
      valid  <= 1'b0;
      out    <= '0;
      code   <= '0;
    end else begin
      valid <= 1'b0;
      if (slot == SW'(0)) cs_n <= 1'b0;
      if (slot == SW'(1)) active <= 1'b1;
      if (slot >= SW'(1) && slot <= SW'(16)) shreg <= {shreg[10:0], sdata};
      if (slot == SW'(17)) begin
        active <= 1'b0;
        cs_n   <= 1'b1;
        valid  <= 1'b1;
        code   <= shreg[11:0];
        out    <= sample_t'((SAMPLE_W'({1'b0, shreg[11:0]}) - SAMPLE_W'(2048)) <<< SHIFT);
      end
    end
  end

  assign sclk = clk | ~active;
endmodule
