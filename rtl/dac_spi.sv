// dac_spi: serial interface to the AD7303 8-bit DAC.
//
// Once per line sample the transmit sample is converted to an 8-bit offset
// binary code, code = 128 + (sample >>> SHIFT) saturated to 0..255 (with
// SHIFT = 8 one constellation unit is 16 codes), and sent as a 16-bit word
// DB15..DB0 = {CTRL, code}: SYNC low, then 16 SCLK cycles with DIN changing
// after each rising SCLK edge so that it is stable at the next one, MSB
// first. The 16-bit word, the 8 control bits before the 8 data bits and the
// SYNC framing follow the design description; the default CTRL = 0 (internal
// reference, both channels powered, load and update DAC A) and the offset
// binary scaling are this design's choice.
//
// Frame timing, in system clocks after slot 0 of the sample frame: the
// sample is taken and SYNC falls at the end of slot 0; SCLK runs during slots
// 2..17 (SCLK = clk while enabled, idle high), rising at the end of each of
// those slots; SYNC rises at the end of slot 17. The enable changes only
// while clk is high, so SCLK has no glitches.
module dac_spi
  import fb_pkg::*;
#(
  parameter int         SHIFT = 8,
  parameter logic [7:0] CTRL  = 8'h00,
  parameter int         SW    = 5
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [SW-1:0] slot,
  input  sample_t       sample,
  output logic          sync_n,
  output logic          sclk,
  output logic          din,
  output logic [7:0]    code
);
  logic [15:0] word;
  logic        active;

  function automatic logic [7:0] to_code(sample_t x);
    logic signed [SAMPLE_W-1:0] v;
    v = (x >>> SHIFT) + SAMPLE_W'(128);
    if (v < 0)   return 8'd0;
    if (v > 255) return 8'd255;
    return v[7:0];
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      word   <= {CTRL, 8'd128};
      code   <= 8'd128;
      sync_n <= 1'b1;
      active <= 1'b0;
      din    <= 1'b0;
    end else begin
      if (slot == SW'(0)) begin
        code   <= to_code(sample);
        word   <= {CTRL, to_code(sample)};
        sync_n <= 1'b0;
        din    <= CTRL[7];
      end else if (slot <= SW'(16)) begin
        din <= word[4'(16 - int'(slot))];
      end
      if (slot == SW'(1))  active <= 1'b1;
      if (slot == SW'(17)) begin
        active <= 1'b0;
        sync_n <= 1'b1;
      end
    end
  end

  assign sclk = clk | ~active;
endmodule
