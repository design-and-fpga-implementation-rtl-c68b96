// ad7303_model: behavioural model of the AD7303 dual 8-bit DAC, for
// simulation only (not synthesizable, no analog output).
//
// While SYNC is low, DIN is shifted in MSB first on each rising SCLK edge.
// When SYNC rises after 16 bits, the low byte is loaded into the DAC named by
// control bit DB10 (0 = A, 1 = B) unless its power-down bit (DB11 for A,
// DB12 for B) is set, and the output codes `out_a`/`out_b` update at once.
// Other control bits are ignored. `words` counts complete transfers.
//
// The 16-bit frame, SYNC framing and control bits follow the AD7303 data
// sheet as summarised in the design description; only the behaviour the
// transceiver uses is modelled.
module ad7303_model (
  input  logic       sync_n,
  input  logic       sclk,
  input  logic       din,
  output logic [7:0] out_a,
  output logic [7:0] out_b,
  output int         words
);
  logic [15:0] sh;
  int          nbits;

  initial begin
    out_a = 8'd128;
    out_b = 8'd128;
    words = 0;
    nbits = 0;
    sh    = '0;
  end

  always @(negedge sync_n) nbits = 0;

  always @(posedge sclk) begin
    if (!sync_n) begin
      sh    = {sh[14:0], din};
      nbits = nbits + 1;
    end
  end

  always @(posedge sync_n) begin
    if (nbits == 16) begin
      words = words + 1;
      if (!sh[10] && !sh[11]) out_a = sh[7:0];
      if ( sh[10] && !sh[12]) out_b = sh[7:0];
    end
  end
endmodule
