// nco: carrier generator ("carrier wave" and its 90-degree shifted copy).
//
// A PHASE_W-bit phase accumulator advances by round(F_HZ * 2^PHASE_W / FS_HZ)
// on every `adv` strobe; its top LUT_AW bits address a cosine table computed
// at elaboration time. `cos_o` and `sin_o` are combinational reads of the
// current phase (sine is the cosine table read a quarter turn earlier), as
// 16-bit values with 14 fraction bits. The carrier frequencies are the
// design's; the accumulator, table size and formats are this design's choice.
//
// LAG sets the phase after reset to -LAG * step, i.e. the carrier as it was
// LAG samples ago. A receiver uses it to line its carrier up with a
// transmitter whose samples reach it LAG samples late. With F_HZ = 0 the
// outputs are constant cos = 1, sin = 0.
module nco
  import fb_pkg::*;
#(
  parameter int F_HZ = 54_250,
  parameter int LAG  = 0
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  adv,
  output trig_t cos_o,
  output trig_t sin_o
);
  localparam int STEP = phase_step(F_HZ);
  localparam int NLUT = 1 << LUT_AW;
  localparam logic [PHASE_W-1:0] INIT = PHASE_W'(-(LAG * STEP));

  typedef trig_t lut_t [NLUT];
  function automatic lut_t make_lut();
    lut_t t;
    for (int i = 0; i < NLUT; i++) t[i] = TRIG_W'(trig_cos(i));
    return t;
  endfunction
  localparam lut_t COS_LUT = make_lut();

  logic [PHASE_W-1:0] phase;
  logic [LUT_AW-1:0]  idx;

  always_ff @(posedge clk) begin
    if (rst)      phase <= INIT;
    else if (adv) phase <= phase + PHASE_W'(STEP);
  end

  assign idx   = phase[PHASE_W-1 -: LUT_AW];
  assign cos_o = COS_LUT[idx];
  assign sin_o = COS_LUT[idx - LUT_AW'(NLUT / 4)];   // sin(p) = cos(p - pi/2)
endmodule
