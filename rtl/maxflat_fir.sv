// maxflat_fir: maximally flat low-pass filter that emulates a long
// telephone line.
//
// The laboratory line is too short to cause intersymbol interference, so the
// receiver first passes the converted samples through this 41-tap symmetric
// FIR. Its 4-bit coefficients (4 fraction bits) are the design's own table:
// taps 16..26 are -1, 0, 1, 2, 4, 5, 4, 2, 1, 0, -1 (in units of 1/16) and
// all others are zero. At 434 kS/s it passes 0 Hz with gain 17/16, is about
// 3.5 dB down at 54.25 kHz and about 24 dB down at 84.09 kHz. The delay is
// 20 samples. Arithmetic is sym_fir; `out` = sum(c*x) >>> 4, and
// `out_valid` follows `in_valid` by sym_fir's LATENCY clocks.
module maxflat_fir
  import fb_pkg::*;
#(
  parameter int IN_W  = 18,
  parameter int OUT_W = 18
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out
);
  typedef int coef_t [MF_TAPS];

  function automatic coef_t make_coefs();
    coef_t c;
    for (int k = 0; k < MF_TAPS; k++) c[k] = maxflat_coef(k);
    return c;
  endfunction

  localparam coef_t COEFS = make_coefs();

  sym_fir #(
    .N_TAPS (MF_TAPS),
    .IN_W   (IN_W),
    .COEF_W (4),
    .OUT_W  (OUT_W),
    .SHIFT  (MF_FR),
    .COEF   (COEFS)
  ) u_fir (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (in_valid),
    .in        (in),
    .out_valid (out_valid),
    .out       (out)
  );
endmodule
