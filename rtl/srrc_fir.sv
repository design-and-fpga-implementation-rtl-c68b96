// srrc_fir: square-root raised-cosine pulse-shaping / matched filter.
//
// A 129-tap (order 128) linear-phase FIR whose taps are the unit-energy
// square-root raised-cosine pulse with roll-off 0.4, sampled at L samples per
// symbol (L = 16 for the QPSK band, 32 for the 16-QAM bands). The same filter
// shapes the pulses in the transmitter and, matched, recovers them in the
// receiver, so the cascade is a raised cosine with zero intersymbol
// interference at the symbol instants. Order, roll-off and the upsampling
// factors follow the design description. The taps are computed at
// elaboration time from the closed-form pulse (see fb_pkg::srrc_real) and
// rounded to 16-bit two's complement with 15 fraction bits; that word length
// is this design's choice. The arithmetic is sym_fir (folded taps, pipelined
// adder tree); `out` = sum(c*x) >>> SHIFT and `out_valid` follows `in_valid`
// by sym_fir's LATENCY clocks.
module srrc_fir
  import fb_pkg::*;
#(
  parameter int  L      = 16,
  parameter int  N_TAPS = SRRC_TAPS,
  parameter real BETA   = ROLLOFF,
  parameter int  IN_W   = 18,
  parameter int  OUT_W  = 18,
  parameter int  SHIFT  = 15
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out
);
  typedef int coef_t [N_TAPS];

  function automatic coef_t make_coefs();
    coef_t c;
    for (int k = 0; k < N_TAPS; k++) c[k] = srrc_coef(k, N_TAPS, L, BETA);
    return c;
  endfunction

  localparam coef_t COEFS = make_coefs();

  sym_fir #(
    .N_TAPS (N_TAPS),
    .IN_W   (IN_W),
    .COEF_W (COEF_W),
    .OUT_W  (OUT_W),
    .SHIFT  (SHIFT),
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
