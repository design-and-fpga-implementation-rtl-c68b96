// tx_band: one transmit lane of the four-band transmitter.
//
// prng -> mapper -> upsampler -> square-root raised-cosine filters (one for
// the in-phase and one for the quadrature amplitude) -> mixer at F_HZ.
// BITS = 2 selects QPSK (upsampling 16 in the default configuration),
// BITS = 4 selects Gray-coded 16-QAM (upsampling 32). Lane structure and
// parameters follow the design's transmitter; the random symbols come from
// the design's 9x+3 generator of width BITS.
//
// Timing: one line sample per `samp_en` (every 32 clocks). A new symbol is
// drawn every L samples; `sym` / `sym_valid` report it as it enters the
// upsampler. `out` is valid for one clock at `out_valid`, a fixed number of
// clocks after samp_en (upsampler 1 + filter LATENCY + mixer 1).
//
// The chain of blocks follows the published transmitter diagram; the fixed-
// point scaling between them is this design's choice.
module tx_band
  import fb_pkg::*;
#(
  parameter int BITS = 4,
  parameter int L    = 32,
  parameter int F_HZ = 54_250
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            samp_en,
  output logic [BITS-1:0] sym,
  output logic            sym_valid,
  output logic            out_valid,
  output sample_t         out
);
  logic      sym_req, up_valid, fi_valid, fq_valid;
  iq_level_t lvl, up;
  sample_t   fi, fq;
  trig_t     c, s;

  prng #(.W(BITS)) u_prng (
    .clk (clk),
    .rst (rst),
    .adv (sym_req),
    .sym (sym)
  );
  assign sym_valid = sym_req;

  if (BITS == 2) begin : g_qpsk
    qpsk_mapper u_map (.sym(sym), .lvl(lvl));
  end else begin : g_qam16
    qam16_mapper u_map (.sym(sym), .lvl(lvl));
  end

  upsampler #(.L(L)) u_up (
    .clk       (clk),
    .rst       (rst),
    .en        (samp_en),
    .in        (lvl),
    .sym_req   (sym_req),
    .out       (up),
    .out_valid (up_valid)
  );

  // Integer amplitudes times Q1.15 taps: shift by 3 to land on 12 fraction bits.
  srrc_fir #(.L(L), .IN_W(LEVEL_W), .OUT_W(SAMPLE_W), .SHIFT(COEF_FR - SAMPLE_FR)) u_fir_i (
    .clk (clk), .rst (rst), .in_valid (up_valid), .in (up.i),
    .out_valid (fi_valid), .out (fi)
  );
  srrc_fir #(.L(L), .IN_W(LEVEL_W), .OUT_W(SAMPLE_W), .SHIFT(COEF_FR - SAMPLE_FR)) u_fir_q (
    .clk (clk), .rst (rst), .in_valid (up_valid), .in (up.q),
    .out_valid (fq_valid), .out (fq)
  );

  nco #(.F_HZ(F_HZ), .LAG(0)) u_nco (
    .clk   (clk),
    .rst   (rst),
    .adv   (fi_valid),
    .cos_o (c),
    .sin_o (s)
  );

  tx_mixer u_mix (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (fi_valid),
    .in_i      (fi),
    .in_q      (fq),
    .cos_i     (c),
    .sin_i     (s),
    .out_valid (out_valid),
    .out       (out)
  );

  // Both filters share the strobe; fq_valid is identical to fi_valid.
  wire unused_ok = fq_valid;
endmodule
