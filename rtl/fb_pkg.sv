// fb_pkg: shared constants, types and coefficient formulas of the four-band
// transceiver.
//
// The transceiver splits a 217 kbit/s stream over four sub-bands sampled at
// 434 kS/s: a QPSK band at 0 Hz (upsampling 16) and three 16-QAM bands at
// 33.91, 54.25 and 74.6 kHz (upsampling 32), all with square-root
// raised-cosine shaping, roll-off 0.4, filter order 128. Those numbers follow
// the design tables. The fixed-point formats below are this design's own
// choice: every internal sample is an 18-bit signed value with 12 fraction
// bits (one constellation unit = 4096), filter coefficients are 16-bit with
// 15 fraction bits and carrier samples 16-bit with 14 fraction bits.
//
// The coefficient tables are computed here from their formulas at
// elaboration time, so no table file is needed.
package fb_pkg;

  // ---- rates -----------------------------------------------------------
  localparam int FS_HZ          = 434_000;  // line sampling rate
  localparam int CLK_DIV        = 18;       // board oscillator / system clock
  localparam int CLK_PER_SAMPLE = 32;       // system clocks per line sample
  localparam int SPI_BITS       = 16;       // serial clocks per conversion

  // ---- fixed point ----------------------------------------------------
  localparam int SAMPLE_W  = 18;  // internal sample width
  localparam int SAMPLE_FR = 12;  // fraction bits of a sample
  localparam int COEF_W    = 16;  // SRRC coefficient width
  localparam int COEF_FR   = 15;  // SRRC coefficient fraction bits
  localparam int TRIG_W    = 16;  // carrier table sample width
  localparam int TRIG_FR   = 14;  // carrier table fraction bits
  localparam int LEVEL_W   = 3;   // constellation amplitude: -3,-1,+1,+3

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [LEVEL_W-1:0]  level_t;
  typedef logic signed [TRIG_W-1:0]   trig_t;

  typedef struct packed {
    level_t i;
    level_t q;
  } iq_level_t;

  typedef struct packed {
    sample_t i;
    sample_t q;
  } iq_sample_t;

  // ---- square-root raised cosine ----------------------------------------
  localparam int  SRRC_TAPS = 129;   // filter order 128
  localparam real ROLLOFF   = 0.4;
  localparam real PI        = 3.14159265358979323846;

  // Unit-energy SRRC tap k of a filter with L samples per symbol:
  // h[k] = p((k - (N-1)/2) / L) / sqrt(L), p() the SRRC pulse in symbol units.
  function automatic real srrc_real(int k, int n_taps, int l, real beta);
    real t, num, den, h, e;
    t = real'(k - (n_taps - 1) / 2) / real'(l);
    e = 4.0 * beta * t;
    e = (e < 0.0) ? -e : e;
    if (k == (n_taps - 1) / 2) begin
      h = 1.0 - beta + 4.0 * beta / PI;
    end else if (e > 1.0 - 1.0e-9 && e < 1.0 + 1.0e-9) begin
      h = beta / $sqrt(2.0) * ((1.0 + 2.0 / PI) * $sin(PI / (4.0 * beta))
                             + (1.0 - 2.0 / PI) * $cos(PI / (4.0 * beta)));
    end else begin
      num = $sin(PI * t * (1.0 - beta)) + 4.0 * beta * t * $cos(PI * t * (1.0 + beta));
      den = PI * t * (1.0 - (4.0 * beta * t) * (4.0 * beta * t));
      h = num / den;
    end
    return h / $sqrt(real'(l));
  endfunction

  // Quantized coefficient, rounded to COEF_FR fraction bits.
  function automatic int srrc_coef(int k, int n_taps, int l, real beta);
    real v;
    v = srrc_real(k, n_taps, l, beta) * real'(1 << COEF_FR);
    return (v >= 0.0) ? $rtoi(v + 0.5) : -$rtoi(-v + 0.5);
  endfunction

  // ---- maximally flat channel-emulation filter ----------------------------
  // 41 symmetric taps with 4 fraction bits. Taps 1..15 round to zero; taps
  // 16..21 are -1, 0, 1, 2, 4, 5 (decimal -0.0335, -0.0252, 0.0339, 0.1395,
  // 0.2458, 0.2908); the rest mirror them around tap 21.
  localparam int MF_TAPS = 41;
  localparam int MF_FR   = 4;
  function automatic int maxflat_coef(int k);  // k = 0..40
    int m;
    m = (k <= 20) ? k : 40 - k;   // fold onto taps 0..20 (tap 20 is the centre)
    case (m)
      15: return -1;
      16: return 0;
      17: return 1;
      18: return 2;
      19: return 4;
      20: return 5;
      default: return 0;
    endcase
  endfunction

  // Amplitude of the maximally flat filter at normalized frequency f/fs,
  // used to scale the decision thresholds of each band.
  function automatic real maxflat_gain(real f_norm);
    real a;
    a = 0.0;
    for (int k = 0; k < MF_TAPS; k++)
      a += real'(maxflat_coef(k)) * $cos(2.0 * PI * f_norm * real'(k - 20));
    return a / real'(1 << MF_FR);
  endfunction

  // ---- carrier table -----------------------------------------------------
  localparam int PHASE_W = 16;  // phase accumulator width
  localparam int LUT_AW  = 8;   // table address width (256 entries per turn)

  function automatic int trig_cos(int idx);
    real v;
    v = $cos(2.0 * PI * real'(idx) / real'(1 << LUT_AW)) * real'(1 << TRIG_FR);
    return (v >= 0.0) ? $rtoi(v + 0.5) : -$rtoi(-v + 0.5);
  endfunction

  // Phase increment per sample for carrier f_hz at FS_HZ.
  function automatic int phase_step(int f_hz);
    real v;
    v = real'(f_hz) * real'(1 << PHASE_W) / real'(FS_HZ);
    return $rtoi(v + 0.5);
  endfunction

  // Saturate a wide signed value to a sample.
  function automatic sample_t sat_sample(logic signed [63:0] v);
    localparam logic signed [63:0] MAXV = (64'sd1 <<< (SAMPLE_W - 1)) - 64'sd1;
    localparam logic signed [63:0] MINV = -(64'sd1 <<< (SAMPLE_W - 1));
    if (v > MAXV) return sample_t'(MAXV);
    if (v < MINV) return sample_t'(MINV);
    return sample_t'(v);
  endfunction

endpackage
