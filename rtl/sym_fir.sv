// sym_fir: symmetric (linear-phase) FIR filter with pre-adders and a
// pipelined adder tree.
//
// y[n] = sum_k c[k] x[n-k] for an odd number of taps N_TAPS whose
// coefficients satisfy c[k] = c[N_TAPS-1-k]. Mirrored samples are added
// first, x[n-k] + x[n-(N_TAPS-1-k)], so only (N_TAPS+1)/2 multipliers are
// needed; the products then go through a registered adder tree. Folding the
// taps and pipelining the additions follow the design description; register
// placement and widths are this design's choice.
//
// Timing: the delay line shifts on `in_valid` (one strobe per sample). The
// pre-add, multiply and tree stages run every clock, and `out_valid` pulses
// LATENCY clocks after `in_valid` with `out` = (full sum >>> SHIFT),
// saturated to OUT_W bits. in_valid strobes must be at least LATENCY clocks
// apart (they are 32 clocks apart in the transceiver). Only the first half
// of COEF (up to and including the centre tap) is used.
module sym_fir #(
  parameter int N_TAPS = 5,
  parameter int IN_W   = 18,
  parameter int COEF_W = 16,
  parameter int OUT_W  = 18,
  parameter int SHIFT  = 15,
  parameter int COEF [N_TAPS] = '{default: 1},
  localparam int HALF    = (N_TAPS + 1) / 2,
  localparam int PROD_W  = IN_W + 1 + COEF_W,
  localparam int LEVELS  = (HALF > 1) ? $clog2(HALF) : 1,
  localparam int LATENCY = LEVELS + 4
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out
);
  localparam int SUM_W = PROD_W + LEVELS;

  logic signed [IN_W-1:0]   x    [N_TAPS];
  logic signed [IN_W:0]     pre  [HALF];
  logic signed [PROD_W-1:0] prod [HALF];
  logic signed [SUM_W-1:0]  sum;
  logic [LATENCY-2:0]       vpipe;

  // Delay line.
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < N_TAPS; k++) x[k] <= '0;
    end else if (in_valid) begin
      x[0] <= in;
      for (int k = 1; k < N_TAPS; k++) x[k] <= x[k-1];
    end
  end

  // Pre-add of mirrored taps, then multiply by the folded coefficients.
  always_ff @(posedge clk) begin
    for (int k = 0; k < HALF; k++) begin
      if (k == N_TAPS - 1 - k) pre[k] <= (IN_W+1)'(x[k]);
      else                     pre[k] <= (IN_W+1)'(x[k]) + (IN_W+1)'(x[N_TAPS-1-k]);
      prod[k] <= PROD_W'(pre[k]) * PROD_W'(signed'(COEF_W'(COEF[k])));
    end
  end

  adder_tree #(.N(HALF), .W_IN(PROD_W)) u_tree (
    .clk (clk),
    .in  (prod),
    .sum (sum)
  );

  // Sample strobe follows the data through pre-add, multiply and the tree.
  always_ff @(posedge clk) begin
    if (rst) vpipe <= '0;
    else     vpipe <= {vpipe[LATENCY-3:0], in_valid};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= vpipe[LATENCY-2];
      if (vpipe[LATENCY-2]) out <= saturate(sum >>> SHIFT);
    end
  end

  // Limits are formed in 64 bits so that OUT_W may also exceed SUM_W.
  function automatic logic signed [OUT_W-1:0] saturate(logic signed [SUM_W-1:0] v);
    longint hi, lo, w;
    w  = longint'(v);
    hi = (64'sd1 <<< (OUT_W - 1)) - 64'sd1;
    lo = -hi - 64'sd1;
    if (w > hi) return OUT_W'(hi);
    if (w < lo) return OUT_W'(lo);
    return OUT_W'(w);
  endfunction
endmodule
