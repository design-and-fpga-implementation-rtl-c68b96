// tb_srrc_fir: impulse responses of the 129-tap filters for L = 16 and
// L = 32. Checks each tap against an independently computed square-root
// raised-cosine (roll-off 0.4, unit energy), the peak values read from the
// design's impulse-response plots (about 0.277 and 0.196), symmetry, unit
// energy, and that the filter convolved with itself (transmit filter
// followed by matched filter) is nearly zero at every other symbol instant
// (2 % for L = 16; 5 % for L = 32, whose 129 taps span only four symbols).
//
// Expected values come from the design description (formulas and tables) and
// are computed here independently of the RTL; stimulus, run length and
// tolerances are this bench's own choice.
module tb_srrc_fir;
  logic clk = 0, rst = 1, in_valid = 0;
  logic signed [2:0]  x;
  logic signed [17:0] y16, y32;
  logic v16, v32;
  int checks = 0, failures = 0;
  int h16 [129], h32 [129];
  always #1 clk = ~clk;
  srrc_fir #(.L(16), .IN_W(3), .OUT_W(18), .SHIFT(0)) dut16 (.clk, .rst, .in_valid, .in(x), .out_valid(v16), .out(y16));
  srrc_fir #(.L(32), .IN_W(3), .OUT_W(18), .SHIFT(0)) dut32 (.clk, .rst, .in_valid, .in(x), .out_valid(v32), .out(y32));

  function automatic real pulse(real t, real b);
    // closed form, evaluated with a tiny offset away from the removable
    // singularities instead of their limits
    real pi = 3.14159265358979323846;
    if (t == 0.0) t = 1.0e-7;
    if ((4.0 * b * t) * (4.0 * b * t) == 1.0) t = t + 1.0e-7;
    return ($sin(pi * t * (1.0 - b)) + 4.0 * b * t * $cos(pi * t * (1.0 + b)))
           / (pi * t * (1.0 - 16.0 * b * b * t * t));
  endfunction

  task automatic check_filter(int h [129], int l, real peak, real tol);
    real e, r;
    e = 0.0;
    for (int k = 0; k < 129; k++) begin
      real ref_v;
      ref_v = pulse(real'(k - 64) / real'(l), 0.4) / $sqrt(real'(l)) * 32768.0;
      checks++; if (real'(h[k]) - ref_v > 1.5 || ref_v - real'(h[k]) > 1.5) begin
        failures++; $display("FAIL L=%0d tap %0d: %0d vs %f", l, k, h[k], ref_v); end
      checks++; if (h[k] != h[128 - k]) failures++;
      e += real'(h[k]) * real'(h[k]);
    end
    checks++; if (real'(h[64]) / 32768.0 - peak > 0.002 || peak - real'(h[64]) / 32768.0 > 0.002) failures++;
    checks++; if (e / (32768.0 * 32768.0) < 0.99 || e / (32768.0 * 32768.0) > 1.01) failures++;
    // raised cosine = h * h; at lags m*L (m != 0) it should be near zero
    for (int m = 1; m * l < 128; m++) begin
      r = 0.0;
      for (int k = 0; k < 129; k++)
        if (k + m * l < 129) r += real'(h[k]) * real'(h[k + m * l]);
      checks++; if (r / e > tol || r / e < -tol) begin failures++; $display("FAIL ISI L=%0d m=%0d %f", l, m, r / e); end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 129; n++) begin
      @(negedge clk);
      x = (n == 0) ? 3'sd1 : 3'sd0;
      in_valid = 1;
      @(negedge clk) in_valid = 0;
      repeat (14) @(negedge clk);
      checks++; if (!(v16 === 1'b0 && v32 === 1'b0)) failures++;
      h16[n] = y16; h32[n] = y32;
    end
    check_filter(h16, 16, 0.2773, 0.02);
    check_filter(h32, 32, 0.1961, 0.05);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
