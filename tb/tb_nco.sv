// tb_nco: at 54.25 kHz (one eighth of 434 kS/s) the carrier must repeat
// every 8 samples with cos/sin equal to 16384*cos/sin(2*pi*n/8) (+-1); at
// 0 Hz it must stay at cos = 16384, sin = 0; with LAG = 3 it must start
// three samples behind; at 33.91 kHz it must follow cos(2*pi*f*n/fs)
// within 1 %.
//
// Expected values come from the design description (formulas and tables) and
// are computed here independently of the RTL; stimulus, run length and
// tolerances are this bench's own choice.
module tb_nco;
  import fb_pkg::*;
  logic clk = 0, rst = 1, adv = 0;
  trig_t c8, s8, c0, s0, cl, sl, c3, s3;
  int checks = 0, failures = 0;
  always #1 clk = ~clk;
  nco #(.F_HZ(54_250))          d8 (.clk, .rst, .adv, .cos_o(c8), .sin_o(s8));
  nco #(.F_HZ(0))               d0 (.clk, .rst, .adv, .cos_o(c0), .sin_o(s0));
  nco #(.F_HZ(54_250), .LAG(3)) dl (.clk, .rst, .adv, .cos_o(cl), .sin_o(sl));
  nco #(.F_HZ(33_910))          d3 (.clk, .rst, .adv, .cos_o(c3), .sin_o(s3));
  function automatic bit near(int a, real b, real tol); return (real'(a) - b <= tol) && (b - real'(a) <= tol); endfunction
  initial begin
    real pi = 3.14159265358979;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 40; n++) begin
      @(negedge clk);
      checks++; if (!near(c8, 16384.0 * $cos(2.0 * pi * n / 8.0), 1.0)) failures++;
      checks++; if (!near(s8, 16384.0 * $sin(2.0 * pi * n / 8.0), 1.0)) failures++;
      checks++; if (!near(cl, 16384.0 * $cos(2.0 * pi * (n - 3) / 8.0), 1.0)) failures++;
      checks++; if (!near(sl, 16384.0 * $sin(2.0 * pi * (n - 3) / 8.0), 1.0)) failures++;
      checks++; if (c0 != 16384 || s0 != 0) failures++;
      checks++; if (!near(c3, 16384.0 * $cos(2.0 * pi * 33910.0 / 434000.0 * n), 330.0)) failures++;
      checks++; if (!near(s3, 16384.0 * $sin(2.0 * pi * 33910.0 / 434000.0 * n), 330.0)) failures++;
      adv = 1; @(negedge clk) adv = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
