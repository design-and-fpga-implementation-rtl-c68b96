// tb_tx_mixer: random samples and carrier values; out must be
// (I*cos - Q*sin) >>> 14, saturated to 18 bits, registered on in_valid.
//
// Expected values come from the design description (formulas and tables) and
// are computed here independently of the RTL; stimulus, run length and
// tolerances are this bench's own choice.
module tb_tx_mixer;
  import fb_pkg::*;
  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  sample_t i, q, y;
  trig_t c, s;
  int checks = 0, failures = 0;
  always #1 clk = ~clk;
  tx_mixer dut (.clk, .rst, .in_valid, .in_i(i), .in_q(q), .cos_i(c), .sin_i(s), .out_valid, .out(y));
  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 300; n++) begin
      longint e;
      i = 18'($urandom); q = 18'($urandom);
      c = (n % 2) ? 16'sd16384 : trig_t'($urandom_range(0, 32768) - 16384);
      s = trig_t'($urandom_range(0, 32768) - 16384);
      if (n < 100) begin i = i >>> 3; q = q >>> 3; end
      e = (longint'(i) * c - longint'(q) * s) >>> 14;
      if (e > 131071) e = 131071;
      if (e < -131072) e = -131072;
      in_valid = 1;
      @(negedge clk) in_valid = 0;
      checks++; if (!out_valid || longint'(y) != e) begin failures++; $display("FAIL %0d %0d", y, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
