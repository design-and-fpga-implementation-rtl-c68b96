// tb_rx_mixer: random input and carrier values; out_i must be
// (S*cos) >>> 14 and out_q (-(S*sin)) >>> 14, saturated, registered on
// in_valid.
//
// Expected values come from the design description (formulas and tables) and
// are computed here independently of the RTL; stimulus, run length and
// tolerances are this bench's own choice.
module tb_rx_mixer;
  import fb_pkg::*;
  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  sample_t x, yi, yq;
  trig_t c, s;
  int checks = 0, failures = 0;
  always #1 clk = ~clk;
  rx_mixer dut (.clk, .rst, .in_valid, .in(x), .cos_i(c), .sin_i(s), .out_valid, .out_i(yi), .out_q(yq));
  function automatic longint sat(longint e);
    return (e > 131071) ? 131071 : (e < -131072) ? -131072 : e;
  endfunction
  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 300; n++) begin
      x = 18'($urandom);
      c = trig_t'($urandom_range(0, 32768) - 16384);
      s = trig_t'($urandom_range(0, 32768) - 16384);
      in_valid = 1;
      @(negedge clk) in_valid = 0;
      checks++; if (!out_valid || longint'(yi) != sat((longint'(x) * c) >>> 14)) failures++;
      checks++; if (longint'(yq) != sat((-(longint'(x) * s)) >>> 14)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
