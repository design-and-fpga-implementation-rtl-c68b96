// tb_sym_sampler: with L = 4 and OFFSET = 5, input samples numbered 0, 1,
// 2, ... must yield samples 5, 9, 13, ... and phase must count 0..3.
//
// Expected values come from the design description (formulas and tables) and
// are computed here independently of the RTL; stimulus, run length and
// tolerances are this bench's own choice.
module tb_sym_sampler;
  import fb_pkg::*;
  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  iq_sample_t x, y;
  logic [1:0] phase;
  int checks = 0, failures = 0, kept = 0;
  always #1 clk = ~clk;
  sym_sampler #(.L(4), .OFFSET(5)) dut (.clk, .rst, .in_valid, .in(x), .out_valid, .out(y), .phase);
  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 60; n++) begin
      x.i = sample_t'(n); x.q = sample_t'(-n);
      in_valid = 1;
      @(negedge clk) in_valid = 0;
      checks++; if (out_valid != (n >= 5 && (n - 5) % 4 == 0)) failures++;
      if (out_valid) begin
        checks++; if (int'(y.i) != 5 + 4 * kept || int'(y.q) != -(5 + 4 * kept)) failures++;
        kept++;
      end
      if (n >= 5) begin checks++; if (int'(phase) != (n - 5) % 4) failures++; end
      @(negedge clk);
    end
    checks++; if (kept != 14) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
