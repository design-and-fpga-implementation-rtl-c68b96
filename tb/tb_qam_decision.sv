// tb_qam_decision: every 16-QAM and QPSK constellation point, scaled by
// UNIT = 1000 and disturbed by up to +-0.8 UNIT of noise per axis, must
// decode to the symbol whose mapping table entry it is.
//
// Expected values come from the design description (formulas and tables) and
// are computed here independently of the RTL; stimulus, run length and
// tolerances are this bench's own choice.
module tb_qam_decision;
  import fb_pkg::*;
  logic clk = 0, rst = 1, in_valid = 0, v4, v2;
  sample_t i, q;
  logic [3:0] s4; logic [1:0] s2, i4, q4; logic i2, q2;
  int checks = 0, failures = 0;
  int ei [16] = '{-3, -3, -3, -3, -1, -1, -1, -1, 3, 3, 3, 3, 1, 1, 1, 1};
  int eq [16] = '{ 3,  1, -3, -1,  3,  1, -3, -1, 3, 1, -3, -1, 3, 1, -3, -1};
  always #1 clk = ~clk;
  qam_decision #(.BITS(4), .UNIT(1000)) d4 (.clk, .rst, .in_valid, .in_i(i), .in_q(q), .out_valid(v4), .sym(s4), .i_bits(i4), .q_bits(q4));
  qam_decision #(.BITS(2), .UNIT(1000)) d2 (.clk, .rst, .in_valid, .in_i(i), .in_q(q), .out_valid(v2), .sym(s2), .i_bits(i2), .q_bits(q2));
  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 400; n++) begin
      int sy;
      sy = n % 16;
      i = sample_t'(ei[sy] * 1000 + int'($urandom_range(0, 1600)) - 800);
      q = sample_t'(eq[sy] * 1000 + int'($urandom_range(0, 1600)) - 800);
      in_valid = 1;
      @(negedge clk) in_valid = 0;
      checks++; if (!v4 || int'(s4) != sy) begin failures++; $display("FAIL 16QAM %0d -> %0d", sy, s4); end
      checks++; if (s4 != {i4, q4}) failures++;
      // QPSK: bit 0 = I negative, bit 1 = Q negative
      checks++; if (s2 != {q < 0, i < 0}) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
