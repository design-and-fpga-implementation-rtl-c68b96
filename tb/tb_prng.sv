// tb_prng: checks the 4-bit generator against the listed 16-symbol loop
// 0, 3, 14, 1, 12, 15, 10, 13, 8, 11, 6, 9, 4, 7, 2, 5 (twice round), that it
// holds when adv is low, and the 2-bit generator against 0, 3, 2, 1.
//
// Expected values come from the design description (formulas and tables) and
// are computed here independently of the RTL; stimulus, run length and
// tolerances are this bench's own choice.
module tb_prng;
  logic clk = 0, rst = 1, adv = 0;
  logic [3:0] s4;
  logic [1:0] s2;
  int checks = 0, failures = 0;
  int exp4 [16] = '{0, 3, 14, 1, 12, 15, 10, 13, 8, 11, 6, 9, 4, 7, 2, 5};
  int exp2 [4]  = '{0, 3, 2, 1};
  always #1 clk = ~clk;
  prng #(.W(4)) dut4 (.clk, .rst, .adv, .sym(s4));
  prng #(.W(2)) dut2 (.clk, .rst, .adv, .sym(s2));
  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 40; i++) begin
      @(negedge clk);
      checks++; if (int'(s4) != exp4[i % 16]) begin failures++; $display("FAIL s4 %0d: %0d", i, s4); end
      checks++; if (int'(s2) != exp2[i % 4]) failures++;
      adv = (i % 5 != 4);
      if (!adv) begin @(negedge clk); checks++; if (int'(s4) != exp4[i % 16]) failures++; adv = 1; end
      @(posedge clk); #0.1 adv = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (1000) @(posedge clk); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
