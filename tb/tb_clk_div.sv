// tb_clk_div: checks that clk_div produces a 50 % square wave with period
// DIV input clocks (18 by default) and is held low in reset.
//
// Expected values come from the design description (formulas and tables) and
// are computed here independently of the RTL; stimulus, run length and
// tolerances are this bench's own choice.
module tb_clk_div;
  logic clk = 0, rst = 1, clk_out;
  int checks = 0, failures = 0;
  always #1 clk = ~clk;
  clk_div dut (.clk_in(clk), .rst, .clk_out);

  int hi = 0, lo = 0, n_hi [$], n_lo [$];
  initial begin
    repeat (5) @(posedge clk);
    checks++; if (clk_out !== 1'b0) failures++;
    rst = 0;
    repeat (18 * 12) begin
      @(posedge clk); #0.1;
      if (clk_out) begin if (lo) n_lo.push_back(lo); lo = 0; hi++; end
      else         begin if (hi) n_hi.push_back(hi); hi = 0; lo++; end
    end
    for (int i = 1; i < n_hi.size(); i++) begin checks++; if (n_hi[i] != 9) failures++; end
    for (int i = 1; i < n_lo.size(); i++) begin checks++; if (n_lo[i] != 9) failures++; end
    checks++; if (n_hi.size() < 10) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
