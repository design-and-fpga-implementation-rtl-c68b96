// tb_adder_tree: random signed inputs every clock; each sum must equal the
// plain sum of the inputs presented LEVELS clocks earlier (6 inputs as in the
// three-level example, and 65 inputs as used by the SRRC filter).
//
// Expected values come from the design description (formulas and tables) and
// are computed here independently of the RTL; stimulus, run length and
// tolerances are this bench's own choice.
module tb_adder_tree;
  logic clk = 0;
  logic signed [15:0] a6 [6], a65 [65];
  logic signed [18:0] s6;
  logic signed [22:0] s65;
  longint q6 [$], q65 [$];
  int checks = 0, failures = 0;
  always #1 clk = ~clk;
  adder_tree #(.N(6),  .W_IN(16)) dut6  (.clk, .in(a6),  .sum(s6));
  adder_tree #(.N(65), .W_IN(16)) dut65 (.clk, .in(a65), .sum(s65));
  initial begin
    for (int c = 0; c < 200; c++) begin
      longint t6, t65;
      @(negedge clk);
      t6 = 0; t65 = 0;
      for (int i = 0; i < 6; i++)  begin a6[i]  = 16'($urandom); t6  += a6[i];  end
      for (int i = 0; i < 65; i++) begin a65[i] = 16'($urandom); t65 += a65[i]; end
      if (c % 3 == 0) for (int i = 0; i < 65; i++) begin t65 -= a65[i]; a65[i] = -16'sd32768; t65 += a65[i]; end
      q6.push_back(t6); q65.push_back(t65);
      if (c >= 3) begin checks++; if (longint'(s6)  != q6[c - 3]) failures++; end
      if (c >= 7) begin checks++; if (longint'(s65) != q65[c - 7]) failures++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (1000) @(posedge clk); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
