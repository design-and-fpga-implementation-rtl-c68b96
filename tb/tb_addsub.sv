// tb_addsub: the registered add/subtract example. 10 and 7 must give 17
// when c = 1 and 3 when c = 0; 300 random operand pairs must give
// a + b or a - b (9-bit, two's complement wrap) one clock later.
//
// Expected values come from the design description (formulas and tables) and
// are computed here independently of the RTL; stimulus, run length and
// tolerances are this bench's own choice.
module tb_addsub;
  logic clk = 0, c;
  logic [7:0] a, b;
  logic [8:0] r;
  int checks = 0, failures = 0;
  always #1 clk = ~clk;
  addsub dut (.clk, .a, .b, .c, .result(r));
  task automatic apply(logic [7:0] x, logic [7:0] z, logic cc);
    @(negedge clk); a = x; b = z; c = cc;
    @(negedge clk);
    checks++; if (r != (cc ? 9'(x) + 9'(z) : 9'(x) - 9'(z))) failures++;
  endtask
  initial begin
    apply(8'd10, 8'd7, 1'b1); checks++; if (r != 9'd17) failures++;
    apply(8'd10, 8'd7, 1'b0); checks++; if (r != 9'd3) failures++;
    for (int n = 0; n < 300; n++) apply(8'($urandom), 8'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
