// tb_iq_mux: exhaustive check of the 2-to-1 data selector.
//
// Expected values come from the design description (formulas and tables) and
// are computed here independently of the RTL; stimulus, run length and
// tolerances are this bench's own choice.
module tb_iq_mux;
  logic [1:0] a, b, y;
  logic sel;
  int checks = 0, failures = 0;
  iq_mux #(.W(2)) dut (.in0(a), .in1(b), .sel, .out(y));
  initial begin
    for (int n = 0; n < 32; n++) begin
      {sel, a, b} = 5'(n); #1;
      checks++; if (y != (sel ? b : a)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
