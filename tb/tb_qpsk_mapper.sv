// tb_qpsk_mapper: all four QPSK symbols against the mapping table
// 00 -> (+1,+1), 01 -> (-1,+1), 10 -> (+1,-1), 11 -> (-1,-1).
//
// Expected values come from the design description (formulas and tables) and
// are computed here independently of the RTL; stimulus, run length and
// tolerances are this bench's own choice.
module tb_qpsk_mapper;
  import fb_pkg::*;
  logic [1:0] sym;
  iq_level_t  lvl;
  int checks = 0, failures = 0;
  int ei [4] = '{1, -1, 1, -1};
  int eq [4] = '{1, 1, -1, -1};
  qpsk_mapper dut (.sym, .lvl);
  initial begin
    for (int s = 0; s < 4; s++) begin
      sym = 2'(s); #1;
      checks++; if (int'(lvl.i) != ei[s]) failures++;
      checks++; if (int'(lvl.q) != eq[s]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
