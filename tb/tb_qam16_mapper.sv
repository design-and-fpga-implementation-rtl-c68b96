// tb_qam16_mapper: all 16 symbols against the Gray-coded constellation
// (0000 at (-3,+3) ... 1010 at (+3,-3)), and that horizontally or vertically
// adjacent points differ in exactly one bit.
//
// Expected values come from the design description (formulas and tables) and
// are computed here independently of the RTL; stimulus, run length and
// tolerances are this bench's own choice.
module tb_qam16_mapper;
  import fb_pkg::*;
  logic [3:0] sym;
  iq_level_t  lvl;
  int checks = 0, failures = 0;
  //               0000 0001 0010 0011 0100 0101 0110 0111 1000 1001 1010 1011 1100 1101 1110 1111
  int ei [16] = '{  -3,  -3,  -3,  -3,  -1,  -1,  -1,  -1,   3,   3,   3,   3,   1,   1,   1,   1};
  int eq [16] = '{   3,   1,  -3,  -1,   3,   1,  -3,  -1,   3,   1,  -3,  -1,   3,   1,  -3,  -1};
  int pi [16], pq [16];
  qam16_mapper dut (.sym, .lvl);
  initial begin
    for (int s = 0; s < 16; s++) begin
      sym = 4'(s); #1;
      pi[s] = lvl.i; pq[s] = lvl.q;
      checks++; if (int'(lvl.i) != ei[s] || int'(lvl.q) != eq[s]) begin
        failures++; $display("FAIL %b -> (%0d,%0d)", sym, lvl.i, lvl.q); end
    end
    for (int a = 0; a < 16; a++)
      for (int b = 0; b < 16; b++) begin
        int di, dq;
        di = pi[a] - pi[b]; dq = pq[a] - pq[b];
        if ((di * di == 4 && dq == 0) || (dq * dq == 4 && di == 0)) begin
          checks++; if ($countones(4'(a ^ b)) != 1) failures++;
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
