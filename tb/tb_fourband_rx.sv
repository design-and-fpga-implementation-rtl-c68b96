// tb_fourband_rx: the four-band transmitter drives the four-band receiver
// directly (LINE_LAG = 0, no converters). Bands 2 and 3 must be received
// without error, band 1 must return every I bit with a Q decision of 0
// (the 0 Hz quadrature branch cancels), and band 4, which the
// maximally flat front-end filter attenuates to about 0.2, must stay below
// 10 % bit errors. Line outputs must follow the decided bit pairs.
//
// Expected values come from the design description (formulas and tables) and
// are computed here independently of the RTL; stimulus, run length and
// tolerances are this bench's own choice.
module tb_fourband_rx;
  import fb_pkg::*;
  logic clk = 0, rst = 1, samp_en = 0, ov;
  logic [3:0] ts [4], rs [4]; logic tv [4], rv [4], ls [4];
  logic [1:0] ln [4];
  sample_t y;
  int checks = 0, failures = 0, bit_err4 = 0, bits4 = 0;
  int n [4] = '{0, 0, 0, 0};
  int q [4][$];
  always #1 clk = ~clk;
  fourband_tx dut_tx (.clk, .rst, .samp_en, .sym(ts), .sym_valid(tv), .out_valid(ov), .out(y));
  fourband_rx #(.LINE_LAG(0)) dut (.clk, .rst, .in_valid(ov), .in(y), .sym(rs), .sym_valid(rv), .line(ln), .line_sel(ls));
  always @(posedge clk) if (!rst) begin
    for (int b = 0; b < 4; b++) begin
      if (tv[b]) q[b].push_back(ts[b]);
      if (rv[b]) begin
        int e; e = q[b].pop_front(); n[b]++;
        if (b == 0) begin checks++; if (rs[0][0] != e[0] || rs[0][1] != 1'b0) failures++; end
        else if (b < 3) begin checks++; if (int'(rs[b]) != e) failures++; end
        else begin
          for (int k = 0; k < 4; k++) if (rs[b][k] != e[k]) bit_err4++;
          bits4 += 4;
        end
      end
      if (n[b] > 0 && b > 0) begin checks++; if (ln[b] != (ls[b] ? rs[b][1:0] : rs[b][3:2])) failures++; end
    end
  end
  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int k = 0; k < 3500; k++) begin
      samp_en = 1; @(negedge clk) samp_en = 0;
      repeat (15) @(negedge clk);
    end
    checks++; if (n[0] < 180 || n[1] < 90 || n[3] < 90) failures++;
    checks++; if (bit_err4 * 10 >= bits4) failures++;
    $display("band 4: %0d bit errors in %0d bits", bit_err4, bits4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
