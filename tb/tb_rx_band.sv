// tb_rx_band: each receive lane is fed directly by the matching transmit
// lane (no line, so LAG = 0 and OFFSET = 128, the two 129-tap filters'
// delay). The received symbols must equal the transmitted sequence in
// order: all four bits for the 16-QAM lanes at 33.91 and 54.25 kHz, the
// I bit for the 0 Hz QPSK lane (its Q decision must be 0 because the
// quadrature branch cancels at 0 Hz). The line output must follow the
// decided I bits in the first half of the symbol and the Q bits in the
// second half, so the Q selection must be active 48..52 % of the time.
//
// Expected values come from the design description (formulas and tables) and
// are computed here independently of the RTL; stimulus, run length and
// tolerances are this bench's own choice.
module tb_rx_band;
  import fb_pkg::*;
  logic clk = 0, rst = 1, samp_en = 0;
  int checks = 0, failures = 0;
  always #1 clk = ~clk;

  logic [1:0] ts1, rs1; logic [3:0] ts2, rs2, ts3, rs3;
  logic tv1, tov1, rv1, tv2, tov2, rv2, tv3, tov3, rv3, ls1, ls2, ls3;
  logic [0:0] ln1; logic [1:0] ln2, ln3;
  sample_t y1, y2, y3;
  tx_band #(.BITS(2), .L(16), .F_HZ(0))      t1 (.clk, .rst, .samp_en, .sym(ts1), .sym_valid(tv1), .out_valid(tov1), .out(y1));
  rx_band #(.BITS(2), .L(16), .F_HZ(0),      .LAG(0), .OFFSET(128)) r1 (.clk, .rst, .in_valid(tov1), .in(y1), .sym(rs1), .sym_valid(rv1), .line(ln1), .line_sel(ls1));
  tx_band #(.BITS(4), .L(32), .F_HZ(33_910)) t2 (.clk, .rst, .samp_en, .sym(ts2), .sym_valid(tv2), .out_valid(tov2), .out(y2));
  rx_band #(.BITS(4), .L(32), .F_HZ(33_910), .LAG(0), .OFFSET(128)) r2 (.clk, .rst, .in_valid(tov2), .in(y2), .sym(rs2), .sym_valid(rv2), .line(ln2), .line_sel(ls2));
  tx_band #(.BITS(4), .L(32), .F_HZ(54_250)) t3 (.clk, .rst, .samp_en, .sym(ts3), .sym_valid(tv3), .out_valid(tov3), .out(y3));
  rx_band #(.BITS(4), .L(32), .F_HZ(54_250), .LAG(0), .OFFSET(128)) r3 (.clk, .rst, .in_valid(tov3), .in(y3), .sym(rs3), .sym_valid(rv3), .line(ln3), .line_sel(ls3));

  int q1 [$], q2 [$], q3 [$];
  int n1 = 0, n2 = 0, n3 = 0, sel_hi = 0, sel_all = 0;
  always @(posedge clk) if (!rst) begin
    if (tv1) q1.push_back(ts1);
    if (tv2) q2.push_back(ts2);
    if (tv3) q3.push_back(ts3);
    if (rv1) begin int e; e = q1.pop_front(); checks++; if (rs1[0] != e[0] || rs1[1] != 1'b0) failures++; n1++; end
    if (rv2) begin int e; e = q2.pop_front(); checks++; if (int'(rs2) != e) begin failures++; $display("FAIL b2 %0d %0d", rs2, e); end n2++; end
    if (rv3) begin int e; e = q3.pop_front(); checks++; if (int'(rs3) != e) begin failures++; $display("FAIL b3 %0d %0d", rs3, e); end n3++; end
    if (n3 > 0) begin
      checks++; if (ln3 != (ls3 ? rs3[1:0] : rs3[3:2])) failures++;
      if (ls3) sel_hi++;
      sel_all++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 2000; n++) begin
      samp_en = 1; @(negedge clk) samp_en = 0;
      repeat (15) @(negedge clk);
    end
    checks++; if (n1 < 100 || n2 < 50 || n3 < 50) begin failures++; $display("FAIL counts %0d %0d %0d", n1, n2, n3); end
    // Q half of the line output must take half of each symbol period
    checks++; if (sel_hi * 100 < sel_all * 48 || sel_hi * 100 > sel_all * 52) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
