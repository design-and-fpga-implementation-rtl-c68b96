// tb_fourband_tx: the four-lane transmitter must report each lane's symbol
// sequence (y = 9x + 3 mod 2^BITS from 0; QPSK in bits [1:0]) with periods
// of 16 and 32 samples, and its output must equal the saturated sum of
// four separately instantiated lanes with the same band plan.
//
// Expected values come from the design description (formulas and tables) and
// are computed here independently of the RTL; stimulus, run length and
// tolerances are this bench's own choice.
module tb_fourband_tx;
  import fb_pkg::*;
  logic clk = 0, rst = 1, samp_en = 0, ov;
  logic [3:0] sym [4]; logic sv [4];
  sample_t y;
  logic [1:0] s1; logic [3:0] s2, s3, s4;
  logic v1, v2, v3, v4, o1, o2, o3, o4;
  sample_t y1, y2, y3, y4;
  int checks = 0, failures = 0, outs = 0, smp = 0;
  int ref_s [4] = '{0, 0, 0, 0}, last [4] = '{-1, -1, -1, -1}, cnt [4] = '{0, 0, 0, 0};
  always #1 clk = ~clk;
  fourband_tx dut (.clk, .rst, .samp_en, .sym, .sym_valid(sv), .out_valid(ov), .out(y));
  tx_band #(.BITS(2), .L(16), .F_HZ(0))      b1 (.clk, .rst, .samp_en, .sym(s1), .sym_valid(v1), .out_valid(o1), .out(y1));
  tx_band #(.BITS(4), .L(32), .F_HZ(33_910)) b2 (.clk, .rst, .samp_en, .sym(s2), .sym_valid(v2), .out_valid(o2), .out(y2));
  tx_band #(.BITS(4), .L(32), .F_HZ(54_250)) b3 (.clk, .rst, .samp_en, .sym(s3), .sym_valid(v3), .out_valid(o3), .out(y3));
  tx_band #(.BITS(4), .L(32), .F_HZ(74_600)) b4 (.clk, .rst, .samp_en, .sym(s4), .sym_valid(v4), .out_valid(o4), .out(y4));
  int exp_q [$];
  always @(posedge clk) if (!rst) begin
    if (o1) begin
      longint s; s = longint'(y1) + y2 + y3 + y4;
      exp_q.push_back(int'((s > 131071) ? 131071 : (s < -131072) ? -131072 : s));
    end
    if (ov) begin
      int e; e = exp_q.pop_front(); outs++;
      checks++; if (int'(y) != e) failures++;
    end
    for (int b = 0; b < 4; b++) if (sv[b]) begin
      int m, per;
      m = (b == 0) ? 4 : 16; per = (b == 0) ? 16 : 32;
      checks++; if (int'(sym[b]) != ref_s[b]) failures++;
      ref_s[b] = (9 * ref_s[b] + 3) % m;
      if (last[b] >= 0) begin checks++; if (smp - last[b] != per) failures++; end
      last[b] = smp; cnt[b]++;
    end
    if (samp_en) smp++;
  end
  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 800; n++) begin
      samp_en = 1; @(negedge clk) samp_en = 0;
      repeat (15) @(negedge clk);
    end
    checks++; if (outs < 780 || cnt[0] < 45 || cnt[3] < 22) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
