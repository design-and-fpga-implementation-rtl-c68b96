// tb_tx_band: one 16-QAM lane at 54.25 kHz (L = 32) and the QPSK baseband
// lane (L = 16, 0 Hz), driven by a sample strobe every 16 clocks. Checks
// the symbol sequence against y = 9x + 3 mod 2^BITS starting at 0, the
// symbol period of L samples, one output per strobe, and that the output
// energy sits at the carrier: a DFT over 2048 samples must show at least
// 10x more power at the carrier than at 0 Hz / 150 kHz (16-QAM lane) or at
// 0 Hz than at 100 kHz (baseband lane).
//
// Expected values come from the design description (formulas and tables) and
// are computed here independently of the RTL; stimulus, run length and
// tolerances are this bench's own choice.
module tb_tx_band;
  import fb_pkg::*;
  logic clk = 0, rst = 1, samp_en = 0;
  logic [3:0] s4; logic [1:0] s2;
  logic sv4, sv2, ov4, ov2;
  sample_t y4, y2;
  int checks = 0, failures = 0;
  int n4 = 0, n2 = 0, outs = 0, last4 = -1, last2 = -1, smp = 0;
  int r4 = 0, r2 = 0;
  real buf4 [2048], buf2 [2048];
  always #1 clk = ~clk;
  tx_band #(.BITS(4), .L(32), .F_HZ(54_250)) d4 (.clk, .rst, .samp_en, .sym(s4), .sym_valid(sv4), .out_valid(ov4), .out(y4));
  tx_band #(.BITS(2), .L(16), .F_HZ(0))      d2 (.clk, .rst, .samp_en, .sym(s2), .sym_valid(sv2), .out_valid(ov2), .out(y2));

  always @(posedge clk) if (!rst) begin
    if (sv4) begin
      checks++; if (int'(s4) != r4) failures++;
      r4 = (9 * r4 + 3) % 16;
      if (last4 >= 0) begin checks++; if (smp - last4 != 32) failures++; end
      last4 = smp; n4++;
    end
    if (sv2) begin
      checks++; if (int'(s2) != r2) failures++;
      r2 = (9 * r2 + 3) % 4;
      if (last2 >= 0) begin checks++; if (smp - last2 != 16) failures++; end
      last2 = smp; n2++;
    end
    if (ov4) begin
      if (outs >= 200 && outs < 2248) begin buf4[outs - 200] = real'(y4); buf2[outs - 200] = real'(y2); end
      outs++;
    end
    if (samp_en) smp++;
  end

  task automatic check_band(real x [2048], real fc);
    real pin, pout, re, im, f;
    int nin, nout;
    pin = 0.0; pout = 0.0; nin = 0; nout = 0;
    for (int k = 0; k < 1000; k++) begin
      f = 434000.0 * k / 2048.0;
      if ((f - fc < 15000.0 && fc - f < 15000.0) || f - fc > 45000.0 || fc - f > 45000.0) begin
        re = 0.0; im = 0.0;
        for (int m = 0; m < 2048; m++) begin
          re += x[m] * $cos(2.0 * 3.14159265358979 * k * m / 2048.0);
          im += x[m] * $sin(2.0 * 3.14159265358979 * k * m / 2048.0);
        end
        if (f - fc < 15000.0 && fc - f < 15000.0) begin pin += re * re + im * im; nin++; end
        else begin pout += re * re + im * im; nout++; end
      end
    end
    checks++; if (pin / nin < 100.0 * pout / nout) begin
      failures++; $display("FAIL spectrum at %f: %e vs %e", fc, pin / nin, pout / nout); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 2300; n++) begin
      samp_en = 1; @(negedge clk) samp_en = 0;
      repeat (15) @(negedge clk);
    end
    checks++; if (outs < 2290 || outs > 2300) failures++;
    checks++; if (n4 < 70 || n2 < 140) failures++;
    check_band(buf4, 54250.0);
    check_band(buf2, 0.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
