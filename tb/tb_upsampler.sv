// tb_upsampler: with L = 3 the sequence 4,5,4,7,6,3 (one value per symbol
// request) must come out as 4,0,0,5,0,0,4,0,0,7,0,0,6,0,0,3,0,0, and with
// L = 16 one request every 16 strobes. Strobes are 4 clocks apart.
//
// Expected values come from the design description (formulas and tables) and
// are computed here independently of the RTL; stimulus, run length and
// tolerances are this bench's own choice.
module tb_upsampler;
  import fb_pkg::*;
  logic clk = 0, rst = 1, en = 0;
  iq_level_t in3, out3, in16, out16;
  logic req3, v3, req16, v16;
  int checks = 0, failures = 0;
  int seq [6] = '{4, 5, 4, 7, 6, 3};
  int k = 0, n = 0, reqs16 = 0;
  int got [$];
  always #1 clk = ~clk;
  upsampler #(.L(3))  dut3  (.clk, .rst, .en, .in(in3),  .sym_req(req3),  .out(out3),  .out_valid(v3));
  upsampler #(.L(16)) dut16 (.clk, .rst, .en, .in(in16), .sym_req(req16), .out(out16), .out_valid(v16));
  // 3-bit levels: carry the sequence as (i, q) = (value>>1 -2, value&1)
  always_comb begin
    in3.i = level_t'(seq[k % 6] / 2 - 2);
    in3.q = level_t'(seq[k % 6] % 2);
    in16  = '{i: 3'sd3, q: -3'sd1};
  end
  always @(posedge clk) if (!rst) begin
    if (req3) k <= k + 1;
    if (req16) reqs16 <= reqs16 + 1;
    if (v3) got.push_back((int'(out3.i) + 2) * 2 + int'(out3.q));
    if (v16) begin
      checks++;
      if (n % 16 == 0) begin if (out16.i != 3'sd3 || out16.q != -3'sd1) failures++; end
      else if (out16 != '0) failures++;
      n++;
    end
  end
  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    repeat (18 * 4 - 1) begin
      @(negedge clk) en = 1; @(negedge clk) en = 0; repeat (2) @(negedge clk);
    end
    @(negedge clk) en = 1; @(negedge clk) en = 0; repeat (3) @(negedge clk);
    for (int i = 0; i < 18; i++) begin
      int e;
      e = (i % 3 == 0) ? seq[i / 3] : 4;   // a zero sample decodes as (0+2)*2+0 = 4
      checks++; if (got[i] != e) begin failures++; $display("FAIL sample %0d: %0d", i, got[i]); end
    end
    checks++; if (reqs16 != 5) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
