// tb_adc_spi: the behavioural AD7476A model is given a new random 12-bit
// input every 32-clock frame. Every conversion must deliver that code and
// the sample (code - 2048) <<< 4, with CS low for exactly 16 SCLK cycles.
//
// Expected values come from the design description (formulas and tables) and
// are computed here independently of the RTL; stimulus, run length and
// tolerances are this bench's own choice.
module tb_adc_spi;
  import fb_pkg::*;
  logic clk = 0, rst = 1, cs_n, sclk, sdata, valid;
  logic [4:0] slot = 0;
  logic [11:0] code, vin = 12'd0;
  sample_t y;
  int conv, checks = 0, failures = 0, edges = 0, got = 0;
  int exp_q [$];
  always #1 clk = ~clk;
  adc_spi dut (.clk, .rst, .slot, .sdata, .cs_n, .sclk, .valid, .out(y), .code);
  ad7476a_model adc (.cs_n, .sclk, .vin, .sdata, .conversions(conv));
  always @(posedge clk) slot <= rst ? 5'd0 : slot + 5'd1;
  always @(negedge cs_n) begin exp_q.push_back(int'(vin)); edges = 0; end
  always @(negedge sclk) if (!cs_n) edges++;
  always @(posedge cs_n) if (!rst) begin checks++; if (edges != 16) failures++; end
  always @(posedge clk) if (valid) begin
    int e; e = exp_q.pop_front(); got++;
    checks++; if (int'(code) != e || int'(y) != (e - 2048) * 16) begin
      failures++; $display("FAIL code %0d exp %0d", code, e); end
  end
  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk iff slot == 5'd20);
      vin = (n % 5 == 0) ? 12'hFFF : (n % 5 == 1) ? 12'h000 : 12'($urandom);
    end
    repeat (40) @(negedge clk);
    checks++; if (got < 198 || conv < 198) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
