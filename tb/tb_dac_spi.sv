// tb_dac_spi: random samples are presented once per 32-clock frame. The
// serial stream is decoded on rising SCLK edges while SYNC is low: each
// frame must carry exactly 16 bits, MSB first, equal to {8'h00, code} with
// code = 128 + (sample >>> 8) limited to 0..255; SCLK must stay high
// outside the transfer; the behavioural AD7303 model must end up holding
// the same code on output A.
//
// Expected values come from the design description (formulas and tables) and
// are computed here independently of the RTL; stimulus, run length and
// tolerances are this bench's own choice.
module tb_dac_spi;
  import fb_pkg::*;
  logic clk = 0, rst = 1, sync_n, sclk, din;
  logic [4:0] slot = 0;
  logic [7:0] code, out_a, out_b;
  sample_t smp = '0;
  int words, checks = 0, failures = 0, nbits = 0;
  logic [15:0] sh;
  int exp_code = 128;
  always #1 clk = ~clk;
  dac_spi dut (.clk, .rst, .slot, .sample(smp), .sync_n, .sclk, .din, .code);
  ad7303_model dac (.sync_n, .sclk, .din, .out_a, .out_b, .words);
  always @(posedge clk) slot <= rst ? 5'd0 : slot + 5'd1;
  always @(negedge sync_n) nbits = 0;
  always @(posedge sclk) if (!sync_n) begin sh = {sh[14:0], din}; nbits++; end
  always @(posedge sync_n) if (!rst && nbits > 0) begin
    checks++; if (nbits != 16 || sh != {8'h00, 8'(exp_code)}) begin
      failures++; $display("FAIL nbits %0d word %h exp %0d", nbits, sh, exp_code); end
    checks++; if (code != 8'(exp_code)) failures++;
    #1; checks++; if (out_a != 8'(exp_code)) failures++;
    nbits = 0;
  end
  always @(negedge clk) if (sync_n) begin checks++; if (sclk !== 1'b1) failures++; end
  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk iff slot == 5'd31);
      case (n % 4)
        0: smp = sample_t'(131071);
        1: smp = sample_t'(-131072);
        default: smp = sample_t'($urandom_range(0, 80000)) - sample_t'(40000);
      endcase
      exp_code = 128 + (int'(smp) >>> 8);
      if (exp_code < 0) exp_code = 0;
      if (exp_code > 255) exp_code = 255;
    end
    repeat (40) @(negedge clk);
    checks++; if (words < 199) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
