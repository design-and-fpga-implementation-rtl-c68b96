// tb_sym_fir: 5-tap symmetric filter (3, -5, 7, -5, 3) fed random 8-bit
// samples every 16 clocks; each output must equal the direct convolution and
// arrive LATENCY (= 6) clocks after its input strobe. A second instance with
// SHIFT = 2 and a 6-bit output checks the shift and saturation.
//
// Expected values come from the design description (formulas and tables) and
// are computed here independently of the RTL; stimulus, run length and
// tolerances are this bench's own choice.
module tb_sym_fir;
  logic clk = 0, rst = 1, in_valid = 0;
  logic signed [7:0]  x;
  logic signed [15:0] y;
  logic signed [5:0]  ys;
  logic ov, ovs;
  int checks = 0, failures = 0;
  localparam int C [5] = '{3, -5, 7, -5, 3};
  int hist [5] = '{0, 0, 0, 0, 0};
  int exp_y, t_in;
  always #1 clk = ~clk;
  sym_fir #(.N_TAPS(5), .IN_W(8), .COEF_W(4), .OUT_W(16), .SHIFT(0), .COEF(C)) dut (
    .clk, .rst, .in_valid, .in(x), .out_valid(ov), .out(y));
  sym_fir #(.N_TAPS(5), .IN_W(8), .COEF_W(4), .OUT_W(6), .SHIFT(2), .COEF(C)) dut_s (
    .clk, .rst, .in_valid, .in(x), .out_valid(ovs), .out(ys));
  function automatic int sat6(int v); return (v > 31) ? 31 : (v < -32) ? -32 : v; endfunction
  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 60; n++) begin
      @(negedge clk);
      x = 8'($urandom);
      for (int k = 4; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = x;
      exp_y = 0;
      for (int k = 0; k < 5; k++) exp_y += C[k] * hist[k];
      in_valid = 1;
      @(negedge clk) in_valid = 0;
      t_in = 1;
      while (!ov && t_in < 15) begin @(negedge clk); t_in++; end
      checks++; if (t_in != 6) begin failures++; $display("FAIL latency %0d", t_in); end
      checks++; if (int'(y) != exp_y) begin failures++; $display("FAIL y %0d exp %0d", y, exp_y); end
      checks++; if (int'(ys) != sat6(exp_y >>> 2)) failures++;
      repeat (8) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
