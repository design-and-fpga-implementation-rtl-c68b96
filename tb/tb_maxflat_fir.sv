// tb_maxflat_fir: the impulse response must reproduce the 4-bit coefficient
// table (taps 16..26 = -1, 0, 1, 2, 4, 5, 4, 2, 1, 0, -1 sixteenths, all
// others zero), and random inputs must give the direct convolution >>> 4.
// A sine at 151.9 kHz must come out at least 20 dB down.
//
// Expected values come from the design description (formulas and tables) and
// are computed here independently of the RTL; stimulus, run length and
// tolerances are this bench's own choice.
module tb_maxflat_fir;
  logic clk = 0, rst = 1, in_valid = 0;
  logic signed [17:0] x, y;
  logic v;
  int checks = 0, failures = 0;
  int tab [41];
  int hist [41];
  always #1 clk = ~clk;
  maxflat_fir dut (.clk, .rst, .in_valid, .in(x), .out_valid(v), .out(y));

  task automatic push(int val);
    @(negedge clk);
    x = 18'(val);
    for (int k = 40; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = val;
    in_valid = 1;
    @(negedge clk) in_valid = 0;
    repeat (12) @(negedge clk);
  endtask

  initial begin
    int cvals [11] = '{-1, 0, 1, 2, 4, 5, 4, 2, 1, 0, -1};
    for (int k = 0; k < 41; k++) begin tab[k] = 0; hist[k] = 0; end
    for (int k = 0; k < 11; k++) tab[15 + k] = cvals[k];   // taps 16..26 (1-based)
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 41; n++) begin
      push(n == 0 ? 16 : 0);
      checks++; if (int'(y) != tab[n]) begin failures++; $display("FAIL tap %0d: %0d", n + 1, y); end
    end
    for (int n = 0; n < 100; n++) begin
      int acc;
      push(int'($urandom_range(0, 8000)) - 4000);
      acc = 0;
      for (int k = 0; k < 41; k++) acc += tab[k] * hist[k];
      checks++; if (int'(y) != (acc >>> 4)) failures++;
    end
    begin
      int pk = 0;
      for (int n = 0; n < 200; n++) begin
        push($rtoi(4000.0 * $sin(2.0 * 3.14159265 * 151900.0 / 434000.0 * n)));
        if (n > 60 && (y > pk || -y > pk)) pk = (y > 0) ? y : -y;
      end
      checks++; if (pk > 400) begin failures++; $display("FAIL stopband peak %0d", pk); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
