// tb_sample_timer: checks that slot counts 0..31 and wraps, and that
// samp_en pulses exactly when slot is 0, i.e. once every 32 clocks.
//
// Expected values come from the design description (formulas and tables) and
// are computed here independently of the RTL; stimulus, run length and
// tolerances are this bench's own choice.
module tb_sample_timer;
  logic clk = 0, rst = 1, samp_en;
  logic [4:0] slot;
  int checks = 0, failures = 0, last = -1, pulses = 0;
  always #1 clk = ~clk;
  sample_timer dut (.clk, .rst, .slot, .samp_en);
  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int cyc = 0; cyc < 32 * 20; cyc++) begin
      @(negedge clk);
      checks++; if (int'(slot) != (cyc + 1) % 32) failures++;
      checks++; if (samp_en != (slot == 0)) failures++;
      if (samp_en) begin
        pulses++;
        if (last >= 0) begin checks++; if (cyc - last != 32) failures++; end
        last = cyc;
      end
    end
    checks++; if (pulses != 20) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
endmodule
