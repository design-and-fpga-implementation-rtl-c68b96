// prng: pseudo-random symbol source.
//
// The next symbol is y = 9*x + 3 taken modulo 2^W (only the low W bits of
// the product are kept). For W = 4 the sequence visits all 16 values,
// 0, 3, 14, 1, 12, 15, 10, 13, 8, 11, 6, 9, 4, 7, 2, 5, and repeats every 64
// bits; for W = 2 it is 0, 3, 2, 1. The recurrence and its start value 0
// follow the design description. `sym` shows the current symbol; `adv`
// moves to the next one at the clock edge. Synchronous reset to 0.
//
// Using the same recurrence with W = 2 for the QPSK lane, and the
// synchronous reset, are this design's choice.
module prng #(
  parameter int W = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         adv,
  output logic [W-1:0] sym
);
  always_ff @(posedge clk) begin
    if (rst)      sym <= '0;
    else if (adv) sym <= W'((sym << 3) + sym + W'(3));  // 9*x + 3 mod 2^W
  end
endmodule
