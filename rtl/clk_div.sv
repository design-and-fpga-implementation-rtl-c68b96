// clk_div: divides the board oscillator down to the system clock.
//
// A counter runs from 0 to DIV/2-1 and the output toggles each time it
// wraps, giving a square wave at f_in/DIV with 50 % duty. With the default
// DIV = 18 a 250 MHz oscillator becomes the 13.89 MHz clock that drives the
// whole transceiver; the divide ratio and the target clock follow the design
// description, the counter structure is this design's choice. DIV must be
// even. The output is low while rst is high and first rises DIV/2 input
// cycles after rst falls.
module clk_div #(
  parameter int DIV = 18
) (
  input  logic clk_in,
  input  logic rst,
  output logic clk_out
);
  localparam int HALF = DIV / 2;
  localparam int CW   = (HALF > 1) ? $clog2(HALF) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk_in) begin
    if (rst) begin
      cnt     <= '0;
      clk_out <= 1'b0;
    end else if (cnt == CW'(HALF - 1)) begin
      cnt     <= '0;
      clk_out <= ~clk_out;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

  initial assert (DIV >= 2 && DIV % 2 == 0) else $error("clk_div: DIV must be even");
endmodule
