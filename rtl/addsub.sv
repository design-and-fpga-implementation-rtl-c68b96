// addsub: registered 8-bit adder/subtractor.
//
// A small stand-alone example circuit: on every rising clock edge
// result <= a + b when c = 1 and result <= a - b when c = 0. Inputs are
// unsigned 8-bit; the 9-bit result holds the carry of an addition, and for a
// subtraction it is the two's complement difference modulo 512. The function
// and port list follow the design description (for example a = 10, b = 7
// gives 3 with c = 0 and 17 with c = 1); there is no reset.
//
// Its behaviour (add when c = 1, subtract when c = 0, registered result)
// follows the introductory example of the design description; the widths are
// this design's choice.
module addsub (
  input  logic       clk,
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  logic       c,
  output logic [8:0] result
);
  always_ff @(posedge clk) begin
    if (c) result <= {1'b0, a} + {1'b0, b};
    else   result <= {1'b0, a} - {1'b0, b};
  end
endmodule
