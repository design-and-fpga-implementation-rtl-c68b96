// adder_tree: pipelined binary adder tree.
//
// Adds N signed inputs in ceil(log2(N)) levels of two-input adders with a
// register after every level, so each clock accepts a new set of inputs and
// the sum appears LEVELS clocks later. This is the pipelined "parallel
// addition" structure of the design description, which trades registers for
// a short critical path. An odd element at any level is passed on by adding
// zero. Output width is W_IN + LEVELS, so the sum never overflows.
//
// The adder tree itself is the published filter structure; one register per
// level and pass-through of odd elements are this design's choice.
module adder_tree #(
  parameter int N    = 6,
  parameter int W_IN = 16,
  localparam int LEVELS = (N > 1) ? $clog2(N) : 1,
  localparam int W_OUT  = W_IN + LEVELS
) (
  input  logic                    clk,
  input  logic signed [W_IN-1:0]  in  [N],
  output logic signed [W_OUT-1:0] sum
);
  // Number of live operands at level l.
  function automatic int width_at(int l);
    int n;
    n = N;
    for (int k = 0; k < l; k++) n = (n + 1) / 2;
    return n;
  endfunction

  // g_level[l].r holds the operands of level l; level 0 is the input.
  for (genvar l = 0; l <= LEVELS; l++) begin : g_level
    localparam int NL = width_at(l);
    logic signed [W_OUT-1:0] r [NL];
    if (l == 0) begin : g_in
      for (genvar i = 0; i < NL; i++) begin : g_node
        assign r[i] = W_OUT'(in[i]);
      end
    end else begin : g_add
      localparam int NIN = width_at(l - 1);
      for (genvar i = 0; i < NL; i++) begin : g_node
        if (2 * i + 1 < NIN) begin : g_pair
          always_ff @(posedge clk) r[i] <= g_level[l-1].r[2*i] + g_level[l-1].r[2*i+1];
        end else begin : g_pass
          always_ff @(posedge clk) r[i] <= g_level[l-1].r[2*i];
        end
      end
    end
  end

  assign sum = g_level[LEVELS].r[0];
endmodule
