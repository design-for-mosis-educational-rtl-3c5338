`timescale 1ns/1ps
// adder_tree_pipe: pipelined binary adder tree.
//
// Sums N signed operands of W bits. Level l of the tree adds neighbouring
// pairs of level l-1 and registers the result, so a sum leaves the tree
// LEVELS = clog2(N) clock cycles after its operands enter, and a new set of
// operands can enter every cycle. An odd operand at the end of a level is
// passed on to the next level unchanged (still registered). The width is not
// grown inside the tree: the caller picks W wide enough for the full sum.
//
// Used by the colour conversion kernel to add up the shifted partial
// products of its constant multiplications; the tree shape is this design's
// choice.
module adder_tree_pipe #(
  parameter int unsigned N = 24,
  parameter int unsigned W = 26
) (
  input  logic                clk,
  input  logic signed [W-1:0] in  [N],
  output logic signed [W-1:0] sum
);
  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 1;

  // Number of live nodes on level l.
  function automatic int unsigned cnt(int unsigned l);
    return (N + (1 << l) - 1) >> l;
  endfunction

  // node[l] holds the registered results of level l; node[0] is the input.
  logic signed [W-1:0] node [LEVELS+1][N];

  assign node[0] = in;

  for (genvar l = 1; l <= LEVELS; l++) begin : g_level
    always_ff @(posedge clk) begin
      for (int unsigned j = 0; j < N; j++) begin
        if (j >= cnt(l))
          node[l][j] <= '0;
        else if (2*j + 1 < cnt(l-1))
          node[l][j] <= node[l-1][2*j] + node[l-1][2*j+1];
        else
          node[l][j] <= node[l-1][2*j];
      end
    end
  end

  assign sum = node[LEVELS][0];
endmodule
