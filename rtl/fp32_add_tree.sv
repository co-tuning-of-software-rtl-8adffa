// fp32_add_tree: pipelined floating-point addition tree of N operands.
//
// N - 1 fp32_add units reduce N products to one sum. At each level operands 2k
// and 2k+1 are added; an odd operand left over at the end of a level is passed
// through a register so that every path has the same latency. The document
// specifies W*W - 1 adders in a tree; the pairing order and a register after
// every adder are this design's choices (floating-point addition is not
// associative, so the order is part of the result).
//
// Interface: x is sampled when en is high; y is the sum LEVELS enabled cycles
// later, LEVELS = ceil(log2 N) (7 for N = 81). One sum per enabled cycle.
module fp32_add_tree
  import stencil_pkg::*;
#(
  parameter int unsigned N = 81
) (
  input  logic  clk,
  input  logic  en,
  input  fp32_t x [N],
  output fp32_t y
);

  localparam int LEVELS = tree_levels(N);

  // lvl[l][k] is operand k at level l; level 0 is the input.
  fp32_t lvl [LEVELS+1][N];

  for (genvar k = 0; k < N; k++) begin : g_in
    assign lvl[0][k] = x[k];
  end

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int W_IN  = tree_width(N, l);
    localparam int W_OUT = tree_width(N, l + 1);
    for (genvar k = 0; k < W_OUT; k++) begin : g_node
      if (2 * k + 1 < W_IN) begin : g_add
        fp32_add u_add (.clk(clk), .en(en), .a(lvl[l][2*k]), .b(lvl[l][2*k+1]), .y(lvl[l+1][k]));
      end else begin : g_pass
        always_ff @(posedge clk) begin
          if (en) lvl[l+1][k] <= lvl[l][2*k];
        end
      end
    end
    for (genvar k = W_OUT; k < N; k++) begin : g_unused
      assign lvl[l+1][k] = FP32_POS_ZERO;
    end
  end

  assign y = lvl[LEVELS][0];

endmodule
