// stencil_coeffs: holds the W*W stencil coefficients of the current convolution.
//
// The coefficients reach the accelerator on the same stream as the image, ahead
// of it, in row-major order: coefficient (i, j) multiplies the image element i
// rows below and j columns right of the window's top-left corner. They are
// shifted serially into a chain of registers, so after W*W loads coef[i*W + j]
// holds word number i*W + j of the sequence. The document says only that the
// coefficients are sent before the image; the serial chain and the row-major
// order are this design's choices.
//
// Interface: din is taken when load is high; coef changes on the same edge, so
// a multiplier that samples coef on that edge still sees the previous set.
module stencil_coeffs
  import stencil_pkg::*;
#(
  parameter int unsigned W = 9
) (
  input  logic  clk,
  input  logic  load,
  input  fp32_t din,
  output fp32_t coef [W*W]
);

  localparam int unsigned N = W * W;

  always_ff @(posedge clk) begin
    if (load) begin
      coef[N-1] <= din;
      for (int k = 0; k < N - 1; k++) coef[k] <= coef[k+1];
    end
  end

endmodule
