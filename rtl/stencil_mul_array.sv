// stencil_mul_array: the W*W parallel floating-point multipliers of the stencil.
//
// Lane n multiplies window element pix[n] by coefficient coef[n]. A lane whose
// mask bit is low uses +0 in place of the pixel: this is how window positions
// outside the image are ignored, so border outputs are the sum over the part of
// the window that lies inside the image. The multipliers are the document's;
// the mask is this design's way of giving border elements that meaning.
//
// Interface: inputs are sampled when en is high, prod[n] is valid one enabled
// cycle later (latency 1, one window per cycle).
module stencil_mul_array
  import stencil_pkg::*;
#(
  parameter int unsigned N = 81   // W*W lanes
) (
  input  logic         clk,
  input  logic         en,
  input  fp32_t        pix  [N],
  input  fp32_t        coef [N],
  input  logic [N-1:0] mask,
  output fp32_t        prod [N]
);

  for (genvar n = 0; n < N; n++) begin : g_lane
    fp32_t a;
    assign a = mask[n] ? pix[n] : FP32_POS_ZERO;
    fp32_mul u_mul (.clk(clk), .en(en), .a(a), .b(coef[n]), .y(prod[n]));
  end

endmodule
