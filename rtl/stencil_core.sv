// stencil_core: the streaming 2D stencil (convolution) accelerator datapath.
//
// An I x I binary32 image streams in one element per cycle after its W x W
// coefficients; the convolved I x I image streams out one element per cycle.
// The line buffer (stencil_window) presents the whole W x W window every cycle,
// the W*W multipliers (stencil_mul_array) scale it by the coefficients
// (stencil_coeffs), and a tree of W*W - 1 adders (fp32_add_tree) sums the
// products. stencil_ctrl sequences coefficient loading, streaming and the final
// padding shifts and masks window positions outside the image. This is the
// structure the document describes; the border handling and the stall rule
// are this design's choices (see stencil_ctrl).
//
// Output element (r, c) is sum over i, j < W of coef[i][j] * img[r-h+i][c-h+j],
// h = (W-1)/2, with terms outside the image omitted, summed pairwise in the
// order n = i*W + j (see fp32_add_tree).
//
// Interface: valid/ready streams on both sides, 32-bit words. Latency from the
// input element that completes a window to its output: 1 (line buffer) + 1
// (multipliers) + ceil(log2(W*W)) (adder tree) cycles without stalls.
// Synchronous active-high reset.
module stencil_core
  import stencil_pkg::*;
#(
  parameter int unsigned I = 512,
  parameter int unsigned W = 9
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  s_valid,
  output logic  s_ready,
  input  fp32_t s_data,
  output logic  m_valid,
  input  logic  m_ready,
  output fp32_t m_data,
  output logic  m_last,
  output stencil_state_e state
);

  localparam int unsigned N   = W * W;
  localparam int unsigned LAT = 1 + tree_levels(N);

  logic           coef_load, shift, pad, adv;
  logic [N-1:0]   mask;
  fp32_t          win  [W][W];
  fp32_t          pix  [N];
  fp32_t          coef [N];
  fp32_t          prod [N];

  stencil_ctrl #(.I(I), .W(W), .LAT(LAT)) u_ctrl (
    .clk, .rst, .s_valid, .s_ready, .m_ready, .m_valid,
    .coef_load, .shift, .pad, .adv, .mask, .state, .last_out(m_last)
  );

  stencil_coeffs #(.W(W)) u_coeffs (
    .clk, .load(coef_load), .din(s_data), .coef
  );

  stencil_window #(.I(I), .W(W)) u_window (
    .clk, .rst, .shift, .din(pad ? FP32_POS_ZERO : s_data), .win
  );

  // Coefficient (i, j) meets the element W-1-i rows and W-1-j columns behind
  // the newest one in the line buffer.
  for (genvar i = 0; i < W; i++) begin : g_pi
    for (genvar j = 0; j < W; j++) begin : g_pj
      assign pix[i*W+j] = win[W-1-i][W-1-j];
    end
  end

  stencil_mul_array #(.N(N)) u_mul (
    .clk, .en(adv), .pix, .coef, .mask, .prod
  );

  fp32_add_tree #(.N(N)) u_tree (
    .clk, .en(adv), .x(prod), .y(m_data)
  );

endmodule
