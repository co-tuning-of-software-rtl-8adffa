// fp32_mul: binary32 floating-point multiplier with one register stage.
//
// One of the W*W parallel multipliers of the stencil: it multiplies an image
// element by its stencil coefficient. The product of the two 24-bit significands
// is formed in one step, normalised by at most one position, and rounded to
// nearest-even using a guard bit and a sticky bit. Subnormal operands count as
// zero and results below the normal range become a signed zero (flush to zero);
// overflow gives infinity, and 0*inf or any NaN operand gives the quiet NaN.
// The document asks only for 32-bit floating-point multipliers; the rounding,
// flushing and the single pipeline stage are this design's choices.
//
// Interface: a, b are sampled when en is high; y holds a*b from the next cycle.
// Latency 1 cycle, one product per enabled cycle. No reset: the surrounding
// pipeline tracks which results are valid.
module fp32_mul
  import stencil_pkg::*;
(
  input  logic  clk,
  input  logic  en,
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  fp32_fields_t fa, fb;
  fp32_t        y_d;

  assign fa = fp32_fields_t'(a);
  assign fb = fp32_fields_t'(b);

  always_comb begin
    logic        s, a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
    logic [47:0] prod;
    logic [23:0] mant;
    logic        guard, sticky, round_up;
    logic [24:0] mant_r;
    logic signed [10:0] e;

    s      = fa.sign ^ fb.sign;
    a_zero = (fa.exp == 8'd0);
    b_zero = (fb.exp == 8'd0);
    a_inf  = (fa.exp == FP32_EXP_MAX) && (fa.frac == '0);
    b_inf  = (fb.exp == FP32_EXP_MAX) && (fb.frac == '0);
    a_nan  = (fa.exp == FP32_EXP_MAX) && (fa.frac != '0);
    b_nan  = (fb.exp == FP32_EXP_MAX) && (fb.frac != '0);

    prod = {1'b1, fa.frac} * {1'b1, fb.frac};
    e    = 11'(signed'({3'b0, fa.exp})) + 11'(signed'({3'b0, fb.exp})) - 11'sd127;
    // product in [1, 4): normalise by at most one place
    mant     = prod[47] ? prod[47:24] : prod[46:23];
    guard    = prod[47] ? prod[23]    : prod[22];
    sticky   = prod[47] ? (|prod[22:0]) : (|prod[21:0]);
    round_up = guard && (sticky || mant[0]);
    mant_r   = {1'b0, mant} + 25'(round_up);
    // exponent: +1 for a product >= 2, +1 more if rounding carried out
    e        = e + 11'(prod[47]) + 11'(mant_r[24]);
    mant_r   = mant_r[24] ? (mant_r >> 1) : mant_r;

    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero)) begin
      y_d = FP32_QNAN;
    end else if (a_inf || b_inf) begin
      y_d = {s, FP32_EXP_MAX, 23'd0};
    end else if (a_zero || b_zero || e <= 11'sd0) begin
      y_d = {s, 31'd0};
    end else if (e >= 11'sd255) begin
      y_d = {s, FP32_EXP_MAX, 23'd0};
    end else begin
      y_d = {s, e[7:0], mant_r[22:0]};
    end
  end

  always_ff @(posedge clk) begin
    if (en) y <= y_d;
  end

endmodule
