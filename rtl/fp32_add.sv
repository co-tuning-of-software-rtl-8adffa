// fp32_add: binary32 floating-point adder with one register stage.
//
// One node of the stencil's addition tree. The operand of larger magnitude is
// taken as the reference; the other significand is shifted right by the exponent
// difference into three extra bits (guard, round, sticky). The significands are
// then added or subtracted, the result is normalised (a right shift on carry out,
// a leading-zero shift after cancellation) and rounded to nearest-even.
// Subnormal operands count as zero and results below the normal range become a
// signed zero; overflow gives infinity; inf - inf or a NaN operand gives the
// quiet NaN. An exact zero sum is +0 unless both operands are -0.
// The document asks only for 32-bit floating-point adders; rounding, flushing
// and the single pipeline stage are this design's choices.
//
// Interface: a, b are sampled when en is high; y holds a+b from the next cycle.
// Latency 1 cycle. No reset.
module fp32_add
  import stencil_pkg::*;
(
  input  logic  clk,
  input  logic  en,
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  fp32_t y_d;

  always_comb begin
    fp32_fields_t hi, lo;
    logic        hi_zero, lo_zero, hi_inf, lo_inf, hi_nan, lo_nan;
    logic [7:0]  ediff;
    logic [26:0] mb, ms;
    logic [27:0] sum;
    logic [26:0] norm;
    logic        sub;
    logic signed [10:0] e;
    logic [23:0] mant;
    logic        guard, sticky, round_up;
    logic [24:0] mant_r;
    logic [26:0] lost;
    logic [4:0]  lz, sh;

    // Order operands by magnitude (exponent, then fraction).
    if ({a[30:0]} >= {b[30:0]}) begin
      hi   = fp32_fields_t'(a);
      lo = fp32_fields_t'(b);
    end else begin
      hi   = fp32_fields_t'(b);
      lo = fp32_fields_t'(a);
    end
    hi_zero   = (hi.exp == 8'd0);
    lo_zero = (lo.exp == 8'd0);
    hi_inf    = (hi.exp == FP32_EXP_MAX) && (hi.frac == '0);
    lo_inf  = (lo.exp == FP32_EXP_MAX) && (lo.frac == '0);
    hi_nan    = (hi.exp == FP32_EXP_MAX) && (hi.frac != '0);
    lo_nan  = (lo.exp == FP32_EXP_MAX) && (lo.frac != '0);
    sub        = hi.sign ^ lo.sign;

    // Align the smaller significand, folding shifted-out bits into the sticky bit.
    ediff = hi.exp - lo.exp;
    mb    = {1'b1, hi.frac, 3'b000};
    ms    = {1'b1, lo.frac, 3'b000};
    // a shift of 27 or more leaves only the sticky bit
    sh   = (ediff >= 8'd27) ? 5'd27 : ediff[4:0];
    lost = ms & ((27'd1 << sh) - 27'd1);
    ms   = (ms >> sh) | 27'(lost != '0);

    // one adder for both: subtraction adds the two's complement of ms
    sum = {1'b0, mb} + ({1'b0, ms} ^ {28{sub}}) + 28'(sub);
    e   = 11'(signed'({3'b0, hi.exp}));

    // leading zeros of sum[26:0]: priority encoder, the highest set bit wins
    lz = 5'd27;
    for (int k = 0; k <= 26; k++) begin
      if (sum[k]) lz = 5'(26 - k);
    end
    // carry out: one place right; otherwise lz places left
    norm = (sum[27] ? (sum[27:1] | 27'(sum[0])) : sum[26:0]) << (sum[27] ? 5'd0 : lz);
    e    = e + (sum[27] ? 11'sd1 : -11'(signed'({6'd0, lz})));

    mant     = norm[26:3];
    guard    = norm[2];
    sticky   = norm[1] | norm[0];
    round_up = guard && (sticky || mant[0]);
    mant_r   = {1'b0, mant} + 25'(round_up);
    e        = e + 11'(mant_r[24]);          // rounding carried into a new bit
    mant_r   = mant_r[24] ? (mant_r >> 1) : mant_r;

    if (hi_nan || lo_nan || (hi_inf && lo_inf && sub)) begin
      y_d = FP32_QNAN;
    end else if (hi_inf) begin
      y_d = {hi.sign, FP32_EXP_MAX, 23'd0};
    end else if (hi_zero) begin
      // both operands are zero (or subnormal, treated as zero)
      y_d = {hi.sign & lo.sign, 31'd0};
    end else if (lo_zero) begin
      y_d = {hi.sign, hi.exp, hi.frac};
    end else if (sum == '0) begin
      y_d = FP32_POS_ZERO;
    end else if (e <= 11'sd0) begin
      y_d = {hi.sign, 31'd0};
    end else if (e >= 11'sd255) begin
      y_d = {hi.sign, FP32_EXP_MAX, 23'd0};
    end else begin
      y_d = {hi.sign, e[7:0], mant_r[22:0]};
    end
  end

  always_ff @(posedge clk) begin
    if (en) y <= y_d;
  end

endmodule
