// stencil_pkg: types and constants shared by the streaming 2D stencil accelerator.
//
// Every datum in the accelerator is an IEEE-754 single-precision (binary32) word,
// because the accelerator must give the same results as a software convolution on
// float arrays. The arithmetic units follow binary32 with round-to-nearest-even;
// subnormal inputs and results are flushed to zero, and every NaN result is the
// canonical quiet NaN. Those two simplifications are this design's own choice.
package stencil_pkg;

  typedef logic [31:0] fp32_t;

  // Fields of a binary32 word.
  typedef struct packed {
    logic        sign;
    logic [7:0]  exp;
    logic [22:0] frac;
  } fp32_fields_t;

  localparam fp32_t FP32_QNAN     = 32'h7FC0_0000;
  localparam fp32_t FP32_POS_ZERO = 32'h0000_0000;
  localparam logic [7:0] FP32_EXP_MAX = 8'hFF;

  // Phase of the stencil controller for one convolution.
  typedef enum logic [1:0] {
    ST_COEF  = 2'd0,   // receiving the W*W coefficients
    ST_IMAGE = 2'd1,   // receiving the I*I image elements
    ST_FLUSH = 2'd2    // shifting in padding until the last outputs are formed
  } stencil_state_e;

  // Number of pipeline levels of a pairwise reduction tree over n operands.
  function automatic int tree_levels(input int n);
    int l = 0;
    int m = n;
    while (m > 1) begin
      m = (m + 1) / 2;
      l++;
    end
    return l;
  endfunction

  // Operands left at level lvl of a pairwise reduction tree over n operands.
  function automatic int tree_width(input int n, input int lvl);
    int m = n;
    for (int k = 0; k < lvl; k++) m = (m + 1) / 2;
    return m;
  endfunction

endpackage
