// fp32_ref_pkg: reference binary32 arithmetic for the testbenches.
//
// Operands are widened to double precision, combined exactly (a product of two
// 24-bit significands fits in 53 bits; for a sum, one rounding from double to
// single gives the correctly rounded single result), and rounded to binary32
// with round-to-nearest-even. Subnormal inputs and results are flushed to zero
// and NaN results are returned as the canonical quiet NaN, matching the
// accelerator's arithmetic conventions. Also holds a small random generator for
// well-scaled test operands and the reference 2D convolution.
package fp32_ref_pkg;

  localparam logic [31:0] QNAN = 32'h7FC0_0000;

  function automatic bit is_nan(input logic [31:0] x);
    return (x[30:23] == 8'hFF) && (x[22:0] != 0);
  endfunction

  function automatic real to_real(input logic [31:0] x);
    logic [63:0] d;
    if (x[30:23] == 8'd0) begin
      d = {x[31], 63'd0};
    end else if (x[30:23] == 8'hFF) begin
      d = {x[31], 11'h7FF, x[22:0], 29'd0};
    end else begin
      d = {x[31], 11'(x[30:23]) + 11'd896, x[22:0], 29'd0};
    end
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] from_real(input real r);
    logic [63:0] d;
    logic        s, g, st;
    int          e;
    logic [24:0] m;
    d = $realtobits(r);
    s = d[63];
    if (d[62:52] == 11'h7FF) return (d[51:0] != 0) ? QNAN : {s, 8'hFF, 23'd0};
    if (d[62:52] == 11'd0)   return {s, 31'd0};
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {2'b01, d[51:29]};
    g  = d[28];
    st = |d[27:0];
    if (g && (st || m[0])) m = m + 1;
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e <= 0)   return {s, 31'd0};
    if (e >= 255) return {s, 8'hFF, 23'd0};
    return {s, 8'(e), m[22:0]};
  endfunction

  function automatic logic [31:0] mul(input logic [31:0] a, input logic [31:0] b);
    if (is_nan(a) || is_nan(b)) return QNAN;
    return from_real(to_real(a) * to_real(b));
  endfunction

  function automatic logic [31:0] add(input logic [31:0] a, input logic [31:0] b);
    if (is_nan(a) || is_nan(b)) return QNAN;
    return from_real(to_real(a) + to_real(b));
  endfunction

  // Result equality with every NaN treated as equal.
  function automatic bit same(input logic [31:0] x, input logic [31:0] y);
    if (is_nan(x) && is_nan(y)) return 1'b1;
    return x == y;
  endfunction

  // Random binary32 value of magnitude around 2^-4 .. 2^4 and either sign.
  function automatic logic [31:0] rand_val();
    logic [31:0] r;
    r = $urandom;
    return {r[31], 8'(123 + (r[30:28])), r[22:0]};
  endfunction

  // Pairwise tree sum in the order the hardware tree uses: operands 2k and 2k+1
  // are added at each level, an odd last operand passes through unchanged.
  function automatic logic [31:0] tree_sum(input logic [31:0] v[]);
    logic [31:0] cur[];
    logic [31:0] nxt[];
    cur = v;
    while (cur.size() > 1) begin
      nxt = new[(cur.size() + 1) / 2];
      for (int k = 0; k < nxt.size(); k++) begin
        if (2 * k + 1 < cur.size()) nxt[k] = add(cur[2*k], cur[2*k+1]);
        else                        nxt[k] = cur[2*k];
      end
      cur = nxt;
    end
    return cur[0];
  endfunction

  // Reference "same"-size 2D convolution of an n x n image with a w x w window
  // centred on each output element; window positions outside the image count as
  // zero (their products are +/-0). coef[i*w+j] multiplies image[r-h+i][c-h+j].
  function automatic logic [31:0] conv_point(input logic [31:0] img[], input logic [31:0] coef[],
                                             input int n, input int w, input int r, input int c);
    logic [31:0] p[];
    int h;
    h = (w - 1) / 2;
    p = new[w * w];
    for (int i = 0; i < w; i++) begin
      for (int j = 0; j < w; j++) begin
        int rr, cc;
        rr = r - h + i;
        cc = c - h + j;
        if (rr >= 0 && rr < n && cc >= 0 && cc < n) p[i*w+j] = mul(img[rr*n+cc], coef[i*w+j]);
        else                                      p[i*w+j] = mul(32'd0, coef[i*w+j]);
      end
    end
    return tree_sum(p);
  endfunction

endpackage
