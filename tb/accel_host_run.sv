// accel_host_run: host model for one stencil_accel_top build of image side I
// and window side W. It runs NOPS convolutions back to back; convolution n uses
// a window of side WSEQ[8n+7:8n] (odd, at most W), sent as W x W coefficients
// with the smaller window centred and a ring of zeros around it. The host writes
// whenever the inbound FIFO has room and reads whenever the outbound FIFO has
// data. Every output is compared bit for bit with the reference W x W
// convolution of the padded coefficients, and, for an embedded window, to within
// rounding with the direct w x w convolution. Each convolution's results must
// stream out at one element per cycle.
module accel_host_run
  import stencil_pkg::*;
  import fp32_ref_pkg::*;
#(
  parameter int          I    = 64,
  parameter int          W    = 3,
  parameter int          NOPS = 1,
  parameter logic [31:0] WSEQ = 32'd3
) (
  input  logic clk,
  input  logic rst,
  output int   checks,
  output int   failures,
  output logic done
);
  logic  in_wr_en, in_full, out_rd_en, out_empty, image_done;
  fp32_t in_din, out_dout;
  logic [1:0] phase;

  stencil_accel_top #(.I(I), .W(W)) dut (.*);

  logic [31:0] img   [NOPS][];
  logic [31:0] coef  [NOPS][];
  logic [31:0] coefw [NOPS][];
  int cyc;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    for (int op = 0; op < NOPS; op++) begin
      int w, off;
      w   = int'(WSEQ[8*op +: 8]);
      off = (W - w) / 2;
      img[op]   = new[I * I];
      coef[op]  = new[W * W];
      coefw[op] = new[w * w];
      for (int n = 0; n < I * I; n++) img[op][n] = rand_val();
      for (int n = 0; n < w * w; n++) coefw[op][n] = rand_val();
      for (int i = 0; i < W; i++)
        for (int j = 0; j < W; j++)
          coef[op][i*W+j] = (i >= off && i < off + w && j >= off && j < off + w) ?
                            coefw[op][(i-off)*w + (j-off)] : 32'd0;
    end
    in_wr_en = 1'b0; in_din = '0;
    @(negedge rst);
    for (int op = 0; op < NOPS; op++) begin
      for (int n = 0; n < W * W + I * I; ) begin
        @(negedge clk);
        in_wr_en = 1'b0;
        if (!in_full) begin
          in_wr_en = 1'b1;
          in_din   = (n < W * W) ? coef[op][n] : img[op][n - W * W];
          n++;
        end
      end
    end
    @(negedge clk);
    in_wr_en = 1'b0;
  end

  initial begin
    checks = 0; failures = 0; done = 1'b0;
    out_rd_en = 1'b0;
    @(negedge rst);
    for (int op = 0; op < NOPS; op++) begin
      int   n_out, w, t_first, t_last;
      logic pending;
      w = int'(WSEQ[8*op +: 8]);
      n_out = 0;
      pending = 1'b0;
      while (n_out < I * I) begin
        @(negedge clk);
        if (pending) begin
          logic [31:0] e;
          int r, c;
          r = n_out / I;
          c = n_out % I;
          e = conv_point(img[op], coef[op], I, W, r, c);
          checks++;
          if (!same(out_dout, e)) begin
            failures++;
            if (failures < 10) $display("I=%0d W=%0d w=%0d out (%0d,%0d): %h expected %h", I, W, w, r, c, out_dout, e);
          end
          if (w < W) begin
            real a, b, tol;
            a   = to_real(out_dout);
            b   = to_real(conv_point(img[op], coefw[op], I, w, r, c));
            tol = 5e-4 + 1e-5 * (b < 0 ? -b : b);   // products reach 2^8; a few roundings of 2^-24 each
            checks++;
            if (a - b > tol || b - a > tol) begin
              failures++;
              if (failures < 10) $display("I=%0d w=%0d embedded (%0d,%0d): %f vs %f", I, w, r, c, a, b);
            end
          end
          if (n_out == 0) t_first = cyc;
          t_last = cyc;
          n_out++;
        end
        out_rd_en = !out_empty && (n_out < I * I);
        pending   = out_rd_en;
      end
      out_rd_en = 1'b0;
      checks++;
      if (t_last - t_first != I * I - 1) begin
        failures++;
        $display("I=%0d w=%0d: %0d outputs took %0d cycles", I, w, I * I, t_last - t_first + 1);
      end
      $display("I=%0d W=%0d window %0dx%0d: %0d outputs checked, %0d cycles from first to last", I, W, w, w, I * I, t_last - t_first + 1);
    end
    done = 1'b1;
  end
endmodule
