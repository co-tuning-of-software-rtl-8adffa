// stencil_core_check: test driver for one stencil_core instance. It runs NOPS
// convolutions of random binary32 images and coefficients, compares every output
// element with the reference convolution (window centred on the element, terms
// outside the image omitted, products summed pairwise in the hardware order) and,
// without stalls, checks that the first and last outputs of each convolution
// leave at the cycles the pipeline depth gives: first after W*W coefficient
// cycles + h*I + h line-buffer shifts + 1 line-buffer register + LAT (multiplier
// and adder-tree stages), then one per cycle. With STALL set
// it inserts random input gaps and output back-pressure instead.
module stencil_core_check
  import stencil_pkg::*;
  import fp32_ref_pkg::*;
#(
  parameter int I     = 8,
  parameter int W     = 3,
  parameter bit STALL = 1'b0,
  parameter int NOPS  = 2
) (
  input  logic clk,
  input  logic rst,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int H   = (W - 1) / 2;
  localparam int LAT = 1 + tree_levels(W * W);

  logic  s_valid, s_ready, m_valid, m_ready, m_last;
  fp32_t s_data, m_data;
  stencil_state_e state;

  stencil_core #(.I(I), .W(W)) dut (.clk, .rst, .s_valid, .s_ready, .s_data,
                                    .m_valid, .m_ready, .m_data, .m_last, .state);

  logic [31:0] img [];
  logic [31:0] coef [];
  logic [31:0] words [$];
  int cyc;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    checks = 0; failures = 0; done = 1'b0;
    s_valid = 1'b0; s_data = '0; m_ready = 1'b0;
    @(negedge rst);
    for (int op = 0; op < NOPS; op++) begin
      int n_in, n_out, t0, t_first, t_last;
      img  = new[I * I];
      coef = new[W * W];
      words.delete();
      for (int n = 0; n < W * W; n++) begin coef[n] = rand_val(); words.push_back(coef[n]); end
      for (int n = 0; n < I * I; n++) begin img[n]  = rand_val(); words.push_back(img[n]);  end
      n_in = 0; n_out = 0; t0 = -1; t_first = -1; t_last = -1;
      while (n_out < I * I) begin
        @(negedge clk);
        s_valid = (n_in < words.size()) && (!STALL || $urandom_range(0, 3) != 0);
        s_data  = s_valid ? words[n_in] : $urandom;
        m_ready = !STALL || ($urandom_range(0, 2) != 0);
        @(posedge clk);
        if (s_valid && s_ready) begin
          if (n_in == 0) t0 = cyc;
          n_in++;
        end
        if (m_valid && m_ready) begin
          logic [31:0] e;
          e = conv_point(img, coef, I, W, n_out / I, n_out % I);
          checks++;
          if (!same(m_data, e)) begin
            failures++;
            if (failures < 10) $display("I=%0d W=%0d op %0d out %0d: %h expected %h", I, W, op, n_out, m_data, e);
          end
          if (n_out == 0) t_first = cyc;
          if (m_last) t_last = cyc;
          n_out++;
        end
      end
      checks++;
      if (t_last < 0) begin failures++; $display("I=%0d W=%0d: last output not flagged", I, W); end
      if (!STALL) begin
        checks += 2;
        if (t_first - t0 != W * W + H * I + H + 1 + LAT) begin
          failures++;
          $display("I=%0d W=%0d: first output after %0d cycles, expected %0d", I, W, t_first - t0, W * W + H * I + H + 1 + LAT);
        end
        if (t_last - t_first != I * I - 1) begin
          failures++;
          $display("I=%0d W=%0d: %0d cycles between first and last output", I, W, t_last - t_first);
        end
      end
      @(negedge clk);
      s_valid = 1'b0;
    end
    done = 1'b1;
  end
endmodule
