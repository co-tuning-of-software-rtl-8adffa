// tb_stencil_accel_full: one complete convolution at the accelerator's default
// size, a 9x9 window over a 512x512 binary32 image, with the host writing and
// reading at full speed. Every one of the 262144 output elements is compared
// with the reference convolution, and the run must take one cycle per element:
// the last result leaves W*W + I*I + h*I + h + 1 + LAT cycles after the first
// coefficient enters the core, give or take the FIFO latencies (4 cycles).
module tb_stencil_accel_full;
  import stencil_pkg::*;
  import fp32_ref_pkg::*;
  localparam int I = 512;
  localparam int W = 9;
  localparam int H = (W - 1) / 2;
  localparam int LAT = 1 + tree_levels(W * W);

  logic  clk = 1'b0;
  logic  rst, in_wr_en, in_full, out_rd_en, out_empty, image_done;
  fp32_t in_din, out_dout;
  logic [1:0] phase;
  int checks = 0, failures = 0;
  int cyc = 0;

  stencil_accel_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] img [];
  logic [31:0] coef [];
  int t_start, t_done;

  initial begin
    img  = new[I * I];
    coef = new[W * W];
    for (int n = 0; n < I * I; n++) img[n] = rand_val();
    for (int n = 0; n < W * W; n++) coef[n] = rand_val();
    in_wr_en = 1'b0; in_din = '0;
    @(negedge rst);
    for (int n = 0; n < W * W + I * I; ) begin
      @(negedge clk);
      in_wr_en = 1'b0;
      if (!in_full) begin
        in_wr_en = 1'b1;
        in_din   = (n < W * W) ? coef[n] : img[n - W * W];
        if (n == 0) t_start = cyc;
        n++;
      end
    end
    @(negedge clk);
    in_wr_en = 1'b0;
  end

  always @(posedge clk) if (image_done) t_done = cyc;

  initial begin
    int   n_out;
    logic pending;
    out_rd_en = 1'b0;
    rst = 1'b1;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    n_out = 0;
    pending = 1'b0;
    while (n_out < I * I) begin
      @(negedge clk);
      if (pending) begin
        logic [31:0] e;
        e = conv_point(img, coef, I, W, n_out / I, n_out % I);
        checks++;
        if (!same(out_dout, e)) begin
          failures++;
          if (failures < 10) $display("out %0d: %h expected %h", n_out, out_dout, e);
        end
        n_out++;
      end
      out_rd_en = !out_empty && (n_out < I * I);
      pending   = out_rd_en;
    end
    out_rd_en = 1'b0;
    checks++;
    begin
      int expected;
      expected = W * W + I * I + H * I + H + 1 + LAT;
      $display("first coefficient to last result: %0d cycles (pipeline minimum %0d)", t_done - t_start, expected);
      if (t_done - t_start < expected || t_done - t_start > expected + 4) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
