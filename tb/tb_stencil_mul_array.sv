// tb_stencil_mul_array: random windows, coefficients and masks through N = 9
// lanes. Each lane must give pixel * coefficient (binary32, reference model),
// or +0 * coefficient where the mask bit is low, one enabled cycle later.
module tb_stencil_mul_array;
  import stencil_pkg::*;
  import fp32_ref_pkg::*;
  localparam int N = 9;

  logic         clk = 1'b0;
  logic         en;
  fp32_t        pix  [N];
  fp32_t        coef [N];
  logic [N-1:0] mask;
  fp32_t        prod [N];
  int checks = 0, failures = 0;

  stencil_mul_array #(.N(N)) dut (.clk, .en, .pix, .coef, .mask, .prod);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fp32_t expv [N];
    en = 1'b0; mask = '0;
    for (int n = 0; n < N; n++) begin pix[n] = '0; coef[n] = '0; end
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      mask = N'($urandom);
      for (int n = 0; n < N; n++) begin
        pix[n]  = rand_val();
        coef[n] = rand_val();
        expv[n] = mask[n] ? mul(pix[n], coef[n]) : mul(32'd0, coef[n]);
      end
      en = 1'b1;
      @(negedge clk);
      en = 1'b0;
      for (int n = 0; n < N; n++) begin
        checks++;
        if (!same(prod[n], expv[n])) begin
          failures++;
          if (failures < 10) $display("lane %0d: %h expected %h", n, prod[n], expv[n]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
