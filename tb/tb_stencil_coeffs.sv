// tb_stencil_coeffs: loads two sets of W*W = 9 coefficients with random gaps
// and checks that coef[n] is word n of the set just loaded, and that the set is
// held while load is low.
module tb_stencil_coeffs;
  import stencil_pkg::*;
  localparam int W = 3;

  logic  clk = 1'b0;
  logic  load;
  fp32_t din;
  fp32_t coef [W*W];
  int checks = 0, failures = 0;

  stencil_coeffs #(.W(W)) dut (.clk, .load, .din, .coef);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fp32_t set [W*W];
    load = 1'b0; din = '0;
    for (int rep = 0; rep < 4; rep++) begin
      for (int n = 0; n < W * W; n++) set[n] = $urandom;
      for (int n = 0; n < W * W; n++) begin
        @(negedge clk);
        load = 1'b0;
        din  = $urandom;
        repeat ($urandom_range(0, 2)) @(negedge clk);
        load = 1'b1;
        din  = set[n];
      end
      @(negedge clk);
      load = 1'b0;
      din  = $urandom;
      repeat (3) @(negedge clk);
      for (int n = 0; n < W * W; n++) begin
        checks++;
        if (coef[n] !== set[n]) begin
          failures++;
          $display("set %0d coef[%0d]=%h expected %h", rep, n, coef[n], set[n]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
