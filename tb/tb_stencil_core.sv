// tb_stencil_core: end-to-end convolutions through the stencil datapath at
// reduced sizes: a 3x3 window on an 8x8 image without stalls (exact cycle
// timing), a 5x5 window on a 12x12 image with random input gaps and output
// back-pressure, and a 9x9 window (the default window) on a 16x16 image.
module tb_stencil_core;
  logic clk = 1'b0;
  logic rst;
  int c0, f0, c1, f1, c2, f2;
  logic d0, d1, d2;

  always #5 clk = ~clk;

  stencil_core_check #(.I(8),  .W(3), .STALL(1'b0), .NOPS(3)) u0 (.clk, .rst, .checks(c0), .failures(f0), .done(d0));
  stencil_core_check #(.I(12), .W(5), .STALL(1'b1), .NOPS(2)) u1 (.clk, .rst, .checks(c1), .failures(f1), .done(d1));
  stencil_core_check #(.I(16), .W(9), .STALL(1'b0), .NOPS(2)) u2 (.clk, .rst, .checks(c2), .failures(f2), .done(d2));

  initial begin
    rst = 1'b1;
    repeat (3) @(negedge clk);
    rst = 1'b0;
  end

  initial begin
    fork
      begin
        wait (d0 && d1 && d2);
        $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2);
      end
      begin
        repeat (20000) @(posedge clk);
        $display("watchdog expired");
        $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
      end
    join_any
    $finish;
  end
endmodule
