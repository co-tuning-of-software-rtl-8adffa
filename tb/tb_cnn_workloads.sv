// tb_cnn_workloads: the convolution layers of the two trial CNNs, one
// convolution of each layer type:
//  - image halving every layer: 7x7 on 256x256, 5x5 on 128x128 and 3x3 on
//    64x64, each on a build sized for that layer (its first layer, 9x9 on
//    512x512, is the full-size test), plus a 9x9 build for 32x32 images, the
//    smallest size of the standalone measurements;
//  - image constant: 7x7, 5x5 and 3x3 windows on 512x512 images, all on the
//    default 9x9 / 512 build through zero-padded coefficients (the 9x9 layer on
//    that build is the full-size test).
// How many convolutions a layer repeats only multiplies the run time, so one
// per layer type is run.
module tb_cnn_workloads;
  logic clk = 1'b0;
  logic rst;
  int c[5], f[5];
  logic d[5];

  always #5 clk = ~clk;

  accel_host_run #(.I(512), .W(9), .NOPS(3), .WSEQ({8'd3, 8'd5, 8'd7})) u_const (
    .clk, .rst, .checks(c[0]), .failures(f[0]), .done(d[0]));
  accel_host_run #(.I(256), .W(7), .NOPS(1), .WSEQ(32'd7)) u_l1 (.clk, .rst, .checks(c[1]), .failures(f[1]), .done(d[1]));
  accel_host_run #(.I(128), .W(5), .NOPS(1), .WSEQ(32'd5)) u_l2 (.clk, .rst, .checks(c[2]), .failures(f[2]), .done(d[2]));
  accel_host_run #(.I(64),  .W(3), .NOPS(1), .WSEQ(32'd3)) u_l3 (.clk, .rst, .checks(c[3]), .failures(f[3]), .done(d[3]));
  accel_host_run #(.I(32),  .W(9), .NOPS(1), .WSEQ(32'd9)) u_l0 (.clk, .rst, .checks(c[4]), .failures(f[4]), .done(d[4]));

  initial begin
    rst = 1'b1;
    repeat (3) @(negedge clk);
    rst = 1'b0;
  end

  function automatic int total(input int v[5]);
    int s = 0;
    foreach (v[k]) s += v[k];
    return s;
  endfunction

  initial begin
    fork
      begin
        @(negedge rst);
        wait (d[0] && d[1] && d[2] && d[3] && d[4]);
        $display("TB_RESULT checks=%0d failures=%0d", total(c), total(f));
      end
      begin
        repeat (1000000) @(posedge clk);
        $display("watchdog expired");
        $display("TB_RESULT checks=%0d failures=%0d", total(c), total(f) + 1);
      end
    join_any
    $finish;
  end
endmodule
