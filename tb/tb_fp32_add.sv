// tb_fp32_add: checks the binary32 adder against double-precision
// reference arithmetic: random operands over a wide exponent range, random bit
// patterns, and the special cases (zeros, infinities, NaN, overflow, underflow).
// Each sum must appear exactly one enabled cycle after its operands.
module tb_fp32_add;
  import fp32_ref_pkg::*;

  logic        clk = 1'b0;
  logic        en;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  fp32_add dut (.clk(clk), .en(en), .a(a), .b(b), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] x, input logic [31:0] z);
    logic [31:0] exp_y;
    exp_y = add(x, z);
    @(negedge clk);
    a = x; b = z; en = 1'b1;
    @(negedge clk);
    en = 1'b0;
    checks++;
    if (!same(y, exp_y)) begin
      failures++;
      if (failures < 10) $display("ADD FAIL %h + %h = %h expected %h", x, z, y, exp_y);
    end
  endtask

  initial begin
    logic [31:0] hold;
    en = 1'b0; a = '0; b = '0;
    // special values
    check(32'h3F80_0000, 32'h4000_0000);   // 1+2
    check(32'h3F80_0000, 32'hBF80_0000);   // x-x = +0
    check(32'h8000_0000, 32'h8000_0000);   // -0 + -0 = -0
    check(32'h7F80_0000, 32'hFF80_0000);   // inf-inf = NaN
    check(32'h7F80_0000, 32'h4000_0000);   // inf+2
    check(32'h7FC0_0001, 32'h3F80_0000);   // NaN
    check(32'h7F7F_FFFF, 32'h7F7F_FFFF);   // overflow
    check(32'h0080_0001, 32'h8080_0000);   // cancels to subnormal -> 0
    check(32'h4B80_0000, 32'h3F80_0000);   // 2^24 + 1, tie to even
    check(32'h4B80_0000, 32'h3F80_0001);   // just above the tie
    check(32'h3F80_0000, 32'hB380_0000);   // 1 - 2^-24
    check(32'h4000_0000, 32'h0000_0005);   // subnormal input flushed
    for (int k = 0; k < 20000; k++) begin
      logic [31:0] x;
      x = rand_val();
      check(x, {~x[31], x[30:0]} ^ 32'($urandom_range(0, 3)));   // near cancellation
    end
    for (int k = 0; k < 20000; k++) check(rand_val(), rand_val());
    for (int k = 0; k < 20000; k++) check($urandom, $urandom);
    // result must hold while en is low
    hold = y;
    @(negedge clk); a = 32'h4040_0000; b = 32'h4040_0000;
    @(negedge clk);
    checks++;
    if (y !== hold) begin failures++; $display("output changed without en"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
