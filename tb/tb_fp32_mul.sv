// tb_fp32_mul: checks the binary32 multiplier against double-precision
// reference arithmetic: random operands over a wide exponent range, random bit
// patterns, and the special cases (zeros, infinities, NaN, overflow, underflow).
// Each product must appear exactly one enabled cycle after its operands.
module tb_fp32_mul;
  import fp32_ref_pkg::*;

  logic        clk = 1'b0;
  logic        en;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  fp32_mul dut (.clk(clk), .en(en), .a(a), .b(b), .y(y));

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
    exp_y = mul(x, z);
    @(negedge clk);
    a = x; b = z; en = 1'b1;
    @(negedge clk);
    en = 1'b0;
    checks++;
    if (!same(y, exp_y)) begin
      failures++;
      if (failures < 10) $display("MUL FAIL %h * %h = %h expected %h", x, z, y, exp_y);
    end
  endtask

  initial begin
    logic [31:0] hold;
    en = 1'b0; a = '0; b = '0;
    // special values
    check(32'h3F80_0000, 32'h4000_0000);   // 1*2
    check(32'h0000_0000, 32'hC120_0000);   // 0*-10 = -0
    check(32'h7F80_0000, 32'h4000_0000);   // inf*2
    check(32'h7F80_0000, 32'h0000_0000);   // inf*0 = NaN
    check(32'h7FC0_0001, 32'h3F80_0000);   // NaN
    check(32'h7F00_0000, 32'h7F00_0000);   // overflow
    check(32'h0080_0000, 32'h3E80_0000);   // underflow to zero
    check(32'h0000_0001, 32'h7F00_0000);   // subnormal input flushed
    check(32'h3F80_0001, 32'h3F7F_FFFF);   // rounding
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
