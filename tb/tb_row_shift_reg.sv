// tb_row_shift_reg: the row delay must behave as a LEN-stage shift register:
// after the n-th enabled cycle dout is the word presented LEN-1 enabled cycles
// earlier, and nothing moves while en is low. Checked at two lengths with a
// random enable pattern, across several wraps of the circular buffer.
module tb_row_shift_reg;
  logic clk = 1'b0;
  logic rst;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic        en_a, en_b;
  logic [31:0] din_a, din_b, dout_a, dout_b;

  row_shift_reg #(.LEN(7),  .WIDTH(32)) dut_a (.clk, .rst, .en(en_a), .din(din_a), .dout(dout_a));
  row_shift_reg #(.LEN(2),  .WIDTH(32)) dut_b (.clk, .rst, .en(en_b), .din(din_b), .dout(dout_b));

  task automatic run(input int len, input int n, ref logic en, ref logic [31:0] din,
                     ref logic [31:0] dout);
    logic [31:0] hist[$];
    int shifts = 0;
    for (int t = 0; t < n; t++) begin
      @(negedge clk);
      en  = ($urandom_range(0, 3) != 0);
      din = $urandom;
      if (en) hist.push_back(din);
      @(negedge clk);
      if (en) begin
        shifts++;
        if (shifts >= len) begin
          checks++;
          if (dout !== hist[shifts - len]) begin
            failures++;
            if (failures < 10) $display("LEN %0d shift %0d: dout %h expected %h", len, shifts, dout, hist[shifts-len]);
          end
        end
      end
      en = 1'b0;
      // held while disabled
      begin
        logic [31:0] keep;
        keep = dout;
        @(negedge clk);
        checks++;
        if (dout !== keep) failures++;
      end
    end
  endtask

  initial begin
    en_a = 0; en_b = 0; din_a = 0; din_b = 0;
    rst = 1'b1;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    run(7, 400, en_a, din_a, dout_a);
    run(2, 200, en_b, din_b, dout_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
