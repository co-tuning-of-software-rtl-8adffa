// tb_stream_fifo: random writes and reads against a queue model, for the
// standard-read (data one cycle after rd_en) and first-word-fall-through forms
// of an 8-deep FIFO. Checks data order, full and empty flags, and that both
// flags are reached.
module tb_stream_fifo;
  logic clk = 1'b0;
  logic rst;
  int checks = 0, failures = 0;
  int saw_full = 0, saw_empty = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic        wr_s, rd_s, full_s, empty_s, wr_f, rd_f, full_f, empty_f;
  logic [31:0] din_s, dout_s, din_f, dout_f;

  stream_fifo #(.WIDTH(32), .DEPTH(8), .FWFT(1'b0)) dut_s (
    .clk, .rst, .wr_en(wr_s), .din(din_s), .full(full_s), .rd_en(rd_s), .dout(dout_s), .empty(empty_s));
  stream_fifo #(.WIDTH(32), .DEPTH(8), .FWFT(1'b1)) dut_f (
    .clk, .rst, .wr_en(wr_f), .din(din_f), .full(full_f), .rd_en(rd_f), .dout(dout_f), .empty(empty_f));

  task automatic run(input bit fwft, input int n);
    logic [31:0] q[$];
    logic [31:0] expect_std;
    logic        pending;
    pending = 1'b0;
    for (int t = 0; t < n; t++) begin
      logic w, r, f, e;
      logic [31:0] d;
      @(negedge clk);
      // the flags must agree with the model
      f = fwft ? full_f : full_s;
      e = fwft ? empty_f : empty_s;
      checks++;
      if (f !== (q.size() == 8) || e !== (q.size() == 0)) begin
        failures++;
        $display("flags full=%b empty=%b with %0d words", f, e, q.size());
      end
      if (f) saw_full++;
      if (e) saw_empty++;
      // standard mode: data of last cycle's read
      if (!fwft && pending) begin
        checks++;
        if (dout_s !== expect_std) begin failures++; $display("std dout %h expected %h", dout_s, expect_std); end
      end
      if (fwft && !e) begin
        checks++;
        if (dout_f !== q[0]) begin failures++; $display("fwft dout %h expected %h", dout_f, q[0]); end
      end
      // phases of mostly-writing and mostly-reading reach both flags
      w = !f && ($urandom_range(0, 99) < (((t / 40) % 2) ? 25 : 75));
      r = !e && ($urandom_range(0, 99) < (((t / 40) % 2) ? 75 : 25));
      d = $urandom;
      pending = r;
      if (r) expect_std = q.pop_front();
      if (w) q.push_back(d);
      if (fwft) begin wr_f = w; rd_f = r; din_f = d; end
      else      begin wr_s = w; rd_s = r; din_s = d; end
    end
    @(negedge clk);
    wr_s = 0; rd_s = 0; wr_f = 0; rd_f = 0;
  endtask

  initial begin
    wr_s = 0; rd_s = 0; wr_f = 0; rd_f = 0; din_s = 0; din_f = 0;
    rst = 1'b1;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    run(1'b0, 3000);
    run(1'b1, 3000);
    checks++;
    if (saw_full == 0 || saw_empty == 0) begin
      failures++;
      $display("full seen %0d times, empty seen %0d times", saw_full, saw_empty);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
