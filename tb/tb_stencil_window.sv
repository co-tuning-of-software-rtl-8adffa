// tb_stencil_window: streams a numbered sequence through a small line buffer
// (I = 8, W = 3) with random gaps and checks, after every shift k, that tap
// (dr, dc) holds element k - dr*I - dc: the W x W window of a row-major image.
module tb_stencil_window;
  import stencil_pkg::*;
  localparam int I = 8;
  localparam int W = 3;

  logic  clk = 1'b0;
  logic  rst, shift;
  fp32_t din;
  fp32_t win [W][W];
  int checks = 0, failures = 0;

  stencil_window #(.I(I), .W(W)) dut (.clk, .rst, .shift, .din, .win);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fp32_t elem(input int k);
    return 32'hA500_0000 + 32'(k);
  endfunction

  initial begin
    int k;
    shift = 1'b0; din = '0;
    rst = 1'b1;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    k = 0;
    while (k < 5 * I * I) begin
      @(negedge clk);
      shift = ($urandom_range(0, 4) != 0);
      din   = shift ? elem(k) : $urandom;
      @(negedge clk);
      if (shift) begin
        for (int dr = 0; dr < W; dr++) begin
          for (int dc = 0; dc < W; dc++) begin
            int idx;
            idx = k - dr * I - dc;
            if (idx >= 0) begin
              checks++;
              if (win[dr][dc] !== elem(idx)) begin
                failures++;
                if (failures < 10) $display("k=%0d tap[%0d][%0d]=%h expected %h", k, dr, dc, win[dr][dc], elem(idx));
              end
            end
          end
        end
        k++;
      end
      shift = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
