// tb_stencil_ctrl: drives the controller alone (I = 6, W = 3, LAT = 3) through
// three convolutions with random input gaps and random output stalls. Checks:
// exactly W*W coefficient loads, then I*I image shifts, then h*I + h padding
// shifts per convolution; exactly I*I outputs, the last one flagged; the border
// mask of every window against the (row, col) of its output; no input accepted
// while padding; and the output held while m_ready is low.
module tb_stencil_ctrl;
  import stencil_pkg::*;
  localparam int I   = 6;
  localparam int W   = 3;
  localparam int LAT = 3;
  localparam int H   = (W - 1) / 2;

  logic clk = 1'b0;
  logic rst, s_valid, s_ready, m_ready, m_valid, coef_load, shift, pad, adv, last_out;
  logic [W*W-1:0] mask;
  stencil_state_e state;
  int checks = 0, failures = 0;

  stencil_ctrl #(.I(I), .W(W), .LAT(LAT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W*W-1:0] exp_mask(input int n);
    logic [W*W-1:0] m;
    int r, c;
    r = n / I;
    c = n % I;
    for (int i = 0; i < W; i++)
      for (int j = 0; j < W; j++)
        m[i*W+j] = (r - H + i >= 0) && (r - H + i < I) && (c - H + j >= 0) && (c - H + j < I);
    return m;
  endfunction

  int n_coef, n_img, n_pad, n_out, n_last, n_win, n_acc;
  logic expect_mask_check;
  int   mask_n;

  initial begin
    s_valid = 0; m_ready = 0;
    rst = 1'b1;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int op = 0; op < 3; op++) begin
      n_coef = 0; n_img = 0; n_pad = 0; n_out = 0; n_last = 0; n_win = 0; n_acc = 0;
      expect_mask_check = 1'b0;
      while (n_out < I * I) begin
        @(negedge clk);
        // mask of the window formed by the previous cycle's shift
        if (expect_mask_check) begin
          checks++;
          if (mask !== exp_mask(mask_n)) begin
            failures++;
            $display("op %0d window %0d mask %b expected %b", op, mask_n, mask, exp_mask(mask_n));
          end
        end
        expect_mask_check = 1'b0;
        s_valid = (n_acc < W * W + I * I) && ($urandom_range(0, 3) != 0);
        m_ready = ($urandom_range(0, 3) != 0);
        #1;
        if (s_valid && s_ready) n_acc++;
        if (coef_load) n_coef++;
        if (shift && !pad) n_img++;
        if (shift && pad) n_pad++;
        if (pad && s_ready) begin failures++; $display("input accepted while padding"); end
        if (shift) begin
          int k;
          k = n_img + n_pad - 1;
          if (k >= H * I + H) begin
            expect_mask_check = 1'b1;
            mask_n = k - (H * I + H);
          end
        end
        if (m_valid && m_ready) begin
          n_out++;
          if (last_out) begin
            n_last++;
            checks++;
            if (n_out != I * I) begin failures++; $display("last flag on output %0d", n_out); end
          end
        end
        if (m_valid && !m_ready) begin
          @(posedge clk); #1;
          checks++;
          if (!m_valid) begin failures++; $display("output dropped while stalled"); end
        end
      end
      repeat (LAT + 2) begin
        @(negedge clk);
        s_valid = 1'b0;
        m_ready = 1'b1;
        #1;
        if (m_valid) begin failures++; $display("extra output"); end
      end
      checks += 4;
      if (n_coef != W * W)     begin failures++; $display("op %0d: %0d coefficient loads", op, n_coef); end
      if (n_img != I * I)      begin failures++; $display("op %0d: %0d image shifts", op, n_img); end
      if (n_pad != H * I + H)  begin failures++; $display("op %0d: %0d padding shifts", op, n_pad); end
      if (n_last != 1)         begin failures++; $display("op %0d: %0d last flags", op, n_last); end
      checks++;
      if (state != ST_COEF) begin failures++; $display("not back in the coefficient phase"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
