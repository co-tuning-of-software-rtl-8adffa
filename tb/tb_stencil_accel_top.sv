// tb_stencil_accel_top: the whole accelerator between its two stream FIFOs, at
// reduced size (I = 16, W = 5, 16-word FIFOs), driven the way the host link
// drives it: the host writes coefficients and image into the inbound FIFO
// whenever it is not full and reads results from the outbound FIFO (data one
// cycle after rd_en). Four convolutions run back to back:
//   op 0 - full 5x5 window, host writes and reads at full speed;
//   op 1 - 3x3 coefficients embedded in the 5x5 window (zero ring), compared
//          exactly with the zero-padded window and, to rounding, with a true 3x3;
//   op 2 - host writes slowly, so the accelerator runs out of input;
//   op 3 - host stops reading for long stretches, so the outbound FIFO fills
//          and stalls the pipeline, and the inbound FIFO then fills as well.
// Every output element is compared with the reference convolution. Each
// mechanism (three phases, border windows, input starvation, output
// back-pressure, inbound FIFO full, embedded window, image_done) is counted and
// a failure is counted for any that never happened.
module tb_stencil_accel_top;
  import stencil_pkg::*;
  import fp32_ref_pkg::*;
  localparam int I = 16;
  localparam int W = 5;
  localparam int H = (W - 1) / 2;
  localparam int NOPS = 4;

  logic  clk = 1'b0;
  logic  rst, in_wr_en, in_full, out_rd_en, out_empty, image_done;
  fp32_t in_din, out_dout;
  logic [1:0] phase;
  int checks = 0, failures = 0;

  stencil_accel_top #(.I(I), .W(W), .FIFO_DEPTH(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_phase_coef, n_phase_image, n_phase_pad, n_border, n_starve, n_backpressure,
      n_in_full, n_embedded, n_done;
  int op_now;   // operation the host is currently reading

  always @(posedge clk) begin
    if (!rst) begin
      if (phase == 2'(ST_COEF))  n_phase_coef++;
      if (phase == 2'(ST_IMAGE)) n_phase_image++;
      if (phase == 2'(ST_FLUSH)) n_phase_pad++;
      if (phase == 2'(ST_IMAGE) && dut.in_empty) n_starve++;
      if (dut.m_valid && dut.out_full) n_backpressure++;
      if (in_full) n_in_full++;
      if (image_done) n_done++;
    end
  end

  logic [31:0] img  [NOPS][];
  logic [31:0] coef [NOPS][];
  logic [31:0] coef3 [];

  // Host writer
  initial begin
    in_wr_en = 1'b0; in_din = '0;
    for (int op = 0; op < NOPS; op++) begin
      img[op]  = new[I * I];
      coef[op] = new[W * W];
      for (int n = 0; n < I * I; n++) img[op][n] = rand_val();
      if (op == 1) begin
        coef3 = new[9];
        for (int n = 0; n < 9; n++) coef3[n] = rand_val();
        for (int i = 0; i < W; i++)
          for (int j = 0; j < W; j++)
            coef[op][i*W+j] = (i >= 1 && i <= 3 && j >= 1 && j <= 3) ? coef3[(i-1)*3 + (j-1)] : 32'd0;
      end else begin
        for (int n = 0; n < W * W; n++) coef[op][n] = rand_val();
      end
    end
    @(negedge rst);
    for (int op = 0; op < NOPS; op++) begin
      int n;
      n = 0;
      while (n < W * W + I * I) begin
        @(negedge clk);
        in_wr_en = 1'b0;
        if (op == 2 && $urandom_range(0, 3) != 0) continue;
        if (!in_full) begin
          in_wr_en = 1'b1;
          in_din   = (n < W * W) ? coef[op][n] : img[op][n - W * W];
          n++;
        end
      end
      @(negedge clk);
      in_wr_en = 1'b0;
    end
  end

  // Host reader
  initial begin
    int  n_out;
    logic pending;
    out_rd_en = 1'b0;
    rst = 1'b1;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int op = 0; op < NOPS; op++) begin
      op_now = op;
      n_out = 0;
      pending = 1'b0;
      while (n_out < I * I) begin
        @(negedge clk);
        if (pending) begin
          logic [31:0] e;
          int r, c;
          r = n_out / I;
          c = n_out % I;
          e = conv_point(img[op], coef[op], I, W, r, c);
          checks++;
          if (!same(out_dout, e)) begin
            failures++;
            if (failures < 10) $display("op %0d out (%0d,%0d): %h expected %h", op, r, c, out_dout, e);
          end
          if (r < H || r >= I - H || c < H || c >= I - H) n_border++;
          if (op == 1) begin
            real a, b;
            a = to_real(out_dout);
            b = to_real(conv_point(img[op], coef3, I, 3, r, c));
            checks++;
            // same terms, different summation order: a few roundings of products up to 2^8
            if ((a - b) > 5e-4 + 1e-5 * (b < 0 ? -b : b) || (b - a) > 5e-4 + 1e-5 * (b < 0 ? -b : b)) begin
              failures++;
              $display("embedded 3x3 at (%0d,%0d): %f vs %f", r, c, a, b);
            end else begin
              n_embedded++;
            end
          end
          n_out++;
        end
        pending   = 1'b0;
        out_rd_en = 1'b0;
        if (n_out >= I * I) break;
        if (op == 3 && ((n_out / 40) % 2 == 0) && $urandom_range(0, 7) != 0) continue;
        if (!out_empty) begin
          out_rd_en = 1'b1;
          pending   = 1'b1;
        end
      end
      out_rd_en = 1'b0;
    end
    repeat (5) @(negedge clk);
    checks += 10;
    if (n_phase_coef == 0)   begin failures++; $display("coefficient phase never seen"); end
    if (n_phase_image == 0)  begin failures++; $display("image phase never seen"); end
    if (n_phase_pad == 0)    begin failures++; $display("padding phase never seen"); end
    if (n_border == 0)       begin failures++; $display("no border output checked"); end
    if (n_starve == 0)       begin failures++; $display("input starvation never happened"); end
    if (n_backpressure == 0) begin failures++; $display("output back-pressure never happened"); end
    if (n_in_full == 0)      begin failures++; $display("inbound FIFO never full"); end
    if (n_embedded == 0)     begin failures++; $display("embedded window never checked"); end
    if (n_done != NOPS)      begin failures++; $display("image_done pulsed %0d times", n_done); end
    if (!out_empty)          begin failures++; $display("extra output words"); end
    $display("mechanisms: coef-phase cycles %0d, image-phase cycles %0d, padding cycles %0d, border outputs %0d, starved cycles %0d, back-pressure cycles %0d, inbound-full cycles %0d, embedded-window outputs %0d, images done %0d",
             n_phase_coef, n_phase_image, n_phase_pad, n_border, n_starve, n_backpressure, n_in_full, n_embedded, n_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
