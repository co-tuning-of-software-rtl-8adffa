// row_shift_reg: the long shift register that links one row of window taps to
// the next row of the stencil line buffer.
//
// It behaves as a LEN-stage shift register: after each enabled cycle (a
// "shift") dout holds the value that was presented on din LEN shifts earlier
// counting the current one as 1, i.e. dout(k) = din(k-LEN+1). It is built as a
// circular buffer of LEN-1 words plus an output register, so an FPGA tool can
// map it onto block RAM (read-before-write of one address per shift) instead of
// LEN*WIDTH flip-flops. The document draws it as a plain shift register; the
// circular-buffer form is this design's choice and behaves identically.
//
// Interface: din is sampled and dout updated when en is high. Synchronous
// active-high reset clears only the write pointer: the contents are image data,
// and the stencil masks every position that has not been filled in the current
// image. LEN must be at least 2.
module row_shift_reg #(
  parameter int unsigned LEN   = 503,   // I - W at the default I = 512, W = 9
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  localparam int unsigned DEPTH = LEN - 1;
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    ptr;

  always_ff @(posedge clk) begin
    if (en) begin
      dout     <= mem[ptr];
      mem[ptr] <= din;
    end
  end

  always_ff @(posedge clk) begin
    if (rst)     ptr <= '0;
    else if (en) ptr <= (ptr == AW'(DEPTH - 1)) ? '0 : ptr + AW'(1);
  end

endmodule
