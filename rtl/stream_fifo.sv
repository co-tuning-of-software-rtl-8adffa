// stream_fifo: synchronous FIFO terminating one host data stream.
//
// The host-link core writes inbound data into one of these and reads outbound
// data from another; the accelerator uses the other side. The write side has
// wr_en / din / full; the read side has rd_en / dout / empty, the signal set of
// a generic FPGA FIFO as the host-link core expects it. With FWFT = 0 (standard
// mode, for a consumer that expects it) dout is registered and shows the word
// the cycle after rd_en; with FWFT = 1 dout always shows the head word and
// rd_en removes it, which is what a valid/ready consumer needs. The document
// names the FIFOs and their signals; depth, both read modes and the
// synchronous reset are this design's choices.
//
// DEPTH must be a power of two. Writing when full or reading when empty is a
// protocol error (asserted) and is ignored.
module stream_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 512,
  parameter bit          FWFT  = 1'b0
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] din,
  output logic             full,
  input  logic             rd_en,
  output logic [WIDTH-1:0] dout,
  output logic             empty
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr, rptr;
  logic             do_wr, do_rd;

  assign full  = (wptr[AW] != rptr[AW]) && (wptr[AW-1:0] == rptr[AW-1:0]);
  assign empty = (wptr == rptr);
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr[AW-1:0]] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
    end
  end

  if (FWFT) begin : g_fwft
    assign dout = mem[rptr[AW-1:0]];
  end else begin : g_std
    logic [WIDTH-1:0] dout_q;
    always_ff @(posedge clk) begin
      if (do_rd) dout_q <= mem[rptr[AW-1:0]];
    end
    assign dout = dout_q;
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (rst) !(wr_en && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) !(rd_en && empty));

endmodule
