// stencil_accel_top: programmable-logic side of the streaming 2D stencil
// accelerator.
//
// The host streams each convolution's W*W coefficients and then its I*I image
// (binary32, row-major) into the inbound FIFO and reads the I*I result image
// from the outbound FIFO. Between them stencil_core computes the convolution at
// one element per cycle. The two FIFO sides that face the host-link IP core
// (which carries the streams over the SoC bus and is not part of this design)
// are the top-level ports, with the signal names of that interface. The
// structure follows the document; FIFO depth and the FIFO read mode toward the
// accelerator are this design's choices.
//
// Ports: in_wr_en / in_din / in_full write the inbound stream; out_rd_en /
// out_dout / out_empty read the outbound stream (out_dout valid the cycle after
// out_rd_en). phase and image_done are status outputs for the host-side logic.
// Synchronous active-high reset.
module stencil_accel_top
  import stencil_pkg::*;
#(
  parameter int unsigned I          = 512,
  parameter int unsigned W          = 9,
  parameter int unsigned FIFO_DEPTH = 512
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  in_wr_en,
  input  fp32_t in_din,
  output logic  in_full,
  input  logic  out_rd_en,
  output fp32_t out_dout,
  output logic  out_empty,
  output logic [1:0] phase,        // stencil_state_e of the core: 0 coefficients, 1 image, 2 padding
  output logic  image_done         // the last element of a result image enters the outbound FIFO
);

  logic  in_empty, in_rd_en, out_full, out_wr_en;
  fp32_t in_dout;
  logic  s_ready, m_valid, m_last;
  fp32_t m_data;
  stencil_state_e state;

  stream_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH), .FWFT(1'b1)) u_in_fifo (
    .clk, .rst, .wr_en(in_wr_en), .din(in_din), .full(in_full),
    .rd_en(in_rd_en), .dout(in_dout), .empty(in_empty)
  );

  assign in_rd_en  = !in_empty && s_ready;

  stencil_core #(.I(I), .W(W)) u_core (
    .clk, .rst,
    .s_valid(!in_empty), .s_ready, .s_data(in_dout),
    .m_valid, .m_ready(!out_full), .m_data, .m_last, .state
  );

  assign out_wr_en  = m_valid && !out_full;
  assign phase      = state;
  assign image_done = out_wr_en && m_last;

  stream_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH), .FWFT(1'b0)) u_out_fifo (
    .clk, .rst, .wr_en(out_wr_en), .din(m_data), .full(out_full),
    .rd_en(out_rd_en), .dout(out_dout), .empty(out_empty)
  );

endmodule
