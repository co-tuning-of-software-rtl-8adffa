// stencil_window: the line buffer of the streaming 2D stencil.
//
// W rows of shift registers turn a row-major stream of an I x I image into a
// W x W window that is complete on every cycle. Each row has W tap registers;
// the last tap of row r feeds an (I - W)-stage row_shift_reg whose output
// enters the first tap of row r+1, so consecutive rows are exactly I elements
// apart. The last row has only its W tap registers. This is the structure the
// document draws; its figure labels the long segment "I - W + 1", which counts
// the tap points at the register inputs, and here the total delay per row is I.
//
// Interface: when shift is high, din enters and every tap moves one place.
// After the shift that brought in stream element k, win[dr][dc] holds element
// k - dr*I - dc (dr, dc = 0 .. W-1). Reset only restarts the row buffers'
// pointers; positions not yet filled are masked by the controller.
module stencil_window
  import stencil_pkg::*;
#(
  parameter int unsigned I = 512,   // image side in elements
  parameter int unsigned W = 9      // window side in elements
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  shift,
  input  fp32_t din,
  output fp32_t win [W][W]
);

  fp32_t row_in [W];

  assign row_in[0] = din;

  for (genvar r = 0; r < W; r++) begin : g_row
    always_ff @(posedge clk) begin
      if (shift) begin
        win[r][0] <= row_in[r];
        for (int c = 1; c < W; c++) win[r][c] <= win[r][c-1];
      end
    end
    if (r < W - 1) begin : g_link
      row_shift_reg #(.LEN(I - W), .WIDTH(32)) u_row (
        .clk  (clk),
        .rst  (rst),
        .en   (shift),
        .din  (win[r][W-1]),
        .dout (row_in[r+1])
      );
    end
  end

endmodule
