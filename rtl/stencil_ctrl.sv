// stencil_ctrl: sequencing, border masks and flow control of the stencil.
//
// One convolution is a stream of W*W coefficients followed by the I*I image
// elements in row-major order; the result is an I*I image in the same order,
// each output element being the window centred on it (h = (W-1)/2 elements on
// every side), with window positions outside the image ignored. The controller
// walks through three phases (stencil_pkg::stencil_state_e):
//   ST_COEF  - each accepted word is loaded into the coefficient chain;
//   ST_IMAGE - each accepted word is shifted into the line buffer;
//   ST_FLUSH - h*I + h padding shifts are made without input, so that the
//              windows centred on the last h rows and columns can form.
// Then it returns to ST_COEF for the next convolution. Shift number k (counted
// over image and padding) completes the window centred on output k - h*I - h,
// so outputs exist from k = h*I + h on; the (row, col) of that output gives the
// mask of window positions inside the image.
//
// The pipeline behind the line buffer (multipliers, then the adder tree) moves
// as a whole: adv = !m_valid || m_ready. A stalled output therefore stalls the
// whole accelerator, and an empty input stalls only the line buffer, letting
// bubbles (cleared valid bits) into the pipeline. The document gives the
// phases' content (coefficients first, image streamed through shift registers)
// and one element per cycle; the padding phase, the masking and the stall rule
// are this design's choices.
//
// Interface: s_valid/s_ready accept a word, m_valid/m_ready deliver one.
// LAT is the number of pipeline stages after the line buffer. Synchronous,
// active-high reset. Throughput one element per cycle with no stalls.
module stencil_ctrl
  import stencil_pkg::*;
#(
  parameter int unsigned I   = 512,
  parameter int unsigned W   = 9,
  parameter int unsigned LAT = 8     // multiplier stage + adder tree levels
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             s_valid,
  output logic             s_ready,
  input  logic             m_ready,
  output logic             m_valid,
  output logic             coef_load,   // load the accepted word as a coefficient
  output logic             shift,       // shift the line buffer
  output logic             pad,         // the shifted word is padding, not input
  output logic             adv,         // advance the arithmetic pipeline
  output logic [W*W-1:0]   mask,        // window positions inside the image, aligned with the line buffer
  output stencil_state_e   state,
  output logic             last_out     // m_valid for the last element of an image
);

  localparam int unsigned H      = (W - 1) / 2;
  localparam int unsigned NCOEF  = W * W;
  localparam int unsigned NIMG   = I * I;
  localparam int unsigned NSHIFT = NIMG + H * I + H;
  localparam int unsigned CW     = $clog2(NSHIFT + 1);
  localparam int unsigned RW     = $clog2(I + 1);

  logic [CW-1:0]   k_cnt;           // shifts made in this convolution
  logic [$clog2(NCOEF+1)-1:0] c_cnt; // coefficients loaded
  logic [RW-1:0]   orow, ocol;      // output element of the next window
  logic            pos_valid;
  logic [W*W-1:0]  mask_d;
  logic [LAT:0]    v;               // v[0]: line buffer window valid
  logic [LAT:0]    vlast;           // marks the last output of an image

  assign adv       = !m_valid || m_ready;
  assign s_ready   = adv && (state != ST_FLUSH);
  assign coef_load = (state == ST_COEF) && s_valid && s_ready;
  assign shift     = adv && ((state == ST_IMAGE && s_valid) || state == ST_FLUSH);
  assign pad       = (state == ST_FLUSH);
  assign pos_valid = (k_cnt >= CW'(H * I + H));
  assign m_valid   = v[LAT];
  assign last_out  = v[LAT] && vlast[LAT];

  // Window positions of the output (orow, ocol) that fall inside the image.
  always_comb begin
    for (int i = 0; i < W; i++) begin
      for (int j = 0; j < W; j++) begin
        int rr, cc;
        rr = int'(orow) - int'(H) + i;
        cc = int'(ocol) - int'(H) + j;
        mask_d[i*W+j] = (rr >= 0) && (rr < int'(I)) && (cc >= 0) && (cc < int'(I));
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= ST_COEF;
      k_cnt <= '0;
      c_cnt <= '0;
      orow  <= '0;
      ocol  <= '0;
      v     <= '0;
      vlast <= '0;
      mask  <= '0;
    end else begin
      if (coef_load) begin
        if (c_cnt == $bits(c_cnt)'(NCOEF - 1)) begin
          c_cnt <= '0;
          state <= ST_IMAGE;
        end else begin
          c_cnt <= c_cnt + 1'b1;
        end
      end
      if (shift) begin
        mask <= mask_d;
        if (k_cnt == CW'(NIMG - 1)) state <= (NSHIFT > NIMG) ? ST_FLUSH : ST_COEF;
        if (k_cnt == CW'(NSHIFT - 1)) begin
          k_cnt <= '0;
          state <= ST_COEF;
        end else begin
          k_cnt <= k_cnt + 1'b1;
        end
        if (pos_valid) begin
          if (ocol == RW'(I - 1)) begin
            ocol <= '0;
            orow <= (orow == RW'(I - 1)) ? '0 : orow + 1'b1;
          end else begin
            ocol <= ocol + 1'b1;
          end
        end
      end
      if (adv) begin
        v[0]     <= shift && pos_valid;
        vlast[0] <= shift && (k_cnt == CW'(NSHIFT - 1));
        for (int s = 1; s <= LAT; s++) begin
          v[s]     <= v[s-1];
          vlast[s] <= vlast[s-1];
        end
      end
    end
  end

  // Handshake rules: a held output may not change or disappear while stalled.
  property p_hold_valid;
    @(posedge clk) disable iff (rst) (m_valid && !m_ready) |=> m_valid;
  endproperty
  a_hold_valid: assert property (p_hold_valid);
  a_no_shift_in_coef: assert property (@(posedge clk) disable iff (rst) !(shift && state == ST_COEF));

endmodule
