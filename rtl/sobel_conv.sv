// sobel_conv -- Sobel gradients of a 3x3 window.
//
// Gx uses the mask [-1 0 1; -2 0 2; -1 0 1] (right column minus left column)
// and Gy the same mask turned by 90 degrees, taken as bottom line minus top
// line so that Gy is positive towards increasing row number. With this sign
// convention a gradient points to brighter pixels in image coordinates, which
// is what the radial-symmetry voting (row + dy, column + dx) needs. Both
// convolutions run in parallel; the weights of 2 are shifts. The absolute
// values (compare-and-negate) are produced alongside.
//
// Timing: one register stage; out_valid follows in_valid by one cycle. The
// masks and the parallel structure follow the described hardware; the row
// orientation of Gy is this design's reading.
module sobel_conv
  import tsd_pkg::*;
(
  input  logic                   clk,
  input  logic                   in_valid,
  input  logic [2:0][2:0][7:0]   win,
  output logic                   out_valid,
  output logic signed [GRAD_W-1:0] gx,
  output logic signed [GRAD_W-1:0] gy,
  output logic [GRAD_W-2:0]      abs_gx,
  output logic [GRAD_W-2:0]      abs_gy
);

  logic signed [GRAD_W-1:0] cx, cy;
  logic [GRAD_W-1:0] left, right, top, bottom;

  always_comb begin
    left   = GRAD_W'(win[0][0]) + (GRAD_W'(win[1][0]) << 1) + GRAD_W'(win[2][0]);
    right  = GRAD_W'(win[0][2]) + (GRAD_W'(win[1][2]) << 1) + GRAD_W'(win[2][2]);
    top    = GRAD_W'(win[0][0]) + (GRAD_W'(win[0][1]) << 1) + GRAD_W'(win[0][2]);
    bottom = GRAD_W'(win[2][0]) + (GRAD_W'(win[2][1]) << 1) + GRAD_W'(win[2][2]);
    cx = $signed(right - left);
    cy = $signed(bottom - top);
  end

  always_ff @(posedge clk) begin
    out_valid <= in_valid;
    gx <= cx;
    gy <= cy;
    abs_gx <= (GRAD_W-1)'(cx < 0 ? -cx : cx);
    abs_gy <= (GRAD_W-1)'(cy < 0 ? -cy : cy);
  end

endmodule
