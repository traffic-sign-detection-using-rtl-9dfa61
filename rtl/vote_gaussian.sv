// vote_gaussian -- vote image, Gaussian smoothing and centre threshold.
//
// Input is the O_n stream from the SRAM readout in raster order. With the
// radial strictness alpha = 1 and the division by k_n left out, the vote image
// is the count clipped at k_n: F_n = min(O_n, KN), 5 bits for KN = 16. F_n goes
// through a two-line buffer and a 3x3 window like the Sobel stage, and is
// convolved with the Gaussian kernel
//        [1 2 1]
//   A_n = [2 4 2]
//        [1 2 1]
// using shifts and adds only. A window centre whose result S_n exceeds
// shape_thresh (50 in the main configuration) is a candidate centre of a
// circular sign and is reported with its row, column and score.
//
// Timing: 4 cycles from in_valid to the candidate (line buffer, window,
// convolution, compare); inputs may arrive every cycle. Only interior centres
// are evaluated; the field height H is not needed by the logic (the stream
// ends when the readout ends) and is kept for a uniform parameter set. The clipping, kernel and threshold follow the described
// design; the strict "greater than" is this design's choice.
module vote_gaussian
  import tsd_pkg::*;
#(
  parameter int unsigned W  = 720,
  parameter int unsigned H  = 288,
  parameter int unsigned KN = 16
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [9:0]  shape_thresh,
  input  logic        in_valid,
  input  logic [7:0]  in_on,
  input  coord_t      in_row,
  input  coord_t      in_col,
  output logic        cand_valid,
  output coord_t      cand_row,
  output coord_t      cand_col,
  output logic [9:0]  cand_score
);

  localparam int unsigned FW = $clog2(KN + 1);

  logic [FW-1:0] f;
  assign f = (32'(in_on) < KN) ? FW'(in_on) : FW'(KN);

  logic          lb_valid;
  coord_t        lb_col, lb_row;
  logic [FW-1:0] lb_top, lb_mid, lb_bot;

  line_buffer #(.W(W), .DW(FW)) u_lb (
    .clk, .in_valid, .in_pix(f), .in_col,
    .out_valid(lb_valid), .out_col(lb_col),
    .out_top(lb_top), .out_mid(lb_mid), .out_bot(lb_bot)
  );

  logic                     w_valid;
  logic [2:0][2:0][FW-1:0]  win;
  coord_t                   w_row, w_col;
  logic                     w_ok;

  window_3x3 #(.DW(FW)) u_win (
    .clk, .in_valid(lb_valid), .col_top(lb_top), .col_mid(lb_mid), .col_bot(lb_bot),
    .out_valid(w_valid), .win
  );

  logic [9:0] s;
  always_comb begin
    s = 10'(win[0][0]) + 10'(win[0][2]) + 10'(win[2][0]) + 10'(win[2][2])
      + ((10'(win[0][1]) + 10'(win[1][0]) + 10'(win[1][2]) + 10'(win[2][1])) << 1)
      + (10'(win[1][1]) << 2);
  end

  logic       c_valid;
  logic [9:0] c_s;
  coord_t     c_row, c_col;

  always_ff @(posedge clk) begin
    lb_row <= in_row;
    if (lb_valid) begin
      w_row <= lb_row - 1'b1;
      w_col <= lb_col - 1'b1;
      w_ok  <= lb_row >= 2 && lb_col >= 2;
    end
    c_valid <= !rst && w_valid && w_ok;
    c_s     <= s;
    c_row   <= w_row;
    c_col   <= w_col;
    cand_valid <= !rst && c_valid && c_s > shape_thresh;
    cand_row   <= c_row;
    cand_col   <= c_col;
    cand_score <= c_s;
    if (rst) w_ok <= 1'b0;
  end

endmodule
