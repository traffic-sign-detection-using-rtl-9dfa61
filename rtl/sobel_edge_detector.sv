// sobel_edge_detector -- edge detection stage of the pipeline.
//
// Chain: line_buffer (two previous lines) -> window_3x3 -> sobel_conv ->
// edge_magnitude. The row/column of the newest pixel travel with the data and
// are turned into the coordinates of the window centre (one line up, one
// column left). Only interior centres (rows 1..H-2, columns 1..W-2) produce a
// result, so the first output of a field appears once its third line arrives.
// Gradients of pixels that are not edges (mag <= edge_thresh) are set to zero,
// so that only edge pixels take part in the later voting. field_done pulses
// with the result of the last interior pixel of the field.
//
// Timing: 4 cycles from in_valid to out_valid (RAM read, window shift, Sobel,
// magnitude); one result per input pixel. Structure as described; the zeroing
// of non-edge gradients and the border handling are this design's choices.
module sobel_edge_detector
  import tsd_pkg::*;
#(
  parameter int unsigned W = 720,
  parameter int unsigned H = 288
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [GRAD_W-1:0]        edge_thresh,
  input  logic                     in_valid,
  input  logic [7:0]               in_pix,
  input  coord_t                   in_row,
  input  coord_t                   in_col,
  output logic                     out_valid,
  output logic signed [GRAD_W-1:0] gx,
  output logic signed [GRAD_W-1:0] gy,
  output logic [GRAD_W-1:0]        mag,
  output logic                     edge_out,
  output coord_t                   out_row,
  output coord_t                   out_col,
  output logic                     field_done
);

  // stage 1: line buffer
  logic       lb_valid;
  coord_t     lb_col;
  logic [7:0] lb_top, lb_mid, lb_bot;
  coord_t     lb_row;
  logic       lb_last;

  line_buffer #(.W(W), .DW(8)) u_lb (
    .clk, .in_valid, .in_pix, .in_col,
    .out_valid(lb_valid), .out_col(lb_col),
    .out_top(lb_top), .out_mid(lb_mid), .out_bot(lb_bot)
  );

  // stage 2: window
  logic                 win_valid_raw;
  logic [2:0][2:0][7:0] win;
  coord_t               w_row, w_col;
  logic                 w_last, w_ok;

  window_3x3 #(.DW(8)) u_win (
    .clk, .in_valid(lb_valid), .col_top(lb_top), .col_mid(lb_mid), .col_bot(lb_bot),
    .out_valid(win_valid_raw), .win
  );

  // stage 3: Sobel
  logic                     sc_valid;
  logic signed [GRAD_W-1:0] sc_gx, sc_gy;
  logic [GRAD_W-2:0]        sc_ax, sc_ay;
  coord_t                   sc_row, sc_col;
  logic                     sc_last;

  sobel_conv u_sobel (
    .clk, .in_valid(win_valid_raw && w_ok), .win,
    .out_valid(sc_valid), .gx(sc_gx), .gy(sc_gy), .abs_gx(sc_ax), .abs_gy(sc_ay)
  );

  // stage 4: magnitude
  logic                     mg_valid;
  logic signed [GRAD_W-1:0] mg_gx, mg_gy;
  coord_t                   mg_row, mg_col;
  logic                     mg_last;

  edge_magnitude u_mag (
    .clk, .in_valid(sc_valid), .abs_gx(sc_ax), .abs_gy(sc_ay), .thresh(edge_thresh),
    .out_valid(mg_valid), .mag, .edge_out
  );

  always_ff @(posedge clk) begin
    // coordinates alongside the data path
    lb_row  <= in_row;
    lb_last <= in_valid && 32'(in_row) == H-1 && 32'(in_col) == W-1;
    if (lb_valid) begin
      w_row  <= lb_row - 1'b1;
      w_col  <= lb_col - 1'b1;
      w_ok   <= lb_row >= 2 && lb_col >= 2;
    end
    w_last  <= lb_valid && lb_last;
    sc_row  <= w_row;  sc_col <= w_col;  sc_last <= w_last;
    mg_row  <= sc_row; mg_col <= sc_col; mg_last <= sc_last;
    mg_gx   <= sc_gx;  mg_gy  <= sc_gy;
    if (rst) begin
      lb_last <= 1'b0; w_last <= 1'b0; sc_last <= 1'b0; mg_last <= 1'b0;
      w_ok    <= 1'b0;
    end
  end

  assign out_valid  = mg_valid && !rst;
  assign gx         = edge_out ? mg_gx : '0;
  assign gy         = edge_out ? mg_gy : '0;
  assign out_row    = mg_row;
  assign out_col    = mg_col;
  assign field_done = mg_last;

endmodule
