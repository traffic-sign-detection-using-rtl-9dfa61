// mag_calculation -- first step of the radial-symmetry voting.
//
// For every edge pixel (non-zero gradient) it computes the gradient magnitude
// with the same estimator as the edge stage, max(|Gx|,|Gy|) + min/2, and the
// gradients multiplied by the voting radius n = 16, which is a left shift by
// RADIUS_SHIFT. The dividers then form n*g/|g|, the offset from the pixel to
// its positively-affected pixel. Row (satir_no) and column (sutun_no) numbers
// travel with the data. image_end pulses two cycles after field_done, when the
// last pixel of the field has been handled; it starts the vote-image stage.
//
// Timing: 2 cycles (absolute values, then magnitude and shifts). Example:
// Gx = 261, Gy = 229 gives mag_out = 375, sobel_x_out = 4176,
// sobel_y_out = 3664. As described; skipping zero-gradient pixels is this
// design's choice.
module mag_calculation
  import tsd_pkg::*;
#(
  parameter int unsigned RADIUS_SHIFT = 4
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     in_valid,
  input  logic signed [GRAD_W-1:0] sobel_x_in,
  input  logic signed [GRAD_W-1:0] sobel_y_in,
  input  coord_t                   in_row,
  input  coord_t                   in_col,
  input  logic                     field_done,
  output logic                     out_valid,
  output logic [15:0]              mag_out,
  output logic signed [15:0]       sobel_x_out,
  output logic signed [15:0]       sobel_y_out,
  output coord_t                   satir_no,
  output coord_t                   sutun_no,
  output logic                     image_end
);

  logic                     s1_valid, s1_end;
  logic [GRAD_W-2:0]        s1_ax, s1_ay;
  logic signed [GRAD_W-1:0] s1_gx, s1_gy;
  coord_t                   s1_row, s1_col;

  always_ff @(posedge clk) begin
    if (rst) begin
      s1_valid <= 1'b0; s1_end <= 1'b0; out_valid <= 1'b0; image_end <= 1'b0;
    end else begin
      s1_valid  <= in_valid && (sobel_x_in != '0 || sobel_y_in != '0);
      s1_end    <= field_done;
      out_valid <= s1_valid;
      image_end <= s1_end;
    end
    s1_ax  <= (GRAD_W-1)'(sobel_x_in < 0 ? -sobel_x_in : sobel_x_in);
    s1_ay  <= (GRAD_W-1)'(sobel_y_in < 0 ? -sobel_y_in : sobel_y_in);
    s1_gx  <= sobel_x_in;
    s1_gy  <= sobel_y_in;
    s1_row <= in_row;
    s1_col <= in_col;

    if (s1_ax >= s1_ay) mag_out <= 16'(s1_ax) + 16'(s1_ay >> 1);
    else                mag_out <= 16'(s1_ay) + 16'(s1_ax >> 1);
    sobel_x_out <= 16'(s1_gx) <<< RADIUS_SHIFT;
    sobel_y_out <= 16'(s1_gy) <<< RADIUS_SHIFT;
    satir_no    <= s1_row;
    sutun_no    <= s1_col;
  end

endmodule
