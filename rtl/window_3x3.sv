// window_3x3 -- 3x3 pixel window built from line-buffer columns.
//
// Each valid column (top, mid, bottom line) is shifted in from the right; the
// two older columns move left. win[r][c] has r = 0 for the oldest line and
// c = 0 for the oldest column, so the window centre is win[1][1], one line and
// one column behind the newest pixel.
//
// Timing: the window is updated one cycle after in_valid and out_valid marks
// that cycle. As described for the Sobel and Gaussian filters.
module window_3x3 #(
  parameter int unsigned DW = 8
) (
  input  logic                    clk,
  input  logic                    in_valid,
  input  logic [DW-1:0]           col_top,
  input  logic [DW-1:0]           col_mid,
  input  logic [DW-1:0]           col_bot,
  output logic                    out_valid,
  output logic [2:0][2:0][DW-1:0] win
);

  always_ff @(posedge clk) begin
    out_valid <= in_valid;
    if (in_valid) begin
      for (int r = 0; r < 3; r++) begin
        win[r][0] <= win[r][1];
        win[r][1] <= win[r][2];
      end
      win[0][2] <= col_top;
      win[1][2] <= col_mid;
      win[2][2] <= col_bot;
    end
  end

endmodule
