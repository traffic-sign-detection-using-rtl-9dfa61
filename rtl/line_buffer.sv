// line_buffer -- two-line delay for 3x3 neighbourhood filters.
//
// Two dual-port RAMs, each one line of W pixels, addressed by column. When a
// pixel of line n arrives at column c, the pixels of lines n-1 and n-2 at the
// same column are read out and the RAMs shift by one line (RAM 1 takes the new
// pixel, RAM 2 takes what RAM 1 held). Each input pixel therefore yields one
// column of three vertically adjacent pixels.
//
// Timing: one cycle from in_valid to out_valid; columns must arrive in order
// within a line. The RAMs are not reset: the consumer masks the first two lines
// of a field by row number. The two-line RAM structure follows the described
// hardware (used for the Sobel stage and again for the Gaussian stage); the
// data width is a parameter (8 bits for video, 5 for the vote image).
module line_buffer
  import tsd_pkg::*;
#(
  parameter int unsigned W  = 720,
  parameter int unsigned DW = 8
) (
  input  logic          clk,
  input  logic          in_valid,
  input  logic [DW-1:0] in_pix,
  input  coord_t        in_col,
  output logic          out_valid,
  output coord_t        out_col,
  output logic [DW-1:0] out_top,   // line n-2
  output logic [DW-1:0] out_mid,   // line n-1
  output logic [DW-1:0] out_bot    // line n (the input pixel)
);

  localparam int unsigned AW = (W > 1) ? $clog2(W) : 1;

  logic [DW-1:0] ram1 [W];   // previous line
  logic [DW-1:0] ram2 [W];   // line before that
  logic [AW-1:0] addr;

  assign addr = in_col[AW-1:0];

  always_ff @(posedge clk) begin
    out_valid <= in_valid;
    if (in_valid) begin
      out_mid    <= ram1[addr];
      out_top    <= ram2[addr];
      out_bot    <= in_pix;
      out_col    <= in_col;
      ram1[addr] <= in_pix;
      ram2[addr] <= ram1[addr];
    end
  end

endmodule
