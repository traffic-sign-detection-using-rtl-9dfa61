// video_output -- video matrix and BT.656 output for the monitor encoder.
//
// The input BT.656 stream is re-sent with one cycle of delay. EAV/SAV codes,
// blanking and ancillary bytes pass unchanged; inside the active part of a
// line (2*IMG_W bytes after each SAV, rows below IMG_H) the samples are
// replaced according to view:
//   0  camera picture unchanged
//   1  colour-segmentation mask: white where the pixel passed, black elsewhere
//   2  edge map: white on edge pixels, black elsewhere
//   3  detections: the camera picture inside a square of +-BOX pixels around
//      each detected centre, white everywhere else
// White is Y = 235, black Y = 16, with Cb = Cr = 128. The mask and edge bits
// arrive from their pipelines with their own delay; each is written into a
// one-line bit memory at its column and read back for the same column of the
// next line, so these views lag the picture by one line (about a line for the
// Sobel view).
//
// Timing: out_valid/out_byte follow byte_valid/byte_in by one cycle. Only the
// existence of this output path and the "square around the sign, rest
// whitened" look are given; the view encoding, colours and alignment are this
// design's.
module video_output
  import tsd_pkg::*;
#(
  parameter int unsigned IMG_W   = 720,
  parameter int unsigned IMG_H   = 288,
  parameter int unsigned MAX_DET = 8,
  parameter int unsigned BOX     = 16
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic [1:0]            view,
  input  logic                  byte_valid,
  input  logic [7:0]            byte_in,
  input  bt656_timing_t         timing,
  // overlay bits
  input  logic                  mask_valid,
  input  logic                  mask_bit,
  input  coord_t                mask_col,
  input  logic                  edge_valid,
  input  logic                  edge_bit,
  input  coord_t                edge_col,
  // detections
  input  logic [$clog2(MAX_DET+1)-1:0] det_count,
  input  coord_t [MAX_DET-1:0]  det_row,
  input  coord_t [MAX_DET-1:0]  det_col,
  // BT.656 out
  output logic                  out_valid,
  output logic [7:0]            out_byte
);

  localparam int unsigned AW = $clog2(IMG_W);

  logic mask_mem [IMG_W];
  logic edge_mem [IMG_W];

  always_ff @(posedge clk) begin
    if (mask_valid) mask_mem[mask_col[AW-1:0]] <= mask_bit;
    if (edge_valid) edge_mem[edge_col[AW-1:0]] <= edge_bit;
  end

  // position of the current byte
  logic [COORD_W:0] cnt;         // active bytes already taken on this line
  logic [COORD_W:0] idx;         // index of the current byte after SAV
  coord_t           row;
  logic             line_counted;
  coord_t           col;
  logic             is_luma;
  logic             in_pic;

  assign idx     = timing.sav ? '0 : cnt;
  assign col     = idx[COORD_W:1];
  assign is_luma = idx[0];
  assign in_pic  = timing.active_line && 32'(idx) < 2 * IMG_W && 32'(row) < IMG_H;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= '0; row <= '0; line_counted <= 1'b0;
    end else begin
      if (timing.vsync) begin
        row <= '0; line_counted <= 1'b0;
      end else if (timing.eav && line_counted) begin
        row <= row + 1'b1; line_counted <= 1'b0;
      end
      if (byte_valid && timing.active_line) begin
        cnt <= idx + 1'b1;
        line_counted <= 1'b1;
      end else if (timing.sav) begin
        cnt <= '0;
      end
    end
  end

  logic in_box;
  always_comb begin
    in_box = 1'b0;
    for (int i = 0; i < MAX_DET; i++)
      if (i < 32'(det_count) &&
          (row >= det_row[i] ? row - det_row[i] : det_row[i] - row) <= COORD_W'(BOX) &&
          (col >= det_col[i] ? col - det_col[i] : det_col[i] - col) <= COORD_W'(BOX))
        in_box = 1'b1;
  end

  always_ff @(posedge clk) begin
    out_valid <= byte_valid && !rst;
    out_byte  <= byte_in;
    if (byte_valid && in_pic) begin
      unique case (view)
        2'd0: out_byte <= byte_in;
        2'd1: out_byte <= is_luma ? (mask_mem[col[AW-1:0]] ? 8'd235 : 8'd16) : 8'd128;
        2'd2: out_byte <= is_luma ? (edge_mem[col[AW-1:0]] ? 8'd235 : 8'd16) : 8'd128;
        2'd3: out_byte <= in_box ? byte_in : (is_luma ? 8'd235 : 8'd128);
        default: out_byte <= byte_in;
      endcase
    end
  end

endmodule
