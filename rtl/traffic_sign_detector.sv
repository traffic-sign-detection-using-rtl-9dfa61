// traffic_sign_detector -- real-time circular traffic-sign detector for PAL
// video in BT.656 form.
//
// Data path (one system clock, 200 MHz intended; the 27 MHz decoder bytes
// arrive as a bt656_valid strobe):
//   video_analyzer      EAV/SAV decoding -> active line / field flags
//   rgb_conversion      Cb Y Cr Y -> RGB pixels with row/column of the field
//   color_threshold     red segmentation, binary image (255 / 0)
//   sobel_edge_detector gradients, magnitude, edge threshold
//   radial_symmetry     voting of edge pixels into O_n (external SRAM),
//                       vote image, Gaussian, threshold, detected centres
//   video_output        BT.656 to the monitor encoder with a selectable view
// and, on the 24.576 MHz video-card clock, i2c_config / i2c_master, which load
// the decoder and encoder registers at start-up from an external table.
//
// Every field is processed. The circle detector votes while a field arrives
// and reads O_n back (Gaussian, threshold, detection list) during the next
// one, interleaved with that field's votes, so detections are one field
// (20 ms) late. det_update pulses in the first cycle of a new det_count/det_row/det_col.
//
// The external SRAM (32-bit ZBT) is reached through sram_*; sram_rdata must
// be valid within 6 cycles of the address. I2C pins are open drain: *_oe = 1
// pulls the line low.
module traffic_sign_detector
  import tsd_pkg::*;
#(
  parameter int unsigned IMG_W       = 720,
  parameter int unsigned IMG_H       = 288,
  parameter int unsigned MAX_DET     = 8,
  parameter int unsigned CFG_ENTRIES = 16
) (
  input  logic                 clk,
  input  logic                 rst,
  // BT.656 from the video decoder
  input  logic                 bt656_valid,
  input  logic [7:0]           bt656_in,
  // run-time settings
  input  logic                 dark_mode,      // darker-scene colour thresholds
  input  logic [GRAD_W-1:0]    edge_thresh,
  input  logic [9:0]           shape_thresh,   // 50 / 40 / 35 per scene type
  input  logic [1:0]           view,
  // external SRAM for O_n
  output logic                 sram_en,
  output logic                 sram_we,
  output logic [SADDR_W-1:0]   sram_addr,
  output logic [31:0]          sram_wdata,
  input  logic [31:0]          sram_rdata,
  // BT.656 to the video encoder
  output logic                 vout_valid,
  output logic [7:0]           vout_byte,
  // detections
  output logic [$clog2(MAX_DET+1)-1:0] det_count,
  output coord_t [MAX_DET-1:0] det_row,
  output coord_t [MAX_DET-1:0] det_col,
  output logic                 det_update,
  output logic                 vote_overflow,
  // I2C configuration of the video chips (24.576 MHz domain)
  input  logic                 clk_i2c,
  input  logic                 rst_i2c,
  output logic [7:0]           cfg_index,
  input  logic [22:0]          cfg_entry,
  output logic                 cfg_done,
  output logic                 cfg_error,
  output logic                 scl_oe,
  output logic                 sda_oe,
  input  logic                 scl_in,
  input  logic                 sda_in
);

  bt656_timing_t timing;

  video_analyzer u_va (
    .clk, .rst, .byte_valid(bt656_valid), .byte_in(bt656_in), .timing
  );

  logic   px_valid, px_fs;
  rgb_t   px_rgb;
  coord_t px_row, px_col;

  rgb_conversion #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_rgb (
    .clk, .rst, .byte_valid(bt656_valid), .byte_in(bt656_in), .timing,
    .pix_valid(px_valid), .pix_rgb(px_rgb), .pix_row(px_row), .pix_col(px_col),
    .field_start(px_fs)
  );

  logic       seg_valid;
  logic [7:0] seg_pix;
  coord_t     seg_row, seg_col;

  color_threshold u_seg (
    .clk, .rst, .dark_mode,
    .in_valid(px_valid), .in_rgb(px_rgb), .in_row(px_row), .in_col(px_col),
    .out_valid(seg_valid), .out_pix(seg_pix), .out_row(seg_row), .out_col(seg_col)
  );

  logic                     ed_valid, ed_edge, ed_last;
  logic signed [GRAD_W-1:0] ed_gx, ed_gy;
  logic [GRAD_W-1:0]        ed_mag;
  coord_t                   ed_row, ed_col;

  sobel_edge_detector #(.W(IMG_W), .H(IMG_H)) u_edge (
    .clk, .rst, .edge_thresh,
    .in_valid(seg_valid), .in_pix(seg_pix), .in_row(seg_row), .in_col(seg_col),
    .out_valid(ed_valid), .gx(ed_gx), .gy(ed_gy), .mag(ed_mag), .edge_out(ed_edge),
    .out_row(ed_row), .out_col(ed_col), .field_done(ed_last)
  );

  logic readout_busy, readout_done, vote_strobe, cand_strobe;

  radial_symmetry #(.W(IMG_W), .H(IMG_H), .MAX_DET(MAX_DET)) u_rs (
    .clk, .rst, .vote_enable(1'b1), .shape_thresh,
    .in_valid(ed_valid), .in_gx(ed_gx), .in_gy(ed_gy), .in_row(ed_row), .in_col(ed_col),
    .field_done(ed_last),
    .sram_en, .sram_we, .sram_addr, .sram_wdata, .sram_rdata,
    .readout_busy, .readout_done, .vote_overflow,
    .det_count, .det_row, .det_col, .vote_strobe, .cand_strobe
  );

  // the detection list is republished 9 cycles after readout_done (Gaussian
  // pipeline drain, then the list copy)
  logic [8:0] upd_dly;
  always_ff @(posedge clk) begin
    if (rst) upd_dly <= '0;
    else     upd_dly <= {upd_dly[7:0], readout_done};
  end
  assign det_update = upd_dly[8];

  video_output #(.IMG_W(IMG_W), .IMG_H(IMG_H), .MAX_DET(MAX_DET), .BOX(16)) u_vout (
    .clk, .rst, .view, .byte_valid(bt656_valid), .byte_in(bt656_in), .timing,
    .mask_valid(seg_valid), .mask_bit(seg_pix[7]), .mask_col(seg_col),
    .edge_valid(ed_valid), .edge_bit(ed_edge), .edge_col(ed_col),
    .det_count, .det_row, .det_col,
    .out_valid(vout_valid), .out_byte(vout_byte)
  );

  i2c_config #(.N_ENTRIES(CFG_ENTRIES), .CLK_HZ(24_576_000), .TICK_HZ(384_000)) u_cfg (
    .clk(clk_i2c), .rst(rst_i2c),
    .tbl_index(cfg_index), .tbl_entry(cfg_entry), .done(cfg_done), .error(cfg_error),
    .scl_oe, .sda_oe, .scl_in, .sda_in
  );

endmodule
