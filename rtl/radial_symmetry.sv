// radial_symmetry -- circular-sign detector (fast radial symmetry, radius 16).
//
// Every edge pixel p with gradient g votes for the pixel p + n*g/|g|, n = 16,
// where a circle of radius n through p would have its centre. The votes are
// counted in the orientation projection image O_n in external SRAM. At the end
// of the field (image_end) O_n is read back, clipped to form the vote image
// F_n, smoothed with a 3x3 Gaussian and thresholded; the surviving centres are
// merged into a short list of detected signs.
//
//   edge stream -> mag_calculation -> 2 x divider -> address_logic
//               -> vote_sram_controller <-> SRAM
//               -> (readout) vote_gaussian -> detection_buffer
//
// vote_enable gates which pixels vote (the top keeps it high, so every field
// votes). The readout of a field (288*720/4 words at 14 cycles each, about
// 3.6 ms at 200 MHz) runs during the next field, sharing the SRAM with that
// field's votes.
//
// Latency: 2 (magnitude) + 18 (divider) + 2 (address) cycles to the vote FIFO;
// the detection list updates when readout_done pulses. Structure and
// parameters (n = 16, k_n = 16, alpha = 1, 3x3 kernel) follow the described
// design; the FIFO, field gating and the detection list are this design's.
module radial_symmetry
  import tsd_pkg::*;
#(
  parameter int unsigned W       = 720,
  parameter int unsigned H       = 288,
  parameter int unsigned MAX_DET = 8
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     vote_enable,
  input  logic [9:0]               shape_thresh,
  // edge stream from the Sobel stage
  input  logic                     in_valid,
  input  logic signed [GRAD_W-1:0] in_gx,
  input  logic signed [GRAD_W-1:0] in_gy,
  input  coord_t                   in_row,
  input  coord_t                   in_col,
  input  logic                     field_done,
  // external SRAM
  output logic                     sram_en,
  output logic                     sram_we,
  output logic [SADDR_W-1:0]       sram_addr,
  output logic [31:0]              sram_wdata,
  input  logic [31:0]              sram_rdata,
  // results
  output logic                     readout_busy,
  output logic                     readout_done,
  output logic                     vote_overflow,
  output logic [$clog2(MAX_DET+1)-1:0] det_count,
  output coord_t [MAX_DET-1:0]     det_row,
  output coord_t [MAX_DET-1:0]     det_col,
  // internal strobes for observation
  output logic                     vote_strobe,
  output logic                     cand_strobe
);

  // magnitude and n*g
  logic               mc_valid, image_end;
  logic [15:0]        mc_mag;
  logic signed [15:0] mc_x, mc_y;
  coord_t             mc_row, mc_col;

  mag_calculation u_mag (
    .clk, .rst,
    .in_valid(in_valid && vote_enable), .sobel_x_in(in_gx), .sobel_y_in(in_gy),
    .in_row, .in_col, .field_done(field_done && vote_enable),
    .out_valid(mc_valid), .mag_out(mc_mag), .sobel_x_out(mc_x), .sobel_y_out(mc_y),
    .satir_no(mc_row), .sutun_no(mc_col), .image_end
  );

  // two dividers: n*gx/|g| (column offset) and n*gy/|g| (row offset)
  logic               d1_valid, d2_valid;
  logic signed [15:0] bolum1, bolum2;
  logic [2*COORD_W-1:0] d_tag;
  logic               d2_tag;

  divider #(.NUM_W(16), .DEN_W(16), .TAG_W(2*COORD_W), .LATENCY(18)) u_div1 (
    .clk, .rst, .in_valid(mc_valid), .num(mc_x), .den(mc_mag), .tag({mc_row, mc_col}),
    .out_valid(d1_valid), .quot(bolum1), .tag_out(d_tag)
  );
  divider #(.NUM_W(16), .DEN_W(16), .TAG_W(1), .LATENCY(18)) u_div2 (
    .clk, .rst, .in_valid(mc_valid), .num(mc_y), .den(mc_mag), .tag(1'b0),
    .out_valid(d2_valid), .quot(bolum2), .tag_out(d2_tag)
  );

  // affected pixel -> SRAM word and lane
  logic               al_valid;
  logic [SADDR_W-1:0] al_addr;
  logic [2:0]         al_mod;
  coord_t             al_r, al_c;

  address_logic #(.W(W), .H(H)) u_addr (
    .clk, .rst, .in_valid(d1_valid && d2_valid),
    .satir_no(d_tag[2*COORD_W-1:COORD_W]), .sutun_no(d_tag[COORD_W-1:0]),
    .bolum1_in(bolum1), .bolum2_in(bolum2),
    .output_valid(al_valid), .sram_address(al_addr), .data_mod(al_mod),
    .satir_s(al_r), .sutun_s(al_c)
  );

  // image_end reaches the controller after the last vote has left the
  // dividers and address stage (18 + 2 cycles), so it is counted in O_n
  localparam int unsigned END_DLY = 24;
  logic [END_DLY-1:0] end_dly;
  always_ff @(posedge clk) begin
    if (rst) end_dly <= '0;
    else     end_dly <= {end_dly[END_DLY-2:0], image_end};
  end

  // O_n in SRAM
  logic       on_valid;
  logic [7:0] on_data;
  coord_t     on_row, on_col;

  vote_sram_controller #(.W(W), .H(H), .ACCESS_CYCLES(7), .FIFO_DEPTH(8)) u_ctrl (
    .clk, .rst,
    .vote_valid(al_valid), .vote_addr(al_addr), .vote_lane(al_mod[1:0]), .image_end(end_dly[END_DLY-1]),
    .vote_overflow,
    .sram_en, .sram_we, .sram_addr, .sram_wdata, .sram_rdata,
    .on_valid, .on_data, .on_row, .on_col, .readout_busy, .readout_done
  );

  // vote image, Gaussian, threshold
  logic       c_valid;
  coord_t     c_row, c_col;

  vote_gaussian #(.W(W), .H(H), .KN(16)) u_gauss (
    .clk, .rst, .shape_thresh,
    .in_valid(on_valid), .in_on(on_data), .in_row(on_row), .in_col(on_col),
    .cand_valid(c_valid), .cand_row(c_row), .cand_col(c_col), .cand_score()
  );

  // the Gaussian pipeline drains within a few cycles of the last word
  logic [7:0] done_dly;
  always_ff @(posedge clk) begin
    if (rst) done_dly <= '0;
    else     done_dly <= {done_dly[6:0], readout_done};
  end

  detection_buffer #(.MAX_DET(MAX_DET), .MERGE_DIST(16)) u_det (
    .clk, .rst, .start(image_end), .done(done_dly[7]),
    .cand_valid(c_valid), .cand_row(c_row), .cand_col(c_col),
    .det_count, .det_row, .det_col
  );

  assign vote_strobe = al_valid;
  assign cand_strobe = c_valid;

endmodule
