// color_threshold -- red colour segmentation of an RGB pixel stream.
//
// A pixel belongs to a red sign when
//   RA <= R <= RB,  G'a <= G/R <= G'b,  B'a <= B/R <= B'b
// and is then given the value K1, otherwise K2. The ratios are tested without
// a divider by cross-multiplying: 256*G <= GB_Q8*R, with the ratio thresholds
// in units of 1/256 (0.45 -> 115, 0.65 -> 166). Two threshold sets exist: the
// normal one (RA 75, ratios 0.45) and the one for darker scenes (RA 55, ratios
// 0.65); dark_mode selects between them per pixel.
//
// Timing: 2-cycle pipeline (products, then compare), coordinates travel along.
// The rule and both threshold sets follow the described design; the Q8 ratio
// format, K1 = 255 / K2 = 0, and building only the red test are this
// design's choices.
module color_threshold
  import tsd_pkg::*;
#(
  parameter logic [7:0] RA         = 8'd75,
  parameter logic [7:0] RB         = 8'd255,
  parameter logic [8:0] GA_Q8      = 9'd0,
  parameter logic [8:0] GB_Q8      = 9'd115,
  parameter logic [8:0] BA_Q8      = 9'd0,
  parameter logic [8:0] BB_Q8      = 9'd115,
  parameter logic [7:0] RA_DARK    = 8'd55,
  parameter logic [7:0] RB_DARK    = 8'd255,
  parameter logic [8:0] GA_DARK_Q8 = 9'd0,
  parameter logic [8:0] GB_DARK_Q8 = 9'd166,
  parameter logic [8:0] BA_DARK_Q8 = 9'd0,
  parameter logic [8:0] BB_DARK_Q8 = 9'd166,
  parameter logic [7:0] K1         = 8'd255,
  parameter logic [7:0] K2         = 8'd0
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       dark_mode,
  input  logic       in_valid,
  input  rgb_t       in_rgb,
  input  coord_t     in_row,
  input  coord_t     in_col,
  output logic       out_valid,
  output logic [7:0] out_pix,
  output coord_t     out_row,
  output coord_t     out_col
);

  logic [7:0] ra, rb;
  logic [8:0] ga, gb, ba, bb;
  always_comb begin
    ra = dark_mode ? RA_DARK    : RA;
    rb = dark_mode ? RB_DARK    : RB;
    ga = dark_mode ? GA_DARK_Q8 : GA_Q8;
    gb = dark_mode ? GB_DARK_Q8 : GB_Q8;
    ba = dark_mode ? BA_DARK_Q8 : BA_Q8;
    bb = dark_mode ? BB_DARK_Q8 : BB_Q8;
  end

  // stage 1: scaled components and threshold products
  logic        s1_valid, s1_r_ok;
  logic [16:0] s1_g256, s1_b256, s1_ga, s1_gb, s1_ba, s1_bb;
  coord_t      s1_row, s1_col;

  always_ff @(posedge clk) begin
    if (rst) begin
      s1_valid  <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      s1_valid  <= in_valid;
      out_valid <= s1_valid;
    end
    s1_r_ok <= in_rgb.r >= ra && in_rgb.r <= rb;
    s1_g256 <= {1'b0, in_rgb.g, 8'd0};
    s1_b256 <= {1'b0, in_rgb.b, 8'd0};
    s1_ga   <= 17'(ga * in_rgb.r);
    s1_gb   <= 17'(gb * in_rgb.r);
    s1_ba   <= 17'(ba * in_rgb.r);
    s1_bb   <= 17'(bb * in_rgb.r);
    s1_row  <= in_row;
    s1_col  <= in_col;

    out_pix <= (s1_r_ok && s1_g256 >= s1_ga && s1_g256 <= s1_gb &&
                s1_b256 >= s1_ba && s1_b256 <= s1_bb) ? K1 : K2;
    out_row <= s1_row;
    out_col <= s1_col;
  end

endmodule
