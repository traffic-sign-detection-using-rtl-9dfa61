// rgb_conversion -- YCbCr 4:2:2 byte stream to RGB pixels with field coordinates.
//
// A four-state machine (S_CB, S_Y1, S_CR, S_Y2) follows the Cb Y Cr Y order of
// the active bytes after each SAV. Both luma samples of a group share the
// group's Cb and Cr, so a pixel is converted once its Cr is known: Y1 when the
// Cr byte arrives, Y2 when its own byte arrives. After IMG_W pixels the machine
// parks in S_EAV until the line's EAV ends active_line. Lines are counted from
// the first active line after vertical blanking.
//
// The conversion is the BT.601 matrix
//   R = 1.164(Y-16) + 1.596(Cr-128)
//   G = 1.164(Y-16) - 0.813(Cr-128) - 0.391(Cb-128)
//   B = 1.164(Y-16) + 2.018(Cb-128)
// in x256 fixed point (298, 409, 208, 100, 517), rounded and clipped to 0..255.
// It is a 4-stage pipeline (capture, offsets, products, sum/clip): the pixel
// appears 4 cycles after the byte that completes it. The state machine, the pair sharing and the 4-cycle conversion
// follow the described hardware; the fixed-point format and the line counting
// are this design's.
//
// Interface: byte_valid/byte_in is the BT.656 stream, timing comes from
// video_analyzer for the same bytes (one cycle later, which the SAV-armed
// state machine accounts for). Output is a pixel strobe with row/column.
module rgb_conversion
  import tsd_pkg::*;
#(
  parameter int unsigned IMG_W = 720,
  parameter int unsigned IMG_H = 288
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          byte_valid,
  input  logic [7:0]    byte_in,
  input  bt656_timing_t timing,
  output logic          pix_valid,
  output rgb_t          pix_rgb,
  output coord_t        pix_row,
  output coord_t        pix_col,
  output logic          field_start
);

  typedef enum logic [2:0] {S_CB, S_Y1, S_CR, S_Y2, S_EAV} state_t;
  state_t state;

  logic [7:0] cb, y1, cr;
  coord_t     col, row;
  logic       line_counted;

  // conversion job (stage 0)
  logic       j_valid;
  logic [7:0] j_y, j_cb, j_cr;
  coord_t     j_row, j_col;

  logic take;
  assign take = byte_valid && timing.active_line;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_CB;
      col <= '0;
      row <= '0;
      line_counted <= 1'b0;
      j_valid <= 1'b0;
      cb <= '0; y1 <= '0; cr <= '0;
      j_y <= '0; j_cb <= '0; j_cr <= '0; j_row <= '0; j_col <= '0;
    end else begin
      j_valid <= 1'b0;
      // line numbering: zero during vertical blanking, +1 after each active line
      if (timing.vsync) begin
        row <= '0;
        line_counted <= 1'b0;
      end else if (timing.eav && line_counted) begin
        row <= row + 1'b1;
        line_counted <= 1'b0;
      end
      if (timing.sav) begin
        // the first Cb may arrive in the same cycle as the SAV pulse
        col <= '0;
        if (take) begin
          cb <= byte_in; state <= S_Y1; line_counted <= 1'b1;
        end else begin
          state <= S_CB;
        end
      end else begin
        unique case (state)
          S_CB: if (take) begin cb <= byte_in; state <= S_Y1; line_counted <= 1'b1; end
          S_Y1: if (take) begin y1 <= byte_in; state <= S_CR; end
          S_CR: if (take) begin
            cr <= byte_in; state <= S_Y2;
            j_valid <= (32'(row) < IMG_H); j_y <= y1; j_cb <= cb; j_cr <= byte_in;
            j_row <= row; j_col <= col;
          end
          S_Y2: if (take) begin
            j_valid <= (32'(row) < IMG_H); j_y <= byte_in; j_cb <= cb; j_cr <= cr;
            j_row <= row; j_col <= col + 1'b1;
            col <= col + coord_t'(2);
            state <= (32'(col) + 2 >= IMG_W) ? S_EAV : S_CB;
          end
          S_EAV: ;  // wait for the next SAV (handled above)
          default: state <= S_CB;
        endcase
      end
    end
  end

  // stage 1: offsets and luma scaling
  logic               s1_valid;
  logic signed [19:0] s1_y, s1_cr, s1_cb;
  coord_t             s1_row, s1_col;
  // stage 2: products
  logic               s2_valid;
  logic signed [19:0] s2_y, s2_rcr, s2_gcr, s2_gcb, s2_bcb;
  coord_t             s2_row, s2_col;
  always_ff @(posedge clk) begin
    if (rst) begin
      s1_valid <= 1'b0; s2_valid <= 1'b0; pix_valid <= 1'b0; field_start <= 1'b0;
    end else begin
      s1_valid <= j_valid;
      s2_valid <= s1_valid;
      pix_valid <= s2_valid;
      field_start <= s2_valid && s2_row == '0 && s2_col == '0;
    end
    s1_y   <= 20'sd298 * (20'($signed({1'b0, j_y})) - 20'sd16);
    s1_cr  <= 20'($signed({1'b0, j_cr})) - 20'sd128;
    s1_cb  <= 20'($signed({1'b0, j_cb})) - 20'sd128;
    s1_row <= j_row; s1_col <= j_col;

    s2_y   <= s1_y;
    s2_rcr <= 20'sd409 * s1_cr;
    s2_gcr <= 20'sd208 * s1_cr;
    s2_gcb <= 20'sd100 * s1_cb;
    s2_bcb <= 20'sd517 * s1_cb;
    s2_row <= s1_row; s2_col <= s1_col;

    // stage 3: sums, rounding and clipping
    pix_rgb.r <= clip8((s2_y + s2_rcr + 20'sd128) >>> 8);
    pix_rgb.g <= clip8((s2_y - s2_gcr - s2_gcb + 20'sd128) >>> 8);
    pix_rgb.b <= clip8((s2_y + s2_bcb + 20'sd128) >>> 8);
    pix_row <= s2_row;
    pix_col <= s2_col;
  end

endmodule
