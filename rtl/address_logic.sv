// address_logic -- positively-affected pixel and its SRAM location.
//
// The divider outputs are the rounded-down unit gradient times the radius:
// bolum1_in for the column, bolum2_in for the row. The affected pixel is
//   satir_s = satir_no + bolum2_in,   sutun_s = sutun_no + bolum1_in.
// The orientation projection image O_n keeps one 8-bit count per pixel, four
// pixels per 32-bit SRAM word, so
//   data_mod     = sutun_s mod 4              (byte lane)
//   sram_address = satir_s * (W/4) + sutun_s / 4   (W/4 = 0xB4 for W = 720).
// Affected pixels outside the H x W field are dropped.
//
// Timing: 2 cycles (coordinates, then address). The equations follow the
// described design; dropping out-of-field votes is this design's choice.
module address_logic
  import tsd_pkg::*;
#(
  parameter int unsigned W = 720,
  parameter int unsigned H = 288
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               in_valid,
  input  coord_t             satir_no,
  input  coord_t             sutun_no,
  input  logic signed [15:0] bolum1_in,
  input  logic signed [15:0] bolum2_in,
  output logic               output_valid,
  output logic [SADDR_W-1:0] sram_address,
  output logic [2:0]         data_mod,
  output coord_t             satir_s,
  output coord_t             sutun_s
);

  localparam int unsigned WORDS_PER_ROW = W / 4;

  logic signed [17:0] r_s, c_s;
  logic               s1_valid;

  always_comb begin
    r_s = 18'($signed({1'b0, satir_no})) + 18'(bolum2_in);
    c_s = 18'($signed({1'b0, sutun_no})) + 18'(bolum1_in);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      s1_valid <= 1'b0;
      output_valid <= 1'b0;
    end else begin
      s1_valid <= in_valid && r_s >= 0 && int'(r_s) < H && c_s >= 0 && int'(c_s) < W;
      output_valid <= s1_valid;
    end
    satir_s <= COORD_W'(r_s);
    sutun_s <= COORD_W'(c_s);
    data_mod     <= {1'b0, sutun_s[1:0]};
    sram_address <= SADDR_W'(satir_s * WORDS_PER_ROW) + SADDR_W'(sutun_s >> 2);
  end

endmodule
