// tsd_pkg -- types and constants shared by the traffic-sign detection pipeline.
//
// The pipeline carries pixels as a valid strobe plus row/column numbers of the
// 288x720 PAL field. BT.656 timing flags travel as one struct from the video
// analyzer to the blocks that follow it. Coordinate width (11 bits) follows the
// row/column signals of the magnitude and address stages; the rest are this
// design's choices.
package tsd_pkg;

  localparam int unsigned COORD_W = 11;   // row / column numbers
  localparam int unsigned GRAD_W  = 12;   // signed Sobel gradient
  localparam int unsigned SADDR_W = 18;   // external SRAM word address

  typedef logic [COORD_W-1:0] coord_t;

  typedef struct packed {
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } rgb_t;

  // Flags recovered from the BT.656 EAV/SAV codes.
  typedef struct packed {
    logic sav;          // pulse: SAV code just completed (next byte is Cb0)
    logic eav;          // pulse: EAV code just completed
    logic f;            // field bit of the last code
    logic v;            // vertical blanking bit of the last code
    logic h;            // 1 after EAV, 0 after SAV
    logic active_line;  // bytes between SAV and EAV of a non-blanked line
    logic active_odd;   // active video of field F=0
    logic active_even;  // active video of field F=1
    logic hsync;        // horizontal blanking (H=1)
    logic vsync;        // vertical blanking (V=1)
  } bt656_timing_t;

  // Saturating clamp of a signed value to 0..255.
  function automatic logic [7:0] clip8(input logic signed [19:0] v);
    if (v < 0)        return 8'd0;
    else if (v > 255) return 8'd255;
    else              return v[7:0];
  endfunction

endpackage
