// video_analyzer -- recovers video timing from an 8-bit BT.656 stream.
//
// BT.656 carries no separate sync wires: each line holds an EAV and an SAV
// code, the four bytes FF 00 00 XY, where XY = {1, F, V, H, P3..P0}. This block
// watches the last three bytes; when they are FF 00 00 the current byte is XY
// and its F (field), V (vertical blanking) and H (0 = SAV, 1 = EAV) bits are
// latched. From them it derives active_line (between an SAV and the next EAV
// of a non-blanked line), active_odd / active_even (active video of field 0 /
// field 1), and hsync / vsync (H and V levels).
//
// Interface: byte_valid qualifies byte_in (the 27 MHz decoder byte rate, as a
// strobe in the system clock). timing is registered: the sav / eav pulses and
// the new levels appear on the cycle after the XY byte is taken, so the first
// data byte after SAV already sees active_line = 1.
// The code detection follows the BT.656 standard; the protection bits P3..P0
// are not checked, which is this design's choice.
module video_analyzer
  import tsd_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  input  logic          byte_valid,
  input  logic [7:0]    byte_in,
  output bt656_timing_t timing
);

  logic [7:0] b1, b2, b3;   // b1 = previous byte, b3 = three bytes back
  logic       is_xy;

  assign is_xy = byte_valid && b3 == 8'hFF && b2 == 8'h00 && b1 == 8'h00;

  always_ff @(posedge clk) begin
    if (rst) begin
      b1 <= '0; b2 <= '0; b3 <= '0;
      timing <= '0;
      timing.v <= 1'b1;
      timing.vsync <= 1'b1;
      timing.h <= 1'b1;
      timing.hsync <= 1'b1;
    end else begin
      timing.sav <= 1'b0;
      timing.eav <= 1'b0;
      if (byte_valid) begin
        b1 <= byte_in; b2 <= b1; b3 <= b2;
      end
      if (is_xy) begin
        timing.f     <= byte_in[6];
        timing.v     <= byte_in[5];
        timing.h     <= byte_in[4];
        timing.vsync <= byte_in[5];
        timing.hsync <= byte_in[4];
        timing.sav   <= ~byte_in[4];
        timing.eav   <= byte_in[4];
        // active video runs from an SAV of a line outside vertical blanking
        // up to the following EAV
        timing.active_line <= ~byte_in[4] & ~byte_in[5];
        timing.active_odd  <= ~byte_in[4] & ~byte_in[5] & ~byte_in[6];
        timing.active_even <= ~byte_in[4] & ~byte_in[5] &  byte_in[6];
      end
    end
  end

endmodule
