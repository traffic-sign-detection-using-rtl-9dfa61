// edge_magnitude -- approximate gradient magnitude and edge threshold.
//
// Instead of sqrt(Gx^2 + Gy^2) the magnitude is estimated as
//   mag = max(|Gx|, |Gy|) + min(|Gx|, |Gy|) / 2
// (alpha = 1, beta = 1/2): one comparator picks max and min, the halving is a
// right shift (truncating), and one adder sums. A pixel is an edge when
// mag > thresh.
//
// Timing: one register stage. The estimator and its constants follow the
// described design; the threshold is a run-time input because no value is
// fixed for it.
module edge_magnitude
  import tsd_pkg::*;
(
  input  logic              clk,
  input  logic              in_valid,
  input  logic [GRAD_W-2:0] abs_gx,
  input  logic [GRAD_W-2:0] abs_gy,
  input  logic [GRAD_W-1:0] thresh,
  output logic              out_valid,
  output logic [GRAD_W-1:0] mag,
  output logic              edge_out
);

  logic [GRAD_W-2:0] mx, mn;
  logic [GRAD_W-1:0] m;

  always_comb begin
    if (abs_gx >= abs_gy) begin mx = abs_gx; mn = abs_gy; end
    else                  begin mx = abs_gy; mn = abs_gx; end
    m = GRAD_W'(mx) + GRAD_W'(mn >> 1);
  end

  always_ff @(posedge clk) begin
    out_valid <= in_valid;
    mag       <= m;
    edge_out  <= m > thresh;
  end

endmodule
