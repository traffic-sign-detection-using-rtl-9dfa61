// detection_buffer -- list of detected circular-sign centres of a field.
//
// Candidate centres (S_n above threshold) come in raster order during the
// vote-image pass. Around a real sign many neighbouring pixels pass the
// threshold, and because the voting offsets are truncated the strongest
// responses form a small ring around the true centre rather than one peak.
// Each entry therefore keeps the first candidate of a cluster (its anchor)
// and the bounding box of all candidates within MERGE_DIST rows and columns
// of that anchor; the reported centre is the middle of the bounding box. A
// candidate near no stored anchor opens a new entry while fewer than MAX_DET
// are stored. start clears the working list; done copies it to the outputs,
// which then hold until the next done.
//
// Timing: one candidate per cycle; outputs change the cycle after done. The
// described design keeps its above-threshold results in block RAM; reducing
// them to a short list of cluster centres is this design's choice.
module detection_buffer
  import tsd_pkg::*;
#(
  parameter int unsigned MAX_DET    = 8,
  parameter int unsigned MERGE_DIST = 16
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      start,
  input  logic                      done,
  input  logic                      cand_valid,
  input  coord_t                    cand_row,
  input  coord_t                    cand_col,
  output logic [$clog2(MAX_DET+1)-1:0] det_count,
  output coord_t [MAX_DET-1:0]      det_row,
  output coord_t [MAX_DET-1:0]      det_col
);

  localparam int unsigned CW = $clog2(MAX_DET + 1);

  coord_t [MAX_DET-1:0] ar_q, ac_q;                  // anchors
  coord_t [MAX_DET-1:0] rmin_q, rmax_q, cmin_q, cmax_q;
  logic   [CW-1:0]      n_q;

  function automatic logic near(input coord_t a, input coord_t b);
    return (a >= b ? a - b : b - a) <= COORD_W'(MERGE_DIST);
  endfunction

  function automatic coord_t mid(input coord_t a, input coord_t b);
    logic [COORD_W:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[COORD_W:1];
  endfunction

  logic [MAX_DET-1:0] hit, first;
  always_comb begin
    for (int i = 0; i < MAX_DET; i++)
      hit[i] = (i < 32'(n_q)) && near(cand_row, ar_q[i]) && near(cand_col, ac_q[i]);
    first = hit & (~hit + 1'b1);                     // lowest-index hit only
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      n_q <= '0; det_count <= '0;
      ar_q <= '0; ac_q <= '0;
      rmin_q <= '0; rmax_q <= '0; cmin_q <= '0; cmax_q <= '0;
      det_row <= '0; det_col <= '0;
    end else begin
      if (start) begin
        n_q <= '0;
      end else if (cand_valid) begin
        if (hit != '0) begin
          for (int i = 0; i < MAX_DET; i++)
            if (first[i]) begin
              if (cand_row < rmin_q[i]) rmin_q[i] <= cand_row;
              if (cand_row > rmax_q[i]) rmax_q[i] <= cand_row;
              if (cand_col < cmin_q[i]) cmin_q[i] <= cand_col;
              if (cand_col > cmax_q[i]) cmax_q[i] <= cand_col;
            end
        end else if (32'(n_q) < MAX_DET) begin
          ar_q[n_q]   <= cand_row; ac_q[n_q]   <= cand_col;
          rmin_q[n_q] <= cand_row; rmax_q[n_q] <= cand_row;
          cmin_q[n_q] <= cand_col; cmax_q[n_q] <= cand_col;
          n_q <= n_q + 1'b1;
        end
      end
      if (done) begin
        det_count <= n_q;
        for (int i = 0; i < MAX_DET; i++) begin
          det_row[i] <= mid(rmin_q[i], rmax_q[i]);
          det_col[i] <= mid(cmin_q[i], cmax_q[i]);
        end
      end
    end
  end

endmodule
