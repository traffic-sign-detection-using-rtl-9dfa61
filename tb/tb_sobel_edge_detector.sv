// tb_sobel_edge_detector -- runs a small random binary-ish image through the
// edge stage and compares every interior result (gradients, magnitude, edge
// flag, coordinates) with a direct 2-D Sobel evaluation of the image. Also
// checks the 4-cycle latency, the number of results and field_done.
module tb_sobel_edge_detector;
  import tsd_pkg::*;
  localparam int W = 12, H = 8, TH = 300;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic iv, ov, e, fd; logic [7:0] ip; coord_t ir, ic, orow, ocol;
  logic signed [11:0] gx, gy; logic [11:0] mag;
  sobel_edge_detector #(.W(W), .H(H)) dut (.clk, .rst, .edge_thresh(12'(TH)), .in_valid(iv), .in_pix(ip),
    .in_row(ir), .in_col(ic), .out_valid(ov), .gx, .gy, .mag, .edge_out(e), .out_row(orow), .out_col(ocol),
    .field_done(fd));

  int checks = 0, failures = 0, n_out = 0, n_fd = 0, n_edge = 0;
  logic [7:0] img [H][W];
  longint t_in [H][W];
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(negedge clk) if (!rst) begin
    if (fd) n_fd++;
    if (ov) begin
      int r, c, ex, ey, ax, ay, m; bit ee;
      r = orow; c = ocol;
      ex = 0; ey = 0;
      for (int k = -1; k <= 1; k++) begin
        int wk; wk = (k == 0) ? 2 : 1;
        ex += wk * (int'(img[r+k][c+1]) - int'(img[r+k][c-1]));
        ey += wk * (int'(img[r+1][c+k]) - int'(img[r-1][c+k]));
      end
      ax = ex < 0 ? -ex : ex; ay = ey < 0 ? -ey : ey;
      m = ax > ay ? ax + ay / 2 : ay + ax / 2;
      ee = m > TH;
      check(r >= 1 && r <= H - 2 && c >= 1 && c <= W - 2, "interior only");
      check(int'(mag) == m && e == ee, $sformatf("mag r%0d c%0d %0d exp %0d", r, c, mag, m));
      check(int'(gx) == (ee ? ex : 0) && int'(gy) == (ee ? ey : 0), $sformatf("grad r%0d c%0d", r, c));
      check(($time - t_in[r+1][c+1]) / 10 == 4, $sformatf("latency %0d", ($time - t_in[r+1][c+1]) / 10));
      if (ee) n_edge++;
      n_out++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    iv = 0; ip = 0; ir = 0; ic = 0;
    repeat (3) @(posedge clk); rst <= 0; @(negedge clk);
    for (int f = 0; f < 2; f++) begin
      for (int r = 0; r < H; r++) for (int c = 0; c < W; c++)
        img[r][c] = (f == 0) ? (($urandom % 3 == 0) ? 8'd255 : 8'd0) : 8'($urandom);
      for (int r = 0; r < H; r++) begin
        for (int c = 0; c < W; c++) begin
          iv = 1; ip = img[r][c]; ir = coord_t'(r); ic = coord_t'(c); t_in[r][c] = $time;
          @(negedge clk);
          iv = 0;
          if (c % 4 == 1) @(negedge clk);
        end
        repeat (5) @(negedge clk);
      end
      repeat (10) @(negedge clk);
    end
    check(n_out == 2 * (W - 2) * (H - 2), $sformatf("results %0d", n_out));
    check(n_fd == 2, "field_done once per field");
    check(n_edge > 20, "edges seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
