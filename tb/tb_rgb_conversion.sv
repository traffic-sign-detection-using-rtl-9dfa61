// tb_rgb_conversion -- checks YCbCr 4:2:2 demultiplexing, the colour matrix,
// the pixel/line numbering and the 4-cycle conversion latency.
//
// A small BT.656 field (IMG_W x IMG_H, with blanking lines) of random samples
// goes through video_analyzer and rgb_conversion. Expected RGB values are
// computed here in floating point from the BT.601 coefficients and must match
// within 1 LSB.
module tb_rgb_conversion;
  import tsd_pkg::*;

  localparam int W = 8, H = 4;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic bv; logic [7:0] bi;
  bt656_timing_t t;
  logic pv, fs; rgb_t rgb; coord_t prow, pcol;

  video_analyzer u_va (.clk, .rst, .byte_valid(bv), .byte_in(bi), .timing(t));
  rgb_conversion #(.IMG_W(W), .IMG_H(H)) dut (
    .clk, .rst, .byte_valid(bv), .byte_in(bi), .timing(t),
    .pix_valid(pv), .pix_rgb(rgb), .pix_row(prow), .pix_col(pcol), .field_start(fs));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [7:0] Y [H][W], CB [H][W/2], CR [H][W/2];
  int n_pix = 0, n_fs = 0;
  longint t_y2 [$];   // cycle of each Y2 byte
  longint cyc = 0;
  always @(negedge clk) cyc++;

  function automatic int clipr(input real v);
    int i; i = $rtoi(v + 0.5 + 1000.0) - 1000;
    return i < 0 ? 0 : (i > 255 ? 255 : i);
  endfunction

  always @(negedge clk) if (!rst && pv) begin
    int r, c; real y, cb, cr; int er, eg, eb;
    r = prow; c = pcol;
    y = real'(Y[r][c]) - 16.0; cb = real'(CB[r][c/2]) - 128.0; cr = real'(CR[r][c/2]) - 128.0;
    er = clipr(1.164*y + 1.596*cr);
    eg = clipr(1.164*y - 0.813*cr - 0.391*cb);
    eb = clipr(1.164*y + 2.018*cb);
    check(r < H && c == n_pix % W && r == n_pix / W, $sformatf("order r%0d c%0d n%0d", r, c, n_pix));
    check((er - int'(rgb.r)) inside {[-1:1]} && (eg - int'(rgb.g)) inside {[-1:1]} && (eb - int'(rgb.b)) inside {[-1:1]},
          $sformatf("rgb r%0d c%0d got %0d %0d %0d exp %0d %0d %0d", r, c, rgb.r, rgb.g, rgb.b, er, eg, eb));
    if (c % 2 == 1) begin
      longint ty; ty = t_y2.pop_front();
      check(($time - ty) / 10 == 4, $sformatf("latency %0d", ($time - ty) / 10));
    end
    if (fs) n_fs++;
    n_pix++;
  end

  // byte driver: one queued byte every (gap + 1) cycles
  typedef struct { logic [7:0] b; bit y2; } qb_t;
  qb_t q [$];
  int  gap = 0, gcnt = 0;
  always @(posedge clk) begin
    if (gcnt > 0) begin
      bv <= 0; gcnt <= gcnt - 1;
    end else if (q.size() > 0) begin
      qb_t e; e = q.pop_front();
      bv <= 1; bi <= e.b; gcnt <= gap;
      if (e.y2) t_y2.push_back($time + 5);   // sampled at the next edge
    end else bv <= 0;
  end

  task automatic send(input logic [7:0] b, input bit y2 = 0);
    q.push_back('{b, y2});
  endtask

  task automatic code(input bit f, input bit v, input bit h);
    send(8'hFF); send(8'h00); send(8'h00); send({1'b1, f, v, h, 4'b0});
  endtask

  task automatic field(input int g);
    gap = g;
    for (int l = 0; l < H + 4; l++) begin
      bit v; int r; v = (l < 2) || (l >= H + 2); r = l - 2;
      code(0, v, 1);
      repeat (3) begin send(8'h80); send(8'h10); end
      code(0, v, 0);
      for (int p = 0; p < W + 2; p += 2) begin      // two extra pixels past IMG_W
        logic [7:0] cb, y1, cr, y2;
        cb = 8'($urandom_range(16, 240)); y1 = 8'($urandom_range(16, 235));
        cr = 8'($urandom_range(16, 240)); y2 = 8'($urandom_range(16, 235));
        if (!v && p < W) begin CB[r][p/2] = cb; CR[r][p/2] = cr; Y[r][p] = y1; Y[r][p+1] = y2; end
        send(cb); send(y1); send(cr); send(y2, !v && p < W);
      end
    end
    wait (q.size() == 0);
    repeat (gap + 2) @(posedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bv = 0; bi = 0;
    repeat (3) @(posedge clk); rst <= 0;
    field(0);
    repeat (10) @(posedge clk);
    check(n_pix == W * H, $sformatf("pixels %0d", n_pix));
    n_pix = 0;
    field(6);      // one byte every 7 cycles, as 27 MHz in 200 MHz
    repeat (10) @(posedge clk);
    check(n_pix == W * H, $sformatf("pixels %0d", n_pix));
    check(n_fs == 2, $sformatf("field starts %0d", n_fs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
