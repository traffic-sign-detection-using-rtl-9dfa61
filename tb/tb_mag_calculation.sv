// tb_mag_calculation -- checks magnitude, the x16 gradients, the skipping of
// zero gradients, coordinates, image_end and the 2-cycle latency, starting
// with the pair Gx = 261, Gy = 229 (magnitude 375, outputs 4176 and 3664).
module tb_mag_calculation;
  import tsd_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic iv, fd, ov, ie; logic signed [11:0] gx, gy; coord_t ir, ic, sr, sc;
  logic [15:0] mag; logic signed [15:0] xo, yo;
  mag_calculation dut (.clk, .rst, .in_valid(iv), .sobel_x_in(gx), .sobel_y_in(gy), .in_row(ir), .in_col(ic),
    .field_done(fd), .out_valid(ov), .mag_out(mag), .sobel_x_out(xo), .sobel_y_out(yo), .satir_no(sr),
    .sutun_no(sc), .image_end(ie));

  int checks = 0, failures = 0, n_exp = 0, n_out = 0, n_ie = 0;
  typedef struct { int x, y, r, c; longint t; } it_t;
  it_t q [$];
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(negedge clk) if (!rst) begin
    if (ie) n_ie++;
    if (ov) begin
      it_t e; int ax, ay, m;
      e = q.pop_front();
      ax = e.x < 0 ? -e.x : e.x; ay = e.y < 0 ? -e.y : e.y;
      m = ax >= ay ? ax + ay / 2 : ay + ax / 2;
      check(int'(mag) == m && int'(xo) == 16 * e.x && int'(yo) == 16 * e.y,
            $sformatf("%0d %0d -> %0d %0d %0d", e.x, e.y, mag, xo, yo));
      check(int'(sr) == e.r && int'(sc) == e.c, "coords");
      check(($time - e.t) / 10 == 2, "latency");
      n_out++;
    end
  end

  task automatic one(input int x, input int y, input bit last = 0);
    iv = 1; gx = 12'(x); gy = 12'(y); ir = coord_t'(n_exp % 300); ic = coord_t'(n_exp % 700); fd = last;
    if (x != 0 || y != 0) q.push_back('{x, y, n_exp % 300, n_exp % 700, $time});
    n_exp++;
    @(negedge clk);
    iv = 0; fd = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    iv = 0; fd = 0; gx = 0; gy = 0; ir = 0; ic = 0;
    repeat (3) @(posedge clk); rst <= 0; @(negedge clk);
    one(261, 229);
    @(negedge clk);
    check(mag == 16'd375 && xo == 16'sd4176 && yo == 16'sd3664, "documented example");
    one(0, 0);
    one(-1020, 1020);
    for (int i = 0; i < 200; i++) one($urandom_range(0, 2040) - 1020, (i % 5 == 0) ? 0 : $urandom_range(0, 2040) - 1020, i == 199);
    repeat (5) @(negedge clk);
    check(q.size() == 0 && n_out > 150, $sformatf("outputs %0d", n_out));
    check(n_ie == 1, "image_end once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
