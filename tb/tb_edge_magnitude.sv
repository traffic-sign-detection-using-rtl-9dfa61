// tb_edge_magnitude -- checks max + min/2 and the threshold compare, including
// the pair (261, 229) -> 375.
module tb_edge_magnitude;
  logic clk = 0;
  always #5 clk = ~clk;
  logic iv, ov, e; logic [10:0] ax, ay; logic [11:0] th, mag;
  edge_magnitude dut (.clk, .in_valid(iv), .abs_gx(ax), .abs_gy(ay), .thresh(th), .out_valid(ov), .mag, .edge_out(e));

  int checks = 0, failures = 0, n_edge = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic one(input int x, input int y, input int t);
    int m;
    m = (x > y) ? x + y / 2 : y + x / 2;
    ax <= 11'(x); ay <= 11'(y); th <= 12'(t); iv <= 1;
    @(posedge clk); iv <= 0; @(negedge clk);
    check(ov && int'(mag) == m && e == (m > t), $sformatf("%0d %0d -> %0d exp %0d", x, y, mag, m));
    if (e) n_edge++;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    iv = 0; ax = 0; ay = 0; th = 0;
    @(posedge clk);
    one(261, 229, 200);
    one(229, 261, 375);
    one(0, 0, 0);
    one(1020, 1020, 1000);
    for (int i = 0; i < 300; i++) one($urandom_range(0, 1020), $urandom_range(0, 1020), $urandom_range(0, 1530));
    check(n_edge > 50, "edges seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
