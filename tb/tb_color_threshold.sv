// tb_color_threshold -- checks the red segmentation rule in both threshold
// sets, boundary cases and the 2-cycle latency.
//
// The expected decision uses real-valued ratios G/R and B/R against the
// thresholds 75 / 0.45 (normal) and 55 / 0.65 (dark), with the ratio limits
// rounded to 1/256 as the hardware stores them.
module tb_color_threshold;
  import tsd_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic dark, iv, ov; rgb_t rgb; coord_t ir, ic, orow, ocol; logic [7:0] op;
  color_threshold dut (.clk, .rst, .dark_mode(dark), .in_valid(iv), .in_rgb(rgb), .in_row(ir), .in_col(ic),
                       .out_valid(ov), .out_pix(op), .out_row(orow), .out_col(ocol));

  int checks = 0, failures = 0, n_in = 0, n_out = 0, n_red = 0, n_dark_only = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit expect_red(input rgb_t p, input bit d);
    real ra, gb, bb, gr, br;
    ra = d ? 55 : 75;
    gb = (d ? 166.0 : 115.0) / 256.0;   // 0.65, 0.45
    bb = gb;
    if (p.r == 0) return 0;
    gr = real'(p.g) / real'(p.r);
    br = real'(p.b) / real'(p.r);
    return p.r >= ra && gr <= gb && br <= bb;
  endfunction

  typedef struct { rgb_t p; bit d; int n; } item_t;
  item_t pend [$];
  longint t_in [$];

  always @(negedge clk) if (!rst && ov) begin
    item_t it; longint t0; bit e;
    it = pend.pop_front(); t0 = t_in.pop_front();
    e = expect_red(it.p, it.d);
    check(op == (e ? 8'd255 : 8'd0), $sformatf("rgb %0d %0d %0d dark %0d got %0d", it.p.r, it.p.g, it.p.b, it.d, op));
    check(orow == coord_t'(it.n / 16) && ocol == coord_t'(it.n % 16), "coordinates");
    check(($time - t0) / 10 == 2, $sformatf("latency %0d", ($time - t0) / 10));
    n_out++;
  end

  task automatic apply(input rgb_t p, input bit d);
    // called at a falling edge; inputs change at falling edges only
    iv = 1; rgb = p; dark = d; ir = coord_t'(n_in / 16); ic = coord_t'(n_in % 16);
    pend.push_back('{p, d, n_in});
    t_in.push_back($time);
    n_in++;
    if (expect_red(p, d)) n_red++;
    if (expect_red(p, 1) && !expect_red(p, 0)) n_dark_only++;
    @(negedge clk);
    iv = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    iv = 0; dark = 0; rgb = '0; ir = 0; ic = 0;
    repeat (3) @(posedge clk); rst <= 0; @(negedge clk);
    // boundaries
    apply('{r: 75, g: 33, b: 33}, 0);   // 33/75 = 0.44 -> red
    apply('{r: 74, g: 0,  b: 0},  0);   // below Ra
    apply('{r: 200, g: 90, b: 0}, 0);   // 0.45 exactly -> above 115/256 -> not red
    apply('{r: 200, g: 89, b: 89}, 0);  // 0.445 -> red
    apply('{r: 60, g: 30, b: 20}, 0);   // dark-only candidate
    apply('{r: 60, g: 30, b: 20}, 1);   // dark set -> red
    apply('{r: 255, g: 166, b: 0}, 1);  // 0.651 -> not red
    apply('{r: 255, g: 165, b: 165}, 1);
    for (int i = 0; i < 600; i++) begin
      rgb_t p;
      p.r = 8'($urandom_range(0, 255)); p.g = 8'($urandom_range(0, 200)); p.b = 8'($urandom_range(0, 200));
      apply(p, i[0]);
      if (i % 7 == 0) @(negedge clk);
    end
    repeat (5) @(posedge clk);
    check(n_out == n_in, "all pixels out");
    check(n_red > 20 && n_dark_only > 5, $sformatf("coverage red %0d dark-only %0d", n_red, n_dark_only));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
