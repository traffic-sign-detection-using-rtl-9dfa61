// tb_vote_gaussian -- streams random vote counts (small 10x7 field) and
// compares the candidate list with a direct evaluation: F = min(O, 16),
// 3x3 Gaussian [1 2 1; 2 4 2; 1 2 1], candidate if S > shape_thresh.
// Checks coordinates, scores, the 4-cycle latency and the candidate count.
module tb_vote_gaussian;
  import tsd_pkg::*;
  localparam int W = 10, H = 7, TH = 50;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic iv, cv; logic [7:0] on; coord_t ir, ic, cr, cc; logic [9:0] sc;
  vote_gaussian #(.W(W), .H(H)) dut (.clk, .rst, .shape_thresh(10'(TH)), .in_valid(iv), .in_on(on), .in_row(ir),
    .in_col(ic), .cand_valid(cv), .cand_row(cr), .cand_col(cc), .cand_score(sc));

  int checks = 0, failures = 0, n_exp = 0, n_got = 0;
  int o [H][W];
  longint t_in [H][W];
  typedef struct { int r, c, s; } cand_t;
  cand_t exp_q [$];
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  function automatic int fv(input int r, input int c);
    return o[r][c] < 16 ? o[r][c] : 16;
  endfunction

  always @(negedge clk) if (!rst && cv) begin
    cand_t e;
    check(exp_q.size() > 0, "unexpected candidate");
    if (exp_q.size() > 0) begin
      e = exp_q.pop_front();
      check(int'(cr) == e.r && int'(cc) == e.c && int'(sc) == e.s,
            $sformatf("cand r%0d c%0d s%0d exp r%0d c%0d s%0d", cr, cc, sc, e.r, e.c, e.s));
      check(($time - t_in[e.r+1][e.c+1]) / 10 == 4, "latency");
    end
    n_got++;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    iv = 0; on = 0; ir = 0; ic = 0;
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) o[r][c] = ($urandom_range(0, 3) == 0) ? $urandom_range(5, 40) : $urandom_range(0, 2);
    for (int r = 1; r < H - 1; r++) for (int c = 1; c < W - 1; c++) begin
      int s;
      s = fv(r-1,c-1) + fv(r-1,c+1) + fv(r+1,c-1) + fv(r+1,c+1)
        + 2 * (fv(r-1,c) + fv(r,c-1) + fv(r,c+1) + fv(r+1,c)) + 4 * fv(r,c);
      if (s > TH) begin exp_q.push_back('{r, c, s}); n_exp++; end
    end
    repeat (3) @(posedge clk); rst <= 0; @(negedge clk);
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) begin
      iv = 1; on = 8'(o[r][c]); ir = coord_t'(r); ic = coord_t'(c); t_in[r][c] = $time;
      @(negedge clk); iv = 0;
      if (c == 3) repeat (2) @(negedge clk);
    end
    repeat (8) @(negedge clk);
    check(n_exp > 3 && n_exp < (H - 2) * (W - 2), $sformatf("test has a mix (%0d candidates)", n_exp));
    check(n_got == n_exp && exp_q.size() == 0, $sformatf("candidates %0d exp %0d", n_got, n_exp));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
