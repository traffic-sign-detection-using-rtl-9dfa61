// tb_detection_buffer -- feeds clusters of candidate centres and compares the
// published list with a reference of the same merge rule: a candidate within
// 16 rows and columns of a cluster's first candidate widens that cluster's
// bounding box, otherwise it opens a new entry while fewer than 8 are stored;
// the reported centre is the middle of the box. Checks that
// the list changes only on done, that start clears it, and the 8-entry cap.
module tb_detection_buffer;
  import tsd_pkg::*;
  localparam int MD = 8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic st, dn, cv; coord_t cr, cc;
  logic [3:0] cnt; coord_t [MD-1:0] dr, dc;
  detection_buffer #(.MAX_DET(MD), .MERGE_DIST(16)) dut (.clk, .rst, .start(st), .done(dn), .cand_valid(cv),
    .cand_row(cr), .cand_col(cc), .det_count(cnt), .det_row(dr), .det_col(dc));

  int checks = 0, failures = 0;
  int m_n; int m_r [MD]; int m_c [MD]; int r0 [MD]; int r1 [MD]; int c0 [MD]; int c1 [MD];
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  function automatic int ad(input int a, input int b); return a > b ? a - b : b - a; endfunction

  task automatic cand(input int r, input int c);
    int hit; hit = -1;
    cv = 1; cr = coord_t'(r); cc = coord_t'(c);
    for (int i = 0; i < m_n; i++) if (hit < 0 && ad(r, m_r[i]) <= 16 && ad(c, m_c[i]) <= 16) hit = i;
    if (hit >= 0) begin
      if (r < r0[hit]) r0[hit] = r; if (r > r1[hit]) r1[hit] = r;
      if (c < c0[hit]) c0[hit] = c; if (c > c1[hit]) c1[hit] = c;
    end else if (m_n < MD) begin
      m_r[m_n] = r; m_c[m_n] = c; r0[m_n] = r; r1[m_n] = r; c0[m_n] = c; c1[m_n] = c; m_n++;
    end
    @(negedge clk); cv = 0;
  endtask

  task automatic publish_and_check(input string what);
    int old; old = cnt;
    @(negedge clk);
    check(cnt == 4'(old), {what, ": list holds until done"});
    dn = 1; @(negedge clk); dn = 0;
    check(int'(cnt) == m_n, $sformatf("%s: count %0d exp %0d", what, cnt, m_n));
    for (int i = 0; i < m_n; i++)
      check(int'(dr[i]) == (r0[i] + r1[i]) / 2 && int'(dc[i]) == (c0[i] + c1[i]) / 2, $sformatf("%s: entry %0d", what, i));
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    st = 0; dn = 0; cv = 0; cr = 0; cc = 0; m_n = 0;
    repeat (3) @(posedge clk); rst <= 0; @(negedge clk);
    check(cnt == 0, "empty after reset");
    // field 1: two signs, each seen as a blob of candidates
    st = 1; @(negedge clk); st = 0; m_n = 0;
    for (int r = 48; r <= 54; r++) for (int c = 58; c <= 64; c++) cand(r, c);
    for (int r = 100; r <= 103; r++) for (int c = 200; c <= 203; c++) cand(r, c);
    cand(111, 210);  // joins the second cluster, widening its box
    publish_and_check("two signs");
    check(cnt == 2 && dr[0] == 51 && dc[0] == 61 && dr[1] == 105 && dc[1] == 205, "centres at box middles");
    // field 2: more than MAX_DET separate candidates
    st = 1; @(negedge clk); st = 0; m_n = 0;
    for (int k = 0; k < 12; k++) cand(20 + 10 * k, 40 * k);
    publish_and_check("cap");
    check(cnt == MD, "capped at 8");
    // field 3: random candidates
    st = 1; @(negedge clk); st = 0; m_n = 0;
    for (int k = 0; k < 60; k++) cand($urandom_range(0, 287), $urandom_range(0, 719));
    publish_and_check("random");
    // field 4: nothing
    st = 1; @(negedge clk); st = 0; m_n = 0;
    publish_and_check("empty field");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
