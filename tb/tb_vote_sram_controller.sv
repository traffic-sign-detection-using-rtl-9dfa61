// tb_vote_sram_controller -- drives votes into the controller (small 8x4
// field, behavioural SRAM with 2-cycle read latency) and compares the O_n
// readout stream with a reference count array. Checks: 14 cycles per vote
// when votes queue back to back, saturation at 255, FIFO overflow dropping
// (and flagging) votes, readout order/coordinates, the clearing of O_n by
// the readout (a second readout must be all zero), votes served between the
// words of a running readout, and readout_done.
module tb_vote_sram_controller;
  import tsd_pkg::*;
  localparam int W = 16, H = 8, NW = W * H / 4;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic vv, ie, ovf, en, we, onv, busy, rdone; logic [17:0] va, sa; logic [1:0] vl;
  logic [31:0] wd, rd; logic [7:0] ond; coord_t onr, onc;
  vote_sram_controller #(.W(W), .H(H)) dut (.clk, .rst, .vote_valid(vv), .vote_addr(va), .vote_lane(vl),
    .image_end(ie), .vote_overflow(ovf), .sram_en(en), .sram_we(we), .sram_addr(sa), .sram_wdata(wd),
    .sram_rdata(rd), .on_valid(onv), .on_data(ond), .on_row(onr), .on_col(onc), .readout_busy(busy),
    .readout_done(rdone));
  sram_model #(.WORDS(NW), .READ_LAT(2)) u_sram (.clk, .en, .we, .addr(sa), .wdata(wd), .rdata(rd));

  int checks = 0, failures = 0, n_ovf = 0, n_drop = 0, n_done = 0, n_on = 0;
  int ref_cnt [H][W];
  int seen [H][W];
  logic we_q; longint last_we_t, we_gap; int n_gap14;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(negedge clk) if (!rst) begin
    if (ovf) n_ovf++;
    if (rdone) n_done++;
    if (onv) begin
      int r, c; r = onr; c = onc;
      check(r < H && c < W, "readout coordinates");
      if (r < H && c < W) begin
        check(int'(ond) == ref_cnt[r][c], $sformatf("O(%0d,%0d)=%0d exp %0d", r, c, ond, ref_cnt[r][c]));
        check(r * W + c == n_on % (W * H), "readout order");
        seen[r][c]++;
      end
      n_on++;
    end
    // spacing of write accesses (rising edge of sram_we)
    if (we && !we_q && !busy) begin
      if (last_we_t != 0 && ($time - last_we_t) / 10 == 14) n_gap14++;
      last_we_t = $time;
    end
    we_q = we;
  end

  task automatic vote(input int r, input int c);
    vv = 1; va = 18'(r * (W / 4) + c / 4); vl = 2'(c % 4);
    if (dut.full) n_drop++;
    else if (ref_cnt[r][c] < 255) ref_cnt[r][c]++;
    @(negedge clk); vv = 0;
  endtask

  task automatic readout();
    int prev; prev = n_done;
    ie = 1; @(negedge clk); ie = 0;
    while (n_done == prev) @(negedge clk);
    repeat (3) @(negedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vv = 0; ie = 0; va = 0; vl = 0; we_q = 0; last_we_t = 0; n_gap14 = 0;
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) begin ref_cnt[r][c] = 0; seen[r][c] = 0; end
    repeat (3) @(posedge clk); rst <= 0; @(negedge clk);
    // 1: a burst of 20 votes: FIFO (8) fills, later ones are dropped
    for (int i = 0; i < 20; i++) vote(1, 5);
    repeat (400) @(negedge clk);
    check(n_drop > 0 && n_ovf == n_drop, $sformatf("overflow flagged %0d dropped %0d", n_ovf, n_drop));
    check(n_gap14 >= 5, $sformatf("back-to-back votes 14 cycles apart: %0d", n_gap14));
    // 2: saturation
    for (int i = 0; i < 300; i++) begin vote(3, 7); repeat (14) @(negedge clk); end
    // 3: random votes at a sustainable rate
    for (int i = 0; i < 200; i++) begin vote($urandom_range(0, H - 1), $urandom_range(0, W - 1)); repeat ($urandom_range(8, 20)) @(negedge clk); end
    repeat (200) @(negedge clk);
    check(ref_cnt[3][7] == 255, "reference saturates");
    readout();
    check(n_on == W * H && n_done == 1, $sformatf("first readout %0d values", n_on));
    // 4: second readout without votes must read zeros (cleared); while it
    // runs, 12 votes go to pixel (0,0), whose word has already been read.
    // They must be served between readout words (no overflow) and appear in
    // the third readout.
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) ref_cnt[r][c] = 0;
    begin
      int prev, ovf0, on0; prev = n_done; ovf0 = n_ovf; on0 = n_on;
      ie = 1; @(negedge clk); ie = 0;
      while (n_on < on0 + 8) @(negedge clk);
      for (int i = 0; i < 12; i++) begin
        vv = 1; va = 18'd0; vl = 2'd0; @(negedge clk); vv = 0;
        repeat (15) @(negedge clk);
        check(busy, "votes arrive during the readout");
      end
      while (n_done == prev) @(negedge clk);
      repeat (3) @(negedge clk);
      check(n_ovf == ovf0, "votes served between readout words");
    end
    check(n_on == 2 * W * H && n_done == 2, "second readout");
    ref_cnt[0][0] = 12;
    readout();
    check(n_on == 3 * W * H && n_done == 3, "third readout");
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) check(seen[r][c] == 3, "every pixel read out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
