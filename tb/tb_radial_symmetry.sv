// tb_radial_symmetry -- the edge stage and the radial-symmetry detector on a
// small 64x48 field with the behavioural SRAM. Field 1 holds a bright disc of
// radius 16 centred at row 24, column 32: the edge pixels must all vote (no
// FIFO overflow at one pixel per 16 cycles), the vote count must equal the
// number of edge pixels whose target lies inside the field, and exactly one
// sign must be reported within 2 pixels of the centre. Field 2 is blank and
// must clear the list (O_n was cleared by the first readout). Field 3 runs
// with vote_enable low: no votes and no readout.
module tb_radial_symmetry;
  import tsd_pkg::*;
  localparam int W = 64, H = 48, CR = 24, CC = 32, RAD = 16, GAP = 16;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic iv, ven; logic [7:0] ip; coord_t ir, ic;
  logic sv, se, sfd; logic signed [11:0] sgx, sgy; logic [11:0] smag; coord_t sr, scol;
  sobel_edge_detector #(.W(W), .H(H)) u_sobel (.clk, .rst, .edge_thresh(12'd100), .in_valid(iv), .in_pix(ip),
    .in_row(ir), .in_col(ic), .out_valid(sv), .gx(sgx), .gy(sgy), .mag(smag), .edge_out(se), .out_row(sr),
    .out_col(scol), .field_done(sfd));

  logic en, we, busy, rdone, ovf, vst, cst; logic [17:0] sa; logic [31:0] wd, rd;
  logic [3:0] dcnt; coord_t [7:0] drow, dcol;
  radial_symmetry #(.W(W), .H(H), .MAX_DET(8)) dut (.clk, .rst, .vote_enable(ven), .shape_thresh(10'd50),
    .in_valid(sv), .in_gx(sgx), .in_gy(sgy), .in_row(sr), .in_col(scol), .field_done(sfd),
    .sram_en(en), .sram_we(we), .sram_addr(sa), .sram_wdata(wd), .sram_rdata(rd),
    .readout_busy(busy), .readout_done(rdone), .vote_overflow(ovf), .det_count(dcnt), .det_row(drow),
    .det_col(dcol), .vote_strobe(vst), .cand_strobe(cst));
  sram_model #(.WORDS(W * H / 4), .READ_LAT(2)) u_sram (.clk, .en, .we, .addr(sa), .wdata(wd), .rdata(rd));

  int checks = 0, failures = 0;
  int n_edge_in = 0, n_votes = 0, n_ovf = 0, n_done = 0, n_cand = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // reference: edge pixels whose target p + 16*g/|g| is inside the field
  always @(negedge clk) if (!rst) begin
    if (sv && se && ven) begin
      int ax, ay, m, tr, tc;
      ax = sgx < 0 ? -int'(sgx) : int'(sgx); ay = sgy < 0 ? -int'(sgy) : int'(sgy);
      m = ax >= ay ? ax + ay / 2 : ay + ax / 2;
      tr = int'(sr) + (16 * int'(sgy)) / m; tc = int'(scol) + (16 * int'(sgx)) / m;
      if (tr >= 0 && tr < H && tc >= 0 && tc < W) n_edge_in++;
    end
    if (vst) n_votes++;
    if (ovf) n_ovf++;
    if (rdone) n_done++;
    if (cst) n_cand++;
  end

  task automatic send_field(input bit disc, input bit enable);
    ven = enable;
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) begin
      int d2; d2 = (r - CR) * (r - CR) + (c - CC) * (c - CC);
      iv = 1; ip = (disc && d2 <= RAD * RAD) ? 8'd255 : 8'd0; ir = coord_t'(r); ic = coord_t'(c);
      @(negedge clk); iv = 0;
      repeat (GAP - 1) @(negedge clk);
    end
    repeat (40) @(negedge clk);
  endtask

  task automatic wait_readout(input int k);
    int t; t = 0;
    while (n_done < k && t < 40000) begin @(negedge clk); t++; end
    repeat (20) @(negedge clk);
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    iv = 0; ip = 0; ir = 0; ic = 0; ven = 0;
    repeat (4) @(posedge clk); rst <= 0; @(negedge clk);
    send_field(1, 1);
    wait_readout(1);
    check(n_done == 1, "readout after field 1");
    check(n_edge_in > 60 && n_votes == n_edge_in, $sformatf("votes %0d edge pixels %0d", n_votes, n_edge_in));
    check(n_ovf == 0, "no FIFO overflow");
    check(n_cand > 0, "candidates");
    check(dcnt == 1, $sformatf("one sign found (%0d)", dcnt));
    check((int'(drow[0]) - CR) ** 2 <= 4 && (int'(dcol[0]) - CC) ** 2 <= 4,
          $sformatf("centre %0d,%0d", drow[0], dcol[0]));
    $display("disc: %0d votes, %0d candidates, centre (%0d,%0d)", n_votes, n_cand, drow[0], dcol[0]);
    send_field(0, 1);
    wait_readout(2);
    check(n_done == 2 && dcnt == 0, "blank field clears the list");
    send_field(1, 0);
    repeat (500) @(negedge clk);
    check(n_done == 2 && n_votes == n_edge_in && !busy, "no voting while disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
