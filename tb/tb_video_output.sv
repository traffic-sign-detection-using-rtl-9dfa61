// tb_video_output -- generates a small BT.656 field (8 pixels x 4 lines plus
// blanking and one extra active line outside the picture), decodes its timing
// with video_analyzer, and compares every output byte with a reference for
// each of the four views: camera, mask, edge map and detection boxes. Timing
// codes, blanking bytes and lines outside the picture must pass unchanged;
// the output follows the input by one cycle.
module tb_video_output;
  import tsd_pkg::*;
  localparam int W = 8, H = 4, MD = 2, BOX = 2;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic bv, ov; logic [7:0] bi, ob; bt656_timing_t tm;
  logic mv, mb, ev, eb; coord_t mc, ec;
  logic [1:0] view, dcnt; coord_t [MD-1:0] dr, dc;
  video_analyzer u_va (.clk, .rst, .byte_valid(bv), .byte_in(bi), .timing(tm));
  video_output #(.IMG_W(W), .IMG_H(H), .MAX_DET(MD), .BOX(BOX)) dut (.clk, .rst, .view, .byte_valid(bv),
    .byte_in(bi), .timing(tm), .mask_valid(mv), .mask_bit(mb), .mask_col(mc), .edge_valid(ev), .edge_bit(eb),
    .edge_col(ec), .det_count(dcnt), .det_row(dr), .det_col(dc), .out_valid(ov), .out_byte(ob));

  int checks = 0, failures = 0, n_changed = 0;
  logic [7:0] exp_q [$];
  bit mask_ref [W]; bit edge_ref [W];
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(negedge clk) if (!rst && ov) begin
    logic [7:0] e;
    check(exp_q.size() > 0, "unexpected byte");
    if (exp_q.size() > 0) begin
      e = exp_q.pop_front();
      check(ob == e, $sformatf("view %0d byte %02h exp %02h", view, ob, e));
    end
  end

  task automatic put(input logic [7:0] b, input logic [7:0] e);
    bv = 1; bi = b; exp_q.push_back(e);
    if (b != e) n_changed++;
    @(negedge clk); bv = 0;
    repeat (3) @(negedge clk);
  endtask

  task automatic code(input bit f, input bit v, input bit h);
    put(8'hFF, 8'hFF); put(8'h00, 8'h00); put(8'h00, 8'h00);
    put({1'b1, f, v, h, 4'h0}, {1'b1, f, v, h, 4'h0});
  endtask

  task automatic overlay_line();
    for (int c = 0; c < W; c++) begin
      mask_ref[c] = 1'($urandom); edge_ref[c] = 1'($urandom);
      mv = 1; mb = mask_ref[c]; mc = coord_t'(c); ev = 1; eb = edge_ref[c]; ec = coord_t'(c);
      @(negedge clk);
    end
    mv = 0; ev = 0;
  endtask

  function automatic int ad(input int a, input int b); return a > b ? a - b : b - a; endfunction

  task automatic line(input bit v, input int row);
    code(0, v, 1);                                   // EAV
    for (int i = 0; i < 4; i++) put(i[0] ? 8'h10 : 8'h80, i[0] ? 8'h10 : 8'h80);
    if (!v) overlay_line();
    code(0, v, 0);                                   // SAV
    for (int i = 0; i < 2 * W; i++) begin
      logic [7:0] b, e; int col; bit luma, box;
      b = 8'($urandom_range(1, 254)); col = i / 2; luma = i % 2;
      box = ad(row, int'(dr[0])) <= BOX && ad(col, int'(dc[0])) <= BOX;
      e = b;
      if (!v && row < H) unique case (view)
        2'd1: e = luma ? (mask_ref[col] ? 8'd235 : 8'd16) : 8'd128;
        2'd2: e = luma ? (edge_ref[col] ? 8'd235 : 8'd16) : 8'd128;
        2'd3: e = box ? b : (luma ? 8'd235 : 8'd128);
        default: e = b;
      endcase
      put(b, e);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bv = 0; bi = 0; mv = 0; mb = 0; mc = 0; ev = 0; eb = 0; ec = 0; view = 0;
    dcnt = 2'd1; dr = '0; dc = '0; dr[0] = coord_t'(2); dc[0] = coord_t'(3); dr[1] = coord_t'(40); dc[1] = coord_t'(40);
    repeat (3) @(posedge clk); rst <= 0; @(negedge clk);
    for (int vw = 0; vw < 4; vw++) begin
      view = 2'(vw);
      line(1, 0); line(1, 0);
      for (int r = 0; r <= H; r++) line(0, r);     // row H is outside the picture
      line(1, 0);
    end
    repeat (4) @(negedge clk);
    check(exp_q.size() == 0, "all bytes out");
    check(n_changed > 3 * W, "views changed the picture");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
