// tb_traffic_sign_detector -- end-to-end test of the whole detector at its
// default size (720 x 288 fields, 8 detections, 16 configuration entries).
//
// The testbench generates two complete 625-line BT.656 frames (1728 bytes per
// line, EAV/SAV codes with F/V/H bits, 288 active lines per field). Bytes
// come every 7 or 8 system clocks, alternating, which is the 27 MHz byte rate
// seen from a 200 MHz clock. The picture is a grey-green background with
// - a red disc of radius 16 centred at field row 100, column 360,
// - a dull red rectangle (G/R = 0.55) near the top of the field that passes
//   only the darker-scene thresholds; in field 2 its votes arrive while the
//   readout of field 1 is still running,
// - in field 3 only, one row of red/grey stripes sent at one byte per clock
//   to overload the vote queue.
// Colours are converted to YCbCr with the BT.601 equations; the two pixels
// of a Cb Y Cr Y group always share a colour.
//
// Every field votes; its O_n is read back during the next field:
//   field 1 (F=0) view 0 normal thresholds
//   field 2 (F=1) view 1 dark thresholds     readout of field 1 -> list
//   field 3 (F=0) view 3 normal thresholds   readout of field 2 -> list
//                 (+ overload row)
//   field 4 (F=1) view 2 normal thresholds   readout of field 3 -> list
//   blanking after field 4                   readout of field 4 -> list
//
// The shape threshold is 35, the lowest of the values used for real scenes:
// the synthetic disc has 2-pixel steps along its left and right edges (the
// two pixels of a group share their colour), which spreads its votes over a
// few pixels, and its smoothed score peaks between 35 and 50.
//
// Checked against values worked out here: pixels per field, segmented pixels
// per field (disc, plus the rectangle in dark mode), the detected centre
// (within 2 pixels of the disc centre; exactly one detection for field 1),
// votes in every field, the output bytes of views 0 and 3 byte by byte
// (timing codes untouched, box of +-16 around the detection, white outside),
// the use of views 1 and 2, one readout per field, and the I2C start-up load
// (16 register writes to two slave models, all acknowledged). Each mechanism
// is counted and a failure is counted for any that never happened.
module tb_traffic_sign_detector;
  import tsd_pkg::*;
  localparam int IMG_W = 720, IMG_H = 288, R0 = 100, C0 = 360, RAD = 16;
  localparam int PR0 = 4, PR1 = 13, PC0 = 100, PC1 = 139;       // dull-red rectangle
  localparam int SROW = 250;                                    // overload row

  logic clk = 0, rst = 1, clk_i2c = 0, rst_i2c = 1;
  always #2.5 clk = ~clk;             // 200 MHz
  always #20 clk_i2c = ~clk_i2c;      // ~24.576 MHz

  logic bv, dark, vv, du, ovf, sen, swe, cdone, cerr, scl_oe, sda_oe, s1_oe, s2_oe;
  logic [7:0] bi, vb, cidx; logic [11:0] eth; logic [9:0] sth; logic [1:0] view;
  logic [17:0] sa; logic [31:0] swd, srd; logic [3:0] dcnt; coord_t [7:0] drow, dcol;
  logic [22:0] centry;
  wire scl = !scl_oe;
  wire sda = !(sda_oe || s1_oe || s2_oe);

  traffic_sign_detector dut (
    .clk, .rst, .bt656_valid(bv), .bt656_in(bi), .dark_mode(dark), .edge_thresh(eth), .shape_thresh(sth),
    .view, .sram_en(sen), .sram_we(swe), .sram_addr(sa), .sram_wdata(swd), .sram_rdata(srd),
    .vout_valid(vv), .vout_byte(vb), .det_count(dcnt), .det_row(drow), .det_col(dcol), .det_update(du),
    .vote_overflow(ovf), .clk_i2c, .rst_i2c, .cfg_index(cidx), .cfg_entry(centry), .cfg_done(cdone),
    .cfg_error(cerr), .scl_oe, .sda_oe, .scl_in(scl), .sda_in(sda)
  );
  sram_model u_sram (.clk, .en(sen), .we(swe), .addr(sa), .wdata(swd), .rdata(srd));
  i2c_slave_model #(.ADDR(7'h20)) u_dec (.scl, .sda, .sda_oe(s1_oe));
  i2c_slave_model #(.ADDR(7'h2A)) u_enc (.scl, .sda, .sda_oe(s2_oe));

  // configuration table: 8 writes to each chip, value = a simple formula
  assign centry = (cidx < 16) ? {(cidx[0] ? 7'h2A : 7'h20), cidx, 8'(8'h11 * cidx)} : '0;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- picture ----------------
  int fld = 0;                       // 1..4 while a field is being sent
  function automatic int cls(input int f, input int r, input int c);
    int ce; ce = c - c % 2;          // both pixels of a pair share the colour
    if ((r - R0) * (r - R0) + (ce - C0) * (ce - C0) <= RAD * RAD) return 1;
    if (r >= PR0 && r <= PR1 && ce >= PC0 && ce <= PC1) return 2;
    if (f == 3 && r == SROW && (ce / 4) % 2 == 1 && ce >= 40 && ce < 680) return 1;
    return 0;
  endfunction
  function automatic void ycc(input int cl, output logic [7:0] y, output logic [7:0] cb, output logic [7:0] cr);
    real r, g, b, yy, bb, rr;
    case (cl)
      1: begin r = 200; g = 40;  b = 40; end
      2: begin r = 120; g = 66;  b = 50; end
      default: begin r = 90; g = 120; b = 90; end
    endcase
    yy = 16 + (65.738 * r + 129.057 * g + 25.064 * b) / 256.0;
    bb = 128 + (-37.945 * r - 74.494 * g + 112.439 * b) / 256.0;
    rr = 128 + (112.439 * r - 94.154 * g - 18.285 * b) / 256.0;
    y = 8'($rtoi(yy + 0.5)); cb = 8'($rtoi(bb + 0.5)); cr = 8'($rtoi(rr + 0.5));
  endfunction

  // ---------------- byte generator and output reference ----------------
  typedef struct { logic [7:0] b; bit care; } exp_t;
  exp_t exp_q [$];
  bit gap7 = 0;
  int n_view_bytes [4];
  int n_white [4];
  int n_out_checked = 0;

  task automatic put(input logic [7:0] b, input logic [7:0] e, input bit care, input bit fast);
    bv = 1; bi = b; exp_q.push_back('{e, care});
    @(negedge clk); bv = 0;
    if (!fast) begin
      gap7 = !gap7;
      repeat (gap7 ? 6 : 7) @(negedge clk);
    end
  endtask

  task automatic code(input bit f, input bit v, input bit h, input bit fast);
    logic [7:0] xy;
    xy = {1'b1, f, v, h, f ^ v ^ h ? 4'hD : 4'h0};   // protection bits not used by the design
    put(8'hFF, 8'hFF, 1, fast); put(8'h00, 8'h00, 1, fast); put(8'h00, 8'h00, 1, fast); put(xy, xy, 1, fast);
  endtask

  function automatic int ad(input int a, input int b); return a > b ? a - b : b - a; endfunction

  task automatic send_line(input bit f, input bit v, input int row);
    bit fast; fast = (fld == 3 && !v && row == SROW);
    code(f, v, 1, fast);
    for (int i = 0; i < 280; i++) put(i[0] ? 8'h10 : 8'h80, i[0] ? 8'h10 : 8'h80, 1, fast);
    code(f, v, 0, fast);
    for (int i = 0; i < 2 * IMG_W; i++) begin
      logic [7:0] b, e, y, cb, cr; bit care, inbox; int col;
      col = i / 2;
      if (v) begin b = i[0] ? 8'h10 : 8'h80; e = b; care = 1; end
      else begin
        ycc(cls(fld, row, col), y, cb, cr);
        b = i[0] ? y : (i[1] ? cr : cb);
        e = b; care = 1;
        inbox = 0;
        for (int k = 0; k < int'(dcnt); k++)
          if (ad(row, int'(drow[k])) <= 16 && ad(col, int'(dcol[k])) <= 16) inbox = 1;
        unique case (view)
          2'd0: e = b;
          2'd3: e = inbox ? b : (i[0] ? 8'd235 : 8'd128);
          default: care = 0;
        endcase
        n_view_bytes[view]++;
      end
      put(b, e, care, fast);
    end
  endtask

  // field F: 625-line numbering, F=0 lines 1..312, F=1 lines 313..625
  task automatic send_field(input bit f);
    int first, last, row;
    first = f ? 313 : 1; last = f ? 625 : 312; row = 0;
    for (int ln = first; ln <= last; ln++) begin
      bit v;
      v = f ? !(ln >= 336 && ln <= 623) : !(ln >= 23 && ln <= 310);
      send_line(f, v, row);
      if (!v) row++;
    end
  endtask

  always @(negedge clk) if (!rst && vv) begin
    exp_t e;
    check(exp_q.size() > 0, "output byte without input");
    if (exp_q.size() > 0) begin
      e = exp_q.pop_front();
      if (e.care) begin
        n_out_checked++;
        if (vb != e.b) begin failures++; if (failures < 10) $display("FAIL: view %0d out %02h exp %02h", view, vb, e.b); end
      end
      if (vb == 8'd235) n_white[view]++;
    end
  end

  // ---------------- mechanism counters ----------------
  int n_pix [5], n_mask [5], n_edge [5], n_votes [5], n_cand [5];
  int n_rd_during_votes = 0;
  int n_readout = 0, n_update = 0, n_ovf = 0, n_sav = 0, n_eav = 0, n_sram_rmw = 0;
  logic swe_q = 0;
  always @(negedge clk) if (!rst) begin
    if (dut.px_valid) n_pix[fld]++;
    if (dut.seg_valid && dut.seg_pix[7]) n_mask[fld]++;
    if (dut.ed_valid && dut.ed_edge) n_edge[fld]++;
    if (dut.vote_strobe) n_votes[fld]++;
    if (dut.cand_strobe) n_cand[fld]++;
    if (dut.readout_done) n_readout++;
    if (du) n_update++;
    if (ovf) n_ovf++;
    if (dut.timing.sav) n_sav++;
    if (dut.timing.eav) n_eav++;
    if (swe && !swe_q && dut.u_rs.u_ctrl.state == dut.u_rs.u_ctrl.V_WR) begin
      n_sram_rmw++;
      if (dut.readout_busy) n_rd_during_votes++;
    end
    swe_q = swe;
  end

  function automatic int expect_mask(input int f, input bit dk);
    int n; n = 0;
    for (int r = 0; r < IMG_H; r++) for (int c = 0; c < IMG_W; c++) begin
      int k; k = cls(f, r, c);
      if (k == 1 || (k == 2 && dk)) n++;
    end
    return n;
  endfunction

  function automatic bit disc_found();
    for (int k = 0; k < int'(dcnt); k++)
      if (ad(int'(drow[k]), R0) <= 2 && ad(int'(dcol[k]), C0) <= 2) return 1;
    return 0;
  endfunction

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bv = 0; bi = 0; dark = 0; eth = 12'd200; sth = 10'd35; view = 0;
    for (int i = 0; i < 5; i++) begin n_pix[i] = 0; n_mask[i] = 0; n_edge[i] = 0; n_votes[i] = 0; n_cand[i] = 0; end
    for (int i = 0; i < 4; i++) begin n_view_bytes[i] = 0; n_white[i] = 0; end
    repeat (10) @(negedge clk); rst = 0; rst_i2c = 0;

    fld = 1; view = 0; dark = 0; send_field(0);
    fld = 2; view = 1; dark = 1; send_field(1);
    check(n_readout == 1, "field 1 read out during field 2");
    check(dcnt == 1 && disc_found(), $sformatf("one detection at the disc: %0d (%0d,%0d)", dcnt, drow[0], dcol[0]));
    $display("field 1: %0d edges, %0d votes, %0d candidates, detection (%0d,%0d)", n_edge[1], n_votes[1], n_cand[2], drow[0], dcol[0]);
    fld = 3; view = 3; dark = 0; send_field(0);
    check(n_readout == 2 && disc_found(), $sformatf("field 2 read out, disc found (%0d detections)", dcnt));
    fld = 4; view = 2; dark = 0; send_field(1);
    check(n_readout == 3 && disc_found(), $sformatf("field 3 read out, disc found (%0d detections)", dcnt));
    $display("field 3: %0d votes, %0d overflows, %0d detections", n_votes[3], n_ovf, dcnt);
    fld = 0;
    while (n_update < 4) @(negedge clk);
    repeat (20) @(negedge clk);
    check(n_readout == 4 && disc_found(), "field 4 read out, disc found");

    for (int f = 1; f <= 4; f++) begin
      check(n_pix[f] == IMG_W * IMG_H, $sformatf("field %0d pixels %0d", f, n_pix[f]));
      check(n_mask[f] == expect_mask(f, f == 2), $sformatf("field %0d mask %0d exp %0d", f, n_mask[f], expect_mask(f, f == 2)));
    end
    check(n_votes[1] > 0 && n_votes[2] > 0 && n_votes[3] > n_votes[1] && n_votes[4] > 0, "votes in every field");
    check(exp_q.size() == 0 && n_out_checked > 1_000_000, $sformatf("output bytes checked %0d", n_out_checked));
    check(n_sav == 2 * 625 && n_eav == 2 * 625, $sformatf("SAV %0d EAV %0d", n_sav, n_eav));
    check(cdone && !cerr && u_dec.frames.size() == 8 && u_enc.frames.size() == 8, "I2C configuration");
    if (u_enc.frames.size() == 8) check(u_enc.frames[7] == {7'h2A, 1'b0, 8'd15, 8'(8'h11 * 15)}, "last I2C write");

    // every mechanism at least once
    check(n_sav > 0,                       "mechanism: SAV/EAV decoding");
    check(n_mask[1] > 0,                   "mechanism: colour segmentation");
    check(n_mask[2] > n_mask[1],           "mechanism: darker-scene thresholds (mode switch)");
    check(n_edge[1] > 0,                   "mechanism: edge detection");
    check(n_votes[1] > 0,                  "mechanism: voting");
    check(n_sram_rmw > 0,                  "mechanism: SRAM read-modify-write");
    check(n_ovf > 0,                       "mechanism: vote queue overflow");
    check(n_readout == 4,                  "mechanism: O_n readout and clear");
    check(n_rd_during_votes > 0,           "mechanism: readout shared with the next field's votes");
    check(n_cand[2] > 0,                   "mechanism: Gaussian and shape threshold");
    check(n_update == 4,                   "mechanism: detection list update");
    for (int v = 0; v < 4; v++) check(n_view_bytes[v] > 0, $sformatf("mechanism: view %0d", v));
    check(n_white[1] > 0 && n_white[2] > 0 && n_white[3] > 0, "overlay views draw white");
    check(cdone,                           "mechanism: I2C register load");
    $display("counts: sav %0d, pixels %0d, mask %0d/%0d, edges %0d, votes %0d, rmw %0d, overflow %0d, readouts %0d, candidates %0d, updates %0d, i2c writes %0d",
             n_sav, n_pix[1], n_mask[1], n_mask[2], n_edge[1], n_votes[1], n_sram_rmw, n_ovf, n_readout, n_cand[2], n_update,
             u_dec.frames.size() + u_enc.frames.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
