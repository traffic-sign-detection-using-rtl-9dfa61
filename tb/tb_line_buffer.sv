// tb_line_buffer -- checks that each input pixel comes out together with the
// pixels of the same column in the two previous lines, one cycle later.
module tb_line_buffer;
  import tsd_pkg::*;
  localparam int W = 10, H = 6;
  logic clk = 0;
  always #5 clk = ~clk;

  logic iv, ov; logic [7:0] ip, ot, om, ob; coord_t ic, oc;
  line_buffer #(.W(W), .DW(8)) dut (.clk, .in_valid(iv), .in_pix(ip), .in_col(ic),
    .out_valid(ov), .out_col(oc), .out_top(ot), .out_mid(om), .out_bot(ob));

  int checks = 0, failures = 0, n_out = 0;
  logic [7:0] img [H][W];
  int cur_r = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int out_r [$];
  always @(negedge clk) if (ov) begin
    int r; r = out_r.pop_front();
    check(ob == img[r][oc], "bottom");
    if (r >= 1) check(om == img[r-1][oc], $sformatf("mid r%0d c%0d", r, oc));
    if (r >= 2) check(ot == img[r-2][oc], $sformatf("top r%0d c%0d", r, oc));
    n_out++;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    iv = 0; ip = 0; ic = 0;
    @(negedge clk);
    // inputs change at falling edges only
    for (int r = 0; r < H; r++) begin
      for (int c = 0; c < W; c++) begin
        img[r][c] = 8'($urandom);
        iv = 1; ip = img[r][c]; ic = coord_t'(c); out_r.push_back(r);
        @(negedge clk);
        iv = 0;
        if ((r + c) % 3 == 0) @(negedge clk);
      end
      repeat (4) @(negedge clk);   // horizontal blanking
    end
    repeat (3) @(posedge clk);
    check(n_out == W * H, "count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
