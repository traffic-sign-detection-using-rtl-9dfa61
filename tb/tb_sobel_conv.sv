// tb_sobel_conv -- compares the Sobel gradients of random windows with a
// direct evaluation of the two 3x3 masks (Gy positive towards the lower line).
module tb_sobel_conv;
  import tsd_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic iv, ov; logic [2:0][2:0][7:0] win;
  logic signed [11:0] gx, gy; logic [10:0] ax, ay;
  sobel_conv dut (.clk, .in_valid(iv), .win, .out_valid(ov), .gx, .gy, .abs_gx(ax), .abs_gy(ay));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  localparam int KX [3][3] = '{'{-1, 0, 1}, '{-2, 0, 2}, '{-1, 0, 1}};
  localparam int KY [3][3] = '{'{-1, -2, -1}, '{0, 0, 0}, '{1, 2, 1}};

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    iv = 0; win = '0;
    @(posedge clk);
    for (int n = 0; n < 300; n++) begin
      int ex, ey;
      for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++)
        win[r][c] = (n < 4) ? ((n[0] ? c : r) >= 1 ? 8'd255 : 8'd0) : 8'($urandom);
      ex = 0; ey = 0;
      for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) begin
        ex += KX[r][c] * int'(win[r][c]); ey += KY[r][c] * int'(win[r][c]);
      end
      iv <= 1; @(posedge clk); iv <= 0; @(negedge clk);
      check(ov && int'(gx) == ex && int'(gy) == ey, $sformatf("g %0d %0d exp %0d %0d", gx, gy, ex, ey));
      check(int'(ax) == (ex < 0 ? -ex : ex) && int'(ay) == (ey < 0 ? -ey : ey), "abs");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
