// tb_window_3x3 -- checks that the window holds the last three columns in
// order (column 0 oldest) and ignores cycles without in_valid.
module tb_window_3x3;
  logic clk = 0;
  always #5 clk = ~clk;
  logic iv, ov; logic [7:0] t, m, b; logic [2:0][2:0][7:0] win;
  window_3x3 #(.DW(8)) dut (.clk, .in_valid(iv), .col_top(t), .col_mid(m), .col_bot(b), .out_valid(ov), .win);

  int checks = 0, failures = 0;
  logic [7:0] hist [$];   // columns as packed {t,m,b} triples
  logic [23:0] cols [$];
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    iv = 0; t = 0; m = 0; b = 0;
    @(posedge clk);
    for (int i = 0; i < 40; i++) begin
      logic [23:0] c; c = 24'($urandom);
      iv <= 1; {t, m, b} <= c; cols.push_back(c);
      @(posedge clk); iv <= 0;
      @(negedge clk);
      check(ov, "valid follows input");
      if (i >= 2) begin
        for (int k = 0; k < 3; k++) begin
          logic [23:0] e; e = cols[cols.size() - 3 + k];
          check(win[0][k] == e[23:16] && win[1][k] == e[15:8] && win[2][k] == e[7:0], $sformatf("col %0d at %0d", k, i));
        end
      end
      if (i % 4 == 0) begin
        logic [2:0][2:0][7:0] keep; keep = win;
        t <= 8'hAA; @(posedge clk); @(negedge clk);
        check(!ov && win == keep, "hold without valid");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
