// tb_divider -- random signed/unsigned divisions against the language's own
// truncating division, one per cycle, with the 18-cycle latency checked;
// includes 4176/375 = 11 and 3664/375 = 9.
module tb_divider;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic iv, ov; logic signed [15:0] num, q; logic [15:0] den; logic [7:0] tag, tago;
  divider #(.NUM_W(16), .DEN_W(16), .TAG_W(8), .LATENCY(18)) dut (.clk, .rst, .in_valid(iv), .num, .den, .tag,
    .out_valid(ov), .quot(q), .tag_out(tago));

  int checks = 0, failures = 0, n_out = 0;
  typedef struct { int n, d, tg; longint t; } it_t;
  it_t pend [$];
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(negedge clk) if (!rst && ov) begin
    it_t e; int eq;
    e = pend.pop_front();
    eq = e.n / e.d;
    check(int'(q) == eq && int'(tago) == e.tg, $sformatf("%0d / %0d = %0d exp %0d", e.n, e.d, q, eq));
    check(($time - e.t) / 10 == 18, $sformatf("latency %0d", ($time - e.t) / 10));
    n_out++;
  end

  task automatic one(input int n, input int d);
    iv = 1; num = 16'(n); den = 16'(d); tag = 8'(pend.size() + n_out);
    pend.push_back('{n, d, int'(tag), $time});
    @(negedge clk); iv = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    iv = 0; num = 0; den = 1; tag = 0;
    repeat (3) @(posedge clk); rst <= 0; @(negedge clk);
    one(4176, 375); one(3664, 375); one(-4176, 375); one(-16320, 1530); one(16, 1);
    for (int i = 0; i < 400; i++) begin
      int d; d = (i % 3 == 0) ? $urandom_range(1, 2000) : $urandom_range(1, 65535);
      one(int'($urandom_range(0, 65535)) - 32768, d);
      if (i % 9 == 0) @(negedge clk);
    end
    repeat (25) @(negedge clk);
    check(n_out == 405, $sformatf("outputs %0d", n_out));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
