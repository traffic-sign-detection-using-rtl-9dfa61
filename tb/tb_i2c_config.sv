// tb_i2c_config -- the start-up loader with a 6-entry table addressed to two
// slave models (decoder at 0x20, encoder at 0x2A). Run 1: every entry must
// arrive at its slave in table order, done must rise and error stay low.
// Run 2 (after a new reset) uses a table with one absent device: the other
// writes still happen, done rises and error is set.
module tb_i2c_config;
  localparam int N = 6;
  logic clk = 0, rst = 1;
  always #20 clk = ~clk;
  logic [7:0] idx; logic [22:0] entry; logic done, err, scl_oe, sda_oe, s1_oe, s2_oe;
  wire scl = !scl_oe;
  wire sda = !(sda_oe || s1_oe || s2_oe);
  logic [22:0] table_q [N];
  assign entry = (idx < N) ? table_q[idx] : '0;
  i2c_config #(.N_ENTRIES(N)) dut (.clk, .rst, .tbl_index(idx), .tbl_entry(entry), .done, .error(err),
    .scl_oe, .sda_oe, .scl_in(scl), .sda_in(sda));
  i2c_slave_model #(.ADDR(7'h20)) u_dec (.scl, .sda, .sda_oe(s1_oe));
  i2c_slave_model #(.ADDR(7'h2A)) u_enc (.scl, .sda, .sda_oe(s2_oe));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run();
    int t; t = 0;
    rst = 1; repeat (3) @(negedge clk); rst = 0;
    while (!done && t < 60000) begin @(negedge clk); t++; end
    check(done, "done");
    repeat (10) @(negedge clk);
    check(done && scl && sda, "stays done, bus idle");
  endtask

  function automatic logic [23:0] fr(input logic [22:0] e);
    return {e[22:16], 1'b0, e[15:0]};
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    table_q[0] = {7'h20, 8'h00, 8'h04}; table_q[1] = {7'h20, 8'h1D, 8'h47}; table_q[2] = {7'h2A, 8'h00, 8'h1C};
    table_q[3] = {7'h20, 8'h3A, 8'h16}; table_q[4] = {7'h2A, 8'h02, 8'h04}; table_q[5] = {7'h2A, 8'h82, 8'hC3};
    run();
    check(!err, "no error");
    check(u_dec.frames.size() == 3 && u_enc.frames.size() == 3, "frame counts");
    if (u_dec.frames.size() == 3 && u_enc.frames.size() == 3) begin
      check(u_dec.frames[0] == fr(table_q[0]) && u_dec.frames[1] == fr(table_q[1]) && u_dec.frames[2] == fr(table_q[3]), "decoder writes in order");
      check(u_enc.frames[0] == fr(table_q[2]) && u_enc.frames[1] == fr(table_q[4]) && u_enc.frames[2] == fr(table_q[5]), "encoder writes in order");
    end
    table_q[2] = {7'h33, 8'h00, 8'h1C};
    run();
    check(err, "error for absent device");
    check(u_dec.frames.size() == 6 && u_enc.frames.size() == 5, "other writes still done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
