// tb_i2c_master -- the write master at its default clocking (24.576 MHz
// clock, 384 kHz tick) against a slave model at address 0x42. Checks the
// frame contents, START/STOP, the 192 kHz SCL (128 clocks per period), the
// acknowledge handling (no error for the slave's address, ack_error for an
// absent device), busy and the done pulse.
module tb_i2c_master;
  logic clk = 0, rst = 1;
  always #20 clk = ~clk;                     // period ~ 1/24.576 MHz, rounded
  logic st, busy, done, aerr, scl_oe, sda_oe, s_oe; logic [6:0] dev; logic [7:0] ra, dat;
  wire scl = !scl_oe;
  wire sda = !(sda_oe || s_oe);
  i2c_master dut (.clk, .rst, .start(st), .dev_addr(dev), .reg_addr(ra), .data(dat), .busy, .done,
    .ack_error(aerr), .scl_oe, .sda_oe, .scl_in(scl), .sda_in(sda));
  i2c_slave_model #(.ADDR(7'h42)) u_slave (.scl, .sda, .sda_oe(s_oe));

  int checks = 0, failures = 0, n_done = 0, cyc = 0, last_rise = -1, n_per128 = 0, n_per_other = 0;
  logic scl_q = 1;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(negedge clk) begin
    cyc++;
    if (done) n_done++;
    if (scl && !scl_q) begin
      if (last_rise >= 0 && busy) begin if (cyc - last_rise == 128) n_per128++; else n_per_other++; end
      last_rise = cyc;
    end
    scl_q = scl;
  end

  task automatic write(input logic [6:0] d, input logic [7:0] r, input logic [7:0] v);
    int k; k = n_done;
    dev = d; ra = r; dat = v; st = 1; @(negedge clk); st = 0;
    check(busy, "busy after start");
    while (n_done == k) @(negedge clk);
    last_rise = -1;
    repeat (200) @(negedge clk);
    check(!busy && scl && sda, "bus idle after STOP");
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    st = 0; dev = 0; ra = 0; dat = 0;
    repeat (3) @(posedge clk); rst <= 0; @(negedge clk);
    check(!busy && scl && sda, "idle bus");
    write(7'h42, 8'h0F, 8'hA5);
    check(!aerr, "acknowledged");
    check(u_slave.frames.size() == 1 && u_slave.frames[0] == {8'h84, 8'h0F, 8'hA5},
          $sformatf("frame %06h", u_slave.frames.size() ? u_slave.frames[0] : 0));
    write(7'h42, 8'h80, 8'h01);
    check(!aerr && u_slave.frames.size() == 2 && u_slave.frames[1] == {8'h84, 8'h80, 8'h01}, "second frame");
    write(7'h2A, 8'h12, 8'h34);
    check(aerr, "absent device gives ack_error");
    check(u_slave.frames.size() == 2, "slave ignored the other address");
    write(7'h42, 8'hFF, 8'h00);
    check(!aerr && u_slave.frames.size() == 3 && u_slave.frames[2] == {8'h84, 8'hFF, 8'h00}, "error clears");
    check(n_done == 4 && u_slave.n_start == 4 && u_slave.n_stop == 4, "START/STOP per write");
    check(n_per128 > 80 && n_per_other == 0, $sformatf("SCL period 128 clocks: %0d ok %0d other", n_per128, n_per_other));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
