// tb_video_analyzer -- checks EAV/SAV decoding of a short BT.656 sequence.
//
// Sends lines made of EAV, blanking, SAV and data bytes for the four F/V
// combinations, with a byte every cycle and every third cycle, and checks the
// decoded flags against the XY values that were sent.
module tb_video_analyzer;
  import tsd_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic          bv;
  logic [7:0]    bi;
  bt656_timing_t t;

  video_analyzer dut (.clk, .rst, .byte_valid(bv), .byte_in(bi), .timing(t));

  int checks = 0, failures = 0;
  int n_sav = 0, n_eav = 0;
  int active_bytes = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(negedge clk) begin
    if (t.sav) n_sav++;
    if (t.eav) n_eav++;
  end

  int gap = 0;
  task automatic send(input logic [7:0] b);
    bv <= 1'b1; bi <= b;
    @(posedge clk);
    bv <= 1'b0;
    repeat (gap) @(posedge clk);
  endtask

  function automatic logic [7:0] xy(input bit f, input bit v, input bit h);
    return {1'b1, f, v, h, 4'b0000};
  endfunction

  task automatic line(input bit f, input bit v, input int n);
    int e0, s0;
    e0 = n_eav; s0 = n_sav;
    send(8'hFF); send(8'h00); send(8'h00); send(xy(f, v, 1'b1));       // EAV
    @(negedge clk); #1;
    check(n_sav == s0, "no SAV pulse on EAV");
    check(n_eav == e0 + 1 && !t.active_line && t.hsync && t.vsync == v && t.f == f, "EAV flags");
    repeat (4) begin send(8'h80); send(8'h10); end                      // blanking
    send(8'hFF); send(8'h00); send(8'h00); send(xy(f, v, 1'b0));       // SAV
    @(negedge clk); #1;
    check(n_sav == s0 + 1 && n_eav == e0 + 1 && !t.hsync, "SAV pulse only");
    check(t.active_line == !v, "active_line after SAV");
    check(t.active_odd == (!v && !f), "active_odd");
    check(t.active_even == (!v && f), "active_even");
    check(t.vsync == v && t.f == f, "F/V levels");
    for (int i = 0; i < n; i++) begin
      send(8'h10 + 8'(i));
      @(negedge clk); #1;
      if (t.active_line) active_bytes++;
    end
    check(t.active_line == !v, "active_line holds through data");
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bv = 0; bi = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    check(!t.active_line && t.vsync, "reset state");
    for (int g = 0; g < 2; g++) begin
      gap = g * 2;
      line(0, 1, 6);
      line(0, 0, 8);
      line(1, 0, 8);
      line(1, 1, 6);
    end
    @(posedge clk);
    check(n_sav == 8 && n_eav == 8, $sformatf("code counts %0d %0d", n_sav, n_eav));
    check(active_bytes == 32, $sformatf("active bytes %0d", active_bytes));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
