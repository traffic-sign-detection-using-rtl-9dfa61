// tb_address_logic -- checks the affected-pixel coordinates, SRAM word address
// (row * W/4 + col / 4), byte lane (col mod 4), the dropping of votes outside
// the field and the 2-cycle latency. Starts with row 0 + 9, columns 3..6 + 11,
// which give addresses 1623, 1623, 1623, 1624 and lanes 2, 3, 0, 1.
module tb_address_logic;
  import tsd_pkg::*;
  localparam int W = 720, H = 288;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic iv, ov; coord_t r, c, rs, cs; logic signed [15:0] b1, b2; logic [17:0] addr; logic [2:0] dm;
  address_logic #(.W(W), .H(H)) dut (.clk, .rst, .in_valid(iv), .satir_no(r), .sutun_no(c), .bolum1_in(b1),
    .bolum2_in(b2), .output_valid(ov), .sram_address(addr), .data_mod(dm), .satir_s(rs), .sutun_s(cs));

  int checks = 0, failures = 0, n_out = 0, n_drop = 0;
  typedef struct { int r, c; longint t; } it_t;
  it_t pend [$];
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(negedge clk) if (!rst && ov) begin
    it_t e; e = pend.pop_front();
    check(int'(addr) == e.r * (W / 4) + e.c / 4 && int'(dm) == e.c % 4,
          $sformatf("r%0d c%0d -> addr %0d lane %0d", e.r, e.c, addr, dm));
    check(($time - e.t) / 10 == 2, "latency");
    n_out++;
  end

  task automatic one(input int row, input int col, input int dc, input int dr);
    int tr, tc;
    iv = 1; r = coord_t'(row); c = coord_t'(col); b1 = 16'(dc); b2 = 16'(dr);
    tr = row + dr; tc = col + dc;
    if (tr >= 0 && tr < H && tc >= 0 && tc < W) pend.push_back('{tr, tc, $time});
    else n_drop++;
    @(negedge clk); iv = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    iv = 0; r = 0; c = 0; b1 = 0; b2 = 0;
    repeat (3) @(posedge clk); rst <= 0; @(negedge clk);
    for (int k = 3; k <= 6; k++) one(0, k, 11, 9);
    one(0, 0, -1, 0); one(287, 719, 0, 1); one(5, 719, 1, 0); one(0, 5, 0, -16);
    for (int i = 0; i < 300; i++) begin
      one($urandom_range(0, H - 1), $urandom_range(0, W - 1), int'($urandom_range(0, 32)) - 16, int'($urandom_range(0, 32)) - 16);
      if (i % 5 == 0) @(negedge clk);
    end
    repeat (4) @(negedge clk);
    check(pend.size() == 0 && n_drop >= 4, $sformatf("pending %0d dropped %0d", pend.size(), n_drop));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
