// divider -- pipelined signed-by-unsigned integer divider.
//
// quot = num / den, truncated toward zero (num signed, den > 0). The first
// stage takes |num| and the sign, NUM_W restoring-division stages each produce
// one quotient bit (shift the remainder left by one dividend bit, subtract the
// divisor if it fits), a final stage restores the sign, and extra register
// stages pad the latency to LATENCY. A new division can start every cycle;
// tag travels alongside unchanged.
//
// Used twice to form n*Gx/|g| and n*Gy/|g|. The 18-cycle latency follows the
// described divider; its restoring, fully pipelined insides are this design's
// (the original is a vendor core). Truncation reproduces 4176/375 = 11 and
// 3664/375 = 9.
module divider #(
  parameter int unsigned NUM_W   = 16,
  parameter int unsigned DEN_W   = 16,
  parameter int unsigned TAG_W   = 1,
  parameter int unsigned LATENCY = 18
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic signed [NUM_W-1:0] num,
  input  logic [DEN_W-1:0]        den,
  input  logic [TAG_W-1:0]        tag,
  output logic                    out_valid,
  output logic signed [NUM_W-1:0] quot,
  output logic [TAG_W-1:0]        tag_out
);

  localparam int unsigned CORE = NUM_W + 2;          // abs + bits + sign
  localparam int unsigned PAD  = (LATENCY > CORE) ? LATENCY - CORE : 0;

  // stage k (1..NUM_W+1) registers
  logic             v   [NUM_W+2];
  logic             neg [NUM_W+2];
  logic [NUM_W-1:0] dvd [NUM_W+2];   // remaining dividend bits, MSB first
  logic [NUM_W-1:0] q   [NUM_W+2];
  logic [DEN_W:0]   rem [NUM_W+2];
  logic [DEN_W-1:0] dv  [NUM_W+2];
  logic [TAG_W-1:0] tg  [NUM_W+2];

  always_ff @(posedge clk) begin
    // stage 0 : absolute value
    v[0]   <= in_valid;
    neg[0] <= num[NUM_W-1];
    dvd[0] <= num[NUM_W-1] ? NUM_W'(-num) : NUM_W'(num);
    q[0]   <= '0;
    rem[0] <= '0;
    dv[0]  <= den;
    tg[0]  <= tag;
    // stages 1..NUM_W : one quotient bit each
    for (int k = 1; k <= NUM_W; k++) begin
      logic [DEN_W:0] trial;
      trial = {rem[k-1][DEN_W-1:0], dvd[k-1][NUM_W-1]};
      v[k]   <= v[k-1];
      neg[k] <= neg[k-1];
      dv[k]  <= dv[k-1];
      tg[k]  <= tg[k-1];
      dvd[k] <= dvd[k-1] << 1;
      if (trial >= {1'b0, dv[k-1]}) begin
        rem[k] <= trial - {1'b0, dv[k-1]};
        q[k]   <= {q[k-1][NUM_W-2:0], 1'b1};
      end else begin
        rem[k] <= trial;
        q[k]   <= {q[k-1][NUM_W-2:0], 1'b0};
      end
    end
    // stage NUM_W+1 : sign
    v[NUM_W+1]   <= v[NUM_W];
    q[NUM_W+1]   <= neg[NUM_W] ? -q[NUM_W] : q[NUM_W];
    tg[NUM_W+1]  <= tg[NUM_W];
    neg[NUM_W+1] <= 1'b0;
    dvd[NUM_W+1] <= '0;
    rem[NUM_W+1] <= '0;
    dv[NUM_W+1]  <= '0;
    if (rst) for (int k = 0; k <= NUM_W + 1; k++) v[k] <= 1'b0;
  end

  // latency padding
  logic             pv [PAD+1];
  logic [NUM_W-1:0] pq [PAD+1];
  logic [TAG_W-1:0] pt [PAD+1];

  always_comb begin
    pv[0] = v[NUM_W+1];
    pq[0] = q[NUM_W+1];
    pt[0] = tg[NUM_W+1];
  end

  for (genvar i = 1; i <= PAD; i++) begin : g_pad
    always_ff @(posedge clk) begin
      pv[i] <= rst ? 1'b0 : pv[i-1];
      pq[i] <= pq[i-1];
      pt[i] <= pt[i-1];
    end
  end

  assign out_valid = pv[PAD];
  assign quot      = $signed(pq[PAD]);
  assign tag_out   = pt[PAD];

endmodule
