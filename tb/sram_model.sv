// sram_model -- behavioural model of the board's 32-bit synchronous (ZBT)
// SRAM for simulation only.
//
// en/we/addr/wdata are sampled on each rising clock edge; a write stores the
// word, a read returns mem[addr] on rdata READ_LAT cycles later (pipelined
// ZBT behaviour). The array is cleared at time zero. The interface matches
// the SRAM bus of vote_sram_controller (split data in/out instead of one
// bidirectional bus).
module sram_model #(
  parameter int unsigned WORDS    = 51840,
  parameter int unsigned READ_LAT = 2
) (
  input  logic        clk,
  input  logic        en,
  input  logic        we,
  input  logic [17:0] addr,
  input  logic [31:0] wdata,
  output logic [31:0] rdata
);

  logic [31:0] mem [WORDS];
  logic [31:0] pipe [READ_LAT];

  initial begin
    for (int i = 0; i < WORDS; i++) mem[i] = '0;
    for (int i = 0; i < READ_LAT; i++) pipe[i] = '0;
  end

  always_ff @(posedge clk) begin
    pipe[0] <= (en && !we && addr < WORDS) ? mem[addr] : 32'hDEAD_BEEF;
    for (int i = 1; i < READ_LAT; i++) pipe[i] <= pipe[i-1];
    if (en && we && addr < WORDS) mem[addr] <= wdata;
  end

  assign rdata = pipe[READ_LAT-1];

endmodule
