// i2c_config -- start-up register loader for the video decoder and encoder.
//
// After reset it walks a table of N_ENTRIES entries, each {7-bit device
// address, 8-bit register, 8-bit value}, and writes every entry with one
// i2c_master transaction. The table is read through tbl_index / tbl_entry (a
// ROM outside this block, read combinationally), so the chip settings can be
// changed without touching this logic. done rises after the last entry;
// error is set if any write was not acknowledged.
//
// Loading the decoder's and encoder's settings over I2C at start-up is as
// described; the register values themselves are not part of this design.
module i2c_config #(
  parameter int unsigned N_ENTRIES = 16,
  parameter int unsigned CLK_HZ    = 24_576_000,
  parameter int unsigned TICK_HZ   = 384_000
) (
  input  logic        clk,
  input  logic        rst,
  output logic [7:0]  tbl_index,
  input  logic [22:0] tbl_entry,   // {dev[6:0], reg[7:0], value[7:0]}
  output logic        done,
  output logic        error,
  output logic        scl_oe,
  output logic        sda_oe,
  input  logic        scl_in,
  input  logic        sda_in
);

  typedef enum logic [1:0] {LOAD, WAIT, FINISHED} state_t;
  state_t state;
  logic   m_start, m_busy, m_done, m_err;

  i2c_master #(.CLK_HZ(CLK_HZ), .TICK_HZ(TICK_HZ)) u_master (
    .clk, .rst, .start(m_start),
    .dev_addr(tbl_entry[22:16]), .reg_addr(tbl_entry[15:8]), .data(tbl_entry[7:0]),
    .busy(m_busy), .done(m_done), .ack_error(m_err),
    .scl_oe, .sda_oe, .scl_in, .sda_in
  );

  assign m_start = state == LOAD && !m_busy;
  assign done    = state == FINISHED;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= (N_ENTRIES == 0) ? FINISHED : LOAD;
      tbl_index <= '0;
      error <= 1'b0;
    end else begin
      unique case (state)
        LOAD: if (!m_busy) state <= WAIT;
        WAIT: if (m_done) begin
          if (m_err) error <= 1'b1;
          if (32'(tbl_index) == N_ENTRIES - 1) state <= FINISHED;
          else begin
            tbl_index <= tbl_index + 1'b1;
            state <= LOAD;
          end
        end
        FINISHED: ;
        default: state <= LOAD;
      endcase
    end
  end

endmodule
