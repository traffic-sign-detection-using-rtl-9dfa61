// i2c_master -- I2C write master for configuring the video decoder/encoder.
//
// One transaction writes one register: START, slave address with R/W = 0,
// register address, data byte, STOP. Every byte is sent MSB first and followed
// by a ninth clock on which the slave pulls SDA low to acknowledge; a missing
// acknowledge sets ack_error (the transaction still runs to STOP).
//
// Bus timing: a tick divider derives TICK_HZ from CLK_HZ (384 kHz from the
// 24.576 MHz video-card oscillator, divide by 64). Each bit takes two ticks:
// SCL low with SDA set up, then SCL high with SDA stable; an acknowledge is
// sampled at the end of its high phase. SCL runs at TICK_HZ/2 = 192 kHz. A
// slave that holds SCL low (clock stretching) delays the next low phase. START pulls SDA low while
// SCL is high; STOP releases SDA while SCL is high.
//
// The pins are open drain: scl_oe / sda_oe = 1 pulls the line low, 0 releases
// it to the pull-up; scl_in / sda_in read the bus. start is taken while busy is
// low; done pulses when the STOP has been sent.
// Frame format and START/STOP rules follow I2C as described; the two-tick bit
// timing is this design's reading of the 384 kHz / 192 kHz clock pair.
module i2c_master #(
  parameter int unsigned CLK_HZ  = 24_576_000,
  parameter int unsigned TICK_HZ = 384_000
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic [6:0] dev_addr,
  input  logic [7:0] reg_addr,
  input  logic [7:0] data,
  output logic       busy,
  output logic       done,
  output logic       ack_error,
  output logic       scl_oe,
  output logic       sda_oe,
  input  logic       scl_in,
  input  logic       sda_in
);

  localparam int unsigned DIV   = (CLK_HZ / TICK_HZ > 0) ? CLK_HZ / TICK_HZ : 1;
  localparam int unsigned DIV_W = $clog2(DIV + 1);

  logic [DIV_W-1:0] div_cnt;
  logic             tick;

  always_ff @(posedge clk) begin
    if (rst || !busy) div_cnt <= '0;
    else              div_cnt <= (32'(div_cnt) == DIV - 1) ? '0 : div_cnt + 1'b1;
  end
  assign tick = busy && 32'(div_cnt) == DIV - 1;

  typedef enum logic [2:0] {IDLE, START_A, BIT_LO, BIT_HI, STOP_A, STOP_B, STOP_C} state_t;
  state_t      state;
  logic [26:0] shreg;     // 3 bytes, each followed by an ACK slot (1 = release)
  logic [4:0]  bitn;      // 0..26

  assign busy = state != IDLE;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE; scl_oe <= 1'b0; sda_oe <= 1'b0;
      done <= 1'b0; ack_error <= 1'b0; shreg <= '0; bitn <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: begin
          scl_oe <= 1'b0; sda_oe <= 1'b0;
          if (start) begin
            shreg <= {dev_addr, 1'b0, 1'b1, reg_addr, 1'b1, data, 1'b1};
            bitn <= '0;
            ack_error <= 1'b0;
            state <= START_A;
          end
        end
        START_A: if (tick) begin sda_oe <= 1'b1; state <= BIT_LO; end   // START
        // SCL is high while waiting here (except before the first bit); a
        // slave holding SCL low (clock stretching) delays the low phase
        BIT_LO: if (tick && scl_in) begin
          // end of the high phase of an acknowledge clock: SDA must be low
          if ((bitn == 5'd9 || bitn == 5'd18) && sda_in) ack_error <= 1'b1;
          scl_oe <= 1'b1;
          sda_oe <= ~shreg[26];
          state  <= BIT_HI;
        end
        BIT_HI: if (tick) begin
          scl_oe <= 1'b0;
          shreg <= shreg << 1;
          bitn  <= bitn + 1'b1;
          state <= (bitn == 5'd26) ? STOP_A : BIT_LO;
        end
        STOP_A: if (tick && scl_in) begin
          if (sda_in) ack_error <= 1'b1;                                 // third ACK
          scl_oe <= 1'b1; sda_oe <= 1'b1; state <= STOP_B;
        end
        STOP_B: if (tick) begin scl_oe <= 1'b0; state <= STOP_C; end
        STOP_C: if (tick) begin sda_oe <= 1'b0; done <= 1'b1; state <= IDLE; end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
