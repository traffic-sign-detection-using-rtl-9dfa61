// vote_sram_controller -- external-SRAM controller for the orientation
// projection image O_n.
//
// O_n holds one 8-bit vote count per pixel of the field, four counts per
// 32-bit SRAM word (byte lane = column mod 4). It is too large for on-chip
// RAM, hence the external ZBT SRAM.
//
// Voting: each vote (word address + lane) from address_logic is queued in a
// small FIFO. The controller reads the word (one access of ACCESS_CYCLES
// cycles), increments the addressed byte (saturating at 255) and writes the
// word back (a second access), 2*ACCESS_CYCLES = 14 cycles per vote, which
// is below the 14.8 system-clock cycles per luma sample at 13.5 MHz / 200 MHz.
// A vote that finds the FIFO full is dropped and vote_overflow pulses.
//
// Readout: image_end (once the queued votes are written) starts a pass over
// all H*W/4 words. Each word is read, written back as zero so the next field
// starts from an empty O_n, and its four counts are streamed out on
// on_valid/on_data with their row and column, one per cycle, during the write.
// readout_done pulses after the last word. The readout runs while the next
// field is already voting: between two words, queued votes go first, and the
// readout resumes at the next word. A word costs 14 cycles against about 59
// cycles for the four pixels of a video line segment, so the readout stays
// far ahead of the rows the new field votes into.
//
// SRAM bus: sram_en/sram_we/sram_addr/sram_wdata are held for a whole access;
// sram_rdata is sampled in the access's last cycle, so any SRAM whose read
// latency is below ACCESS_CYCLES works. The read-modify-write voting, the
// 7-cycle accesses and the byte packing follow the described design; the
// FIFO, the clearing by readout and saturation are this design's.
module vote_sram_controller
  import tsd_pkg::*;
#(
  parameter int unsigned W             = 720,
  parameter int unsigned H             = 288,
  parameter int unsigned ACCESS_CYCLES = 7,
  parameter int unsigned FIFO_DEPTH    = 8
) (
  input  logic               clk,
  input  logic               rst,
  // votes
  input  logic               vote_valid,
  input  logic [SADDR_W-1:0] vote_addr,
  input  logic [1:0]         vote_lane,
  input  logic               image_end,
  output logic               vote_overflow,
  // SRAM bus
  output logic               sram_en,
  output logic               sram_we,
  output logic [SADDR_W-1:0] sram_addr,
  output logic [31:0]        sram_wdata,
  input  logic [31:0]        sram_rdata,
  // O_n readout stream
  output logic               on_valid,
  output logic [7:0]         on_data,
  output coord_t             on_row,
  output coord_t             on_col,
  output logic               readout_busy,
  output logic               readout_done
);

  localparam int unsigned WORDS_PER_ROW = W / 4;
  localparam int unsigned N_WORDS       = WORDS_PER_ROW * H;
  localparam int unsigned FA_W          = (FIFO_DEPTH > 1) ? $clog2(FIFO_DEPTH) : 1;
  localparam int unsigned CNT_W         = $clog2(ACCESS_CYCLES + 1);

  // ---------------- vote FIFO ----------------
  typedef struct packed {
    logic [SADDR_W-1:0] addr;
    logic [1:0]         lane;
  } vote_t;

  vote_t           fifo [FIFO_DEPTH];
  logic [FA_W-1:0] wr_ptr, rd_ptr;
  logic [FA_W:0]   count;
  logic            pop, push, full, empty;

  assign full  = count == (FA_W+1)'(FIFO_DEPTH);
  assign empty = count == '0;
  assign push  = vote_valid && !full;

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr <= '0; rd_ptr <= '0; count <= '0; vote_overflow <= 1'b0;
    end else begin
      vote_overflow <= vote_valid && full;
      if (push) begin
        fifo[wr_ptr] <= '{addr: vote_addr, lane: vote_lane};
        wr_ptr <= (32'(wr_ptr) == FIFO_DEPTH-1) ? '0 : wr_ptr + 1'b1;
      end
      if (pop) rd_ptr <= (32'(rd_ptr) == FIFO_DEPTH-1) ? '0 : rd_ptr + 1'b1;
      count <= count + (FA_W+1)'(push) - (FA_W+1)'(pop);
    end
  end

  // ---------------- access sequencer ----------------
  typedef enum logic [2:0] {IDLE, V_RD, V_WR, R_RD, R_WR} state_t;
  state_t           state;
  logic [CNT_W-1:0] cyc;
  logic             last_cyc;
  vote_t            cur;
  logic [31:0]      word;
  logic             end_pending;
  logic             ro_active;      // a readout pass is under way
  logic [SADDR_W-1:0] ro_addr;
  coord_t           ro_row, ro_col;

  assign last_cyc = 32'(cyc) == ACCESS_CYCLES - 1;
  // a queued vote starts from IDLE or straight after the previous write
  assign pop      = !empty && (state == IDLE || (state == V_WR && last_cyc));

  // byte increment with saturation
  function automatic logic [31:0] bump(input logic [31:0] w, input logic [1:0] lane);
    logic [31:0] r;
    r = w;
    if (w[lane*8 +: 8] != 8'hFF) r[lane*8 +: 8] = w[lane*8 +: 8] + 8'd1;
    return r;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE; cyc <= '0; end_pending <= 1'b0; ro_active <= 1'b0;
      sram_en <= 1'b0; sram_we <= 1'b0; sram_addr <= '0; sram_wdata <= '0;
      ro_addr <= '0; ro_row <= '0; ro_col <= '0;
      readout_done <= 1'b0;
      cur <= '0; word <= '0;
    end else begin
      readout_done <= 1'b0;
      if (image_end) end_pending <= 1'b1;
      cyc <= last_cyc ? '0 : cyc + 1'b1;
      unique case (state)
        IDLE: begin
          cyc <= '0;
          if (!empty) begin
            cur <= fifo[rd_ptr];
            sram_en <= 1'b1; sram_we <= 1'b0; sram_addr <= fifo[rd_ptr].addr;
            state <= V_RD;
          end else if (ro_active) begin
            // resume the readout at the next word
            sram_en <= 1'b1; sram_we <= 1'b0; sram_addr <= ro_addr;
            state <= R_RD;
          end else if (end_pending) begin
            end_pending <= 1'b0;
            ro_active <= 1'b1;
            ro_addr <= '0; ro_row <= '0; ro_col <= '0;
            sram_en <= 1'b1; sram_we <= 1'b0; sram_addr <= '0;
            state <= R_RD;
          end else begin
            sram_en <= 1'b0; sram_we <= 1'b0;
          end
        end
        V_RD: if (last_cyc) begin
          sram_we <= 1'b1;
          sram_wdata <= bump(sram_rdata, cur.lane);
          state <= V_WR;
        end
        V_WR: if (last_cyc) begin
          if (!empty) begin
            cur <= fifo[rd_ptr];
            sram_we <= 1'b0; sram_addr <= fifo[rd_ptr].addr;
            state <= V_RD;
          end else begin
            sram_en <= 1'b0; sram_we <= 1'b0;
            state <= IDLE;
          end
        end
        R_RD: if (last_cyc) begin
          word <= sram_rdata;
          sram_we <= 1'b1;
          sram_wdata <= '0;
          state <= R_WR;
        end
        R_WR: if (last_cyc) begin
          if (32'(ro_addr) == N_WORDS - 1) begin
            sram_en <= 1'b0; sram_we <= 1'b0;
            readout_done <= 1'b1;
            ro_active <= 1'b0;
            state <= IDLE;
          end else begin
            ro_addr   <= ro_addr + 1'b1;
            sram_we   <= 1'b0;
            if (32'(ro_col) + 4 >= W) begin
              ro_col <= '0; ro_row <= ro_row + 1'b1;
            end else begin
              ro_col <= ro_col + COORD_W'(4);
            end
            if (!empty) begin            // let queued votes in first
              sram_en <= 1'b0;
              state <= IDLE;
            end else begin
              sram_addr <= ro_addr + 1'b1;
              state <= R_RD;
            end
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  // stream the four counts of the word being cleared (cycles 0..3 of R_WR)
  always_ff @(posedge clk) begin
    on_valid <= !rst && state == R_WR && cyc < 4;
    on_data  <= word[cyc[1:0]*8 +: 8];
    on_row   <= ro_row;
    on_col   <= ro_col + COORD_W'(cyc[1:0]);
  end

  assign readout_busy = ro_active || end_pending;

endmodule
