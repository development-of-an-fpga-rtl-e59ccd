// Sequencer of the edge core.
//
// A frame starts with the first pixel written to the input buffer
// (frame_start) and is processed once the output side is free (start_ok).
// Result rows 1 .. ROWS-2 are produced in order. Row r waits until input
// rows r-1, r and r+1 are complete in the buffer (rows_done >= r+2, so the
// first row starts after the third horizontal sync) - a stall when the
// camera is slower than the pipeline. It then loads the indexing section
// with the word address of row r-1 and the result cache with that of row r,
// fetches one word (4 pixels) of each of the three rows per read, loads the
// row caches and shifts one column per clock into the pipeline. The next
// word is read while the caches still hold two pixels, so a row streams
// without gaps. After the last column the pipeline is flushed for FLUSH
// clocks before the next row. rows_out counts the result rows whose words
// are all in the result frame buffer, so the output driver can send them
// while later rows are still being computed. frame_go pulses when a frame
// begins, proc_done after its last row.
//
// Row timing: 1 clock of address setup, 1 read, 1 load, COLS shift clocks
// and FLUSH clocks, i.e. COLS + 7 clocks per row when the input is ahead.
//
// Starting after the third row, fetching three rows per read and flushing
// the pipeline at each row end follow the original design; the read-ahead
// schedule and the 4-clock flush are choices of this implementation.
module sobel_ctrl
  import sobel_pkg::*;
#(
  parameter int unsigned COLS  = 640,
  parameter int unsigned ROWS  = 480,
  parameter int unsigned FLUSH = 4,
  localparam int unsigned WORDS = COLS * ROWS / PIX_PER_WORD,
  localparam int unsigned AW    = (WORDS > 1) ? $clog2(WORDS) : 1,
  localparam int unsigned RW    = $clog2(ROWS + 1),
  localparam int unsigned CW    = $clog2(COLS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          frame_start,
  input  logic [RW-1:0] rows_done,
  input  logic          start_ok,
  // indexing section
  output logic          idx_start,
  output logic [AW-1:0] idx_base,
  output logic          idx_step,
  // frame buffer read and row caches
  output logic          rd_en,
  output logic          cache_load,
  output logic          cache_shift,
  input  logic [2:0]    cache_count,
  // pipeline and result cache
  output logic          col_valid,
  output logic          row_start,
  output logic          res_row_start,
  output logic [AW-1:0] res_row_base,
  output logic          proc_done,
  output logic          frame_go,    // pulse: processing of a frame begins
  output logic [RW-1:0] rows_out,    // result rows 1..rows_out are written
  output logic          busy,
  output logic          stalled      // a row is waiting for input rows
);

  localparam int unsigned ROW_WORDS = COLS / PIX_PER_WORD;
  localparam int unsigned WW = $clog2(ROW_WORDS + 1);

  typedef enum logic [2:0] {S_IDLE, S_PEND, S_WAIT, S_FETCH, S_RUN, S_FLUSH} state_t;

  state_t        state;
  logic          pending;
  logic [RW-1:0] out_row;
  logic [AW-1:0] row_addr;       // word address of row out_row
  logic [CW-1:0] col;
  logic [WW-1:0] issued;
  logic          ready;          // buffer output holds an unloaded word
  logic [$clog2(FLUSH+1)-1:0] fl_cnt;

  // Combinational control of the streaming row pass.
  always_comb begin
    idx_start     = 1'b0;
    idx_base      = row_addr - AW'(ROW_WORDS);
    res_row_start = 1'b0;
    res_row_base  = row_addr;
    rd_en         = 1'b0;
    cache_load    = 1'b0;
    cache_shift   = 1'b0;
    stalled       = 1'b0;
    unique case (state)
      S_WAIT: begin
        if (rows_done >= out_row + RW'(2)) begin
          idx_start     = 1'b1;
          res_row_start = 1'b1;
        end else begin
          stalled = 1'b1;
        end
      end
      S_FETCH: rd_en = 1'b1;
      S_RUN: begin
        cache_shift = (cache_count != 0);
        cache_load  = ready && (cache_count == 0 || (cache_count == 1 && cache_shift));
        rd_en       = !ready && issued < WW'(ROW_WORDS) && cache_count <= 3'd2;
      end
      default: ;
    endcase
  end

  assign idx_step  = rd_en;
  assign col_valid = cache_shift;
  assign row_start = cache_shift && (col == '0);
  assign busy      = (state != S_IDLE) || pending;
  assign frame_go  = (state == S_PEND) && start_ok;

  // The caches are only refilled once they hold at most the pixel that
  // leaves this clock, and a new read never overwrites an unloaded word.
  a_load_empty: assert property (@(posedge clk) disable iff (!rst_n)
    cache_load |-> (cache_count == 0 || (cache_count == 1 && cache_shift)))
    else $error("row cache reloaded while holding pixels");
  a_read_free: assert property (@(posedge clk) disable iff (!rst_n)
    rd_en |-> !ready)
    else $error("read issued over an unloaded word");

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      pending   <= 1'b0;
      out_row   <= '0;
      row_addr  <= '0;
      col       <= '0;
      issued    <= '0;
      ready     <= 1'b0;
      fl_cnt    <= '0;
      proc_done <= 1'b0;
      rows_out  <= '0;
    end else begin
      proc_done <= 1'b0;
      if (frame_start) pending <= 1'b1;
      ready <= rd_en ? 1'b1 : (cache_load ? 1'b0 : ready);
      unique case (state)
        S_IDLE:
          if (pending || frame_start) state <= S_PEND;
        S_PEND:
          if (start_ok) begin
            pending  <= frame_start;
            out_row  <= RW'(1);
            row_addr <= AW'(ROW_WORDS);
            rows_out <= '0;
            state    <= S_WAIT;
          end
        S_WAIT:
          if (idx_start) begin
            col    <= '0;
            issued <= '0;
            state  <= S_FETCH;
          end
        S_FETCH: begin
          issued <= issued + 1'b1;
          state  <= S_RUN;
        end
        S_RUN: begin
          if (rd_en) issued <= issued + 1'b1;
          if (cache_shift) begin
            col <= col + 1'b1;
            if (col == CW'(COLS - 1)) begin
              fl_cnt <= '0;
              state  <= S_FLUSH;
            end
          end
        end
        S_FLUSH: begin
          fl_cnt <= fl_cnt + 1'b1;
          if (fl_cnt == ($clog2(FLUSH+1))'(FLUSH - 1)) begin
            rows_out <= out_row;     // its last word was written by now
            if (out_row == RW'(ROWS - 2)) begin
              proc_done <= 1'b1;
              state     <= S_IDLE;
            end else begin
              out_row  <= out_row + 1'b1;
              row_addr <= row_addr + AW'(ROW_WORDS);
              state    <= S_WAIT;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
