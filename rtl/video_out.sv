// Output video driver: sends the result frame buffer as composite video.
//
// start is given when processing of a frame begins. The driver then walks
// the result frame buffer word by word through its own one-row indexing
// circuit and a row cache, and sends one pixel per clock with vout.valid.
// A word of row r is read only once that row is finished: rows_ready >= r
// for rows 1..ROWS-2 (rows_ready counts finished result rows), and for the
// last row once rows_ready = ROWS-2. Rows 0 and ROWS-1, which have no full
// 3x3 neighbourhood, are sent as 0, so row 0 leaves at once. Rows thus
// follow the computation by about one row instead of waiting for the whole
// frame; while the next row is not ready the output pauses (valid low).
// After the COLS pixels of a row one clock of horizontal sync follows, and
// after the last row's horizontal sync one clock of vertical sync, then a
// done pulse. The next word is read while the cache still holds two pixels,
// so when rows are ready the frame leaves at one pixel per clock:
// ROWS*(COLS+1)+1 clocks plus two clocks of start-up.
//
// Sending the result buffer to the display follows the original design;
// the row-by-row release and the zero border rows are choices of this
// implementation.
module video_out
  import sobel_pkg::*;
#(
  parameter int unsigned COLS  = 640,
  parameter int unsigned ROWS  = 480,
  localparam int unsigned WORDS = COLS * ROWS / PIX_PER_WORD,
  localparam int unsigned AW    = (WORDS > 1) ? $clog2(WORDS) : 1,
  localparam int unsigned RW    = $clog2(ROWS + 1),
  localparam int unsigned CW    = $clog2(COLS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [RW-1:0] rows_ready,
  output logic          rd_en,
  output logic [AW-1:0] rd_addr,
  input  word_t         rd_data,
  output video_t        vout,
  output logic          busy,
  output logic          done
);

  typedef enum logic [1:0] {V_IDLE, V_SEND, V_VSYNC} vstate_t;

  vstate_t       state;
  logic [CW-1:0] col;
  logic [RW-1:0] row;
  logic [AW:0]   issued;
  logic [RW-1:0] rd_row;         // row of the next word to read
  logic [CW-1:0] rd_wcnt;        // word of that row
  logic          row_ok;
  logic          ready;
  logic          shift, load, hs_slot;
  logic [2:0]    count;
  pixel_t        pixel;
  logic [AW-1:0] addr [1];

  index_gen #(.COLS(COLS), .WORDS(WORDS), .NROWS(1)) u_idx (
    .clk, .rst_n, .start, .base('0), .step(rd_en), .addr
  );

  row_cache u_cache (
    .clk, .rst_n, .load, .word(rd_data), .shift, .pixel, .count
  );

  assign hs_slot = (state == V_SEND) && (col == CW'(COLS));
  assign shift   = (state == V_SEND) && !hs_slot && (count != 0);
  assign load    = ready && (count == 0 || (count == 1 && shift));
  localparam int unsigned ROW_WORDS = COLS / PIX_PER_WORD;

  always_comb begin
    if (rd_row == '0)                    row_ok = 1'b1;
    else if (rd_row >= RW'(ROWS - 2))    row_ok = (rows_ready >= RW'(ROWS - 2));
    else                                 row_ok = (rows_ready >= rd_row);
  end

  assign rd_en   = (state == V_SEND) && !ready && (issued < (AW+1)'(WORDS)) && count <= 3'd2
                   && row_ok;
  assign rd_addr = addr[0];
  assign busy    = (state != V_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= V_IDLE;
      col    <= '0;
      row    <= '0;
      issued <= '0;
      ready  <= 1'b0;
      rd_row  <= '0;
      rd_wcnt <= '0;
      vout   <= VIDEO_IDLE;
      done   <= 1'b0;
    end else begin
      done  <= 1'b0;
      vout  <= VIDEO_IDLE;
      ready <= rd_en ? 1'b1 : (load ? 1'b0 : ready);
      if (rd_en) begin
        issued <= issued + 1'b1;
        if (rd_wcnt == CW'(ROW_WORDS - 1)) begin
          rd_wcnt <= '0;
          rd_row  <= rd_row + 1'b1;
        end else begin
          rd_wcnt <= rd_wcnt + 1'b1;
        end
      end
      unique case (state)
        V_IDLE:
          if (start) begin
            col     <= '0;
            row     <= '0;
            issued  <= '0;
            rd_row  <= '0;
            rd_wcnt <= '0;
            state   <= V_SEND;
          end
        V_SEND:
          if (hs_slot) begin
            vout.hsync <= 1'b1;
            col        <= '0;
            row        <= row + 1'b1;
            if (row == RW'(ROWS - 1)) state <= V_VSYNC;
          end else if (shift) begin
            vout.valid <= 1'b1;
            vout.data  <= (row == '0 || row == RW'(ROWS - 1)) ? '0 : pixel;
            col        <= col + 1'b1;
          end
        V_VSYNC: begin
          vout.vsync <= 1'b1;
          done       <= 1'b1;
          state      <= V_IDLE;
        end
        default: state <= V_IDLE;
      endcase
    end
  end

endmodule
