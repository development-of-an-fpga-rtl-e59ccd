// Buffering section: stores the incoming video frame in the input frame
// buffer.
//
// Every clock with vin.valid the pixel is written into byte lane col mod 4
// of word row*COLS/4 + col/4; a horizontal sync pulse ends a row, a
// vertical sync pulse ends the frame. rows_done counts the complete rows of
// the current frame and frame_in_done is set by vsync. Both hold until the
// first pixel of the next frame, which restarts them at row 0 and gives a
// one-clock frame_start pulse. Pixels beyond COLS in a row or rows beyond
// ROWS are dropped. The three read ports of the buffer are passed to the
// indexing and caching sections (word out one clock after rd_en).
//
// Storing one pixel per clock and counting rows by hsync follow the
// original design; the word layout and the restart at the next frame's
// first pixel are choices of this implementation.
module buffering_section
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
  input  video_t        vin,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr [3],
  output word_t         rd_data [3],
  output logic [RW-1:0] rows_done,
  output logic          frame_in_done,
  output logic          frame_start
);

  localparam int unsigned ROW_WORDS = COLS / PIX_PER_WORD;

  logic                    between;      // waiting for the first pixel of a frame
  logic [CW-1:0]           col;
  logic [AW-1:0]           row_base;
  logic [CW-1:0]           wcol;
  logic [AW-1:0]           wbase;
  logic                    in_frame;     // row and column inside the frame
  logic [PIX_PER_WORD-1:0] we;

  assign frame_start = vin.valid && between;
  // Position of this pixel: a new frame restarts at row 0, column 0.
  assign wcol  = frame_start ? '0 : col;
  assign wbase = frame_start ? '0 : row_base;
  assign in_frame = (wcol < CW'(COLS)) && (frame_start || rows_done < RW'(ROWS));

  always_comb begin
    we = '0;
    if (vin.valid && in_frame) we[wcol[1:0]] = 1'b1;
  end

  frame_buffer #(.WORDS(WORDS), .NRD(3)) u_mem (
    .clk,
    .we,
    .waddr (wbase + AW'(wcol >> 2)),
    .wdata ({PIX_PER_WORD{vin.data}}),
    .re    (rd_en),
    .raddr (rd_addr),
    .rdata (rd_data)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      between       <= 1'b1;
      col           <= '0;
      row_base      <= '0;
      rows_done     <= '0;
      frame_in_done <= 1'b0;
    end else if (vin.vsync) begin
      frame_in_done <= 1'b1;
      between       <= 1'b1;
    end else if (vin.hsync) begin
      col <= '0;
      if (rows_done < RW'(ROWS)) begin
        rows_done <= rows_done + 1'b1;
        row_base  <= row_base + AW'(ROW_WORDS);
      end
    end else if (vin.valid) begin
      if (frame_start) begin
        rows_done     <= '0;
        row_base      <= '0;
        frame_in_done <= 1'b0;
        between       <= 1'b0;
      end
      if (wcol < CW'(COLS)) col <= wcol + 1'b1;
      else                  col <= wcol;
    end
  end

endmodule
