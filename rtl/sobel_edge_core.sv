// Sobel edge detection core.
//
// Input: a digital composite video frame (one pixel per clock at most, a
// horizontal sync pulse after each row, a vertical sync pulse after the
// frame). Output: the same frame size as composite video, each pixel being
// min(|Dx| + |Dy|, 255) of the Sobel gradient at that position, with the
// one-pixel border set to 0.
//
// The core is built from four sections around two frame memories:
//   buffering - stores the incoming frame in the input frame buffer;
//   indexing  - forms the word addresses of three vertically adjacent rows
//               (base + counter, + COLS, + 2*COLS);
//   caching   - three 4-pixel row caches loaded from those addresses in
//               one read and emptied one column per clock;
//   pipeline  - 3x3 window, Dx/Dy stage, |D| stage, result cache stage.
// The result cache writes 4-pixel words into the result frame buffer;
// video_out sends each result row as composite video as soon as it is
// complete, so the output follows the computation by about one row.
// Processing of result row r starts as soon as input rows r-1..r+1 are in
// the buffer, so it overlaps the arrival of the frame. A new frame may
// start arriving only after frame_done of the previous one.
//
// The four sections, the two frame buffers and the data flow follow the
// original design, as does sending results out before the whole frame is
// processed (to cut latency); clipping, the zero border and the exact
// release rule (one complete row at a time) are choices of this
// implementation.
module sobel_edge_core
  import sobel_pkg::*;
#(
  parameter int unsigned COLS = 640,
  parameter int unsigned ROWS = 480,
  localparam int unsigned WORDS = COLS * ROWS / PIX_PER_WORD,
  localparam int unsigned AW    = (WORDS > 1) ? $clog2(WORDS) : 1,
  localparam int unsigned RW    = $clog2(ROWS + 1)
) (
  input  logic   clk,
  input  logic   rst_n,
  input  video_t vin,
  output video_t vout,
  output logic   busy,
  output logic   frame_done,
  output logic   frame_received,  // vertical sync of the input frame seen
  output logic   row_stall        // a result row waits for input rows
);

  // Buffering section
  logic          rd_en;
  logic [AW-1:0] rd_addr [3];
  word_t         rd_data [3];
  logic [RW-1:0] rows_done;
  logic          frame_start;

  buffering_section #(.COLS(COLS), .ROWS(ROWS)) u_buf (
    .clk, .rst_n, .vin, .rd_en, .rd_addr, .rd_data,
    .rows_done, .frame_in_done(frame_received), .frame_start
  );

  // Sequencer
  logic          idx_start, idx_step, cache_load, cache_shift;
  logic [AW-1:0] idx_base, res_row_base;
  logic [2:0]    cache_count [3];
  logic          col_valid, row_start, res_row_start, proc_done, frame_go;
  logic [RW-1:0] rows_out;
  logic          ctrl_busy, vo_busy;

  sobel_ctrl #(.COLS(COLS), .ROWS(ROWS)) u_ctrl (
    .clk, .rst_n, .frame_start, .rows_done, .start_ok(!vo_busy),
    .idx_start, .idx_base, .idx_step, .rd_en, .cache_load, .cache_shift,
    .cache_count(cache_count[0]), .col_valid, .row_start,
    .res_row_start, .res_row_base, .proc_done, .frame_go, .rows_out,
    .busy(ctrl_busy), .stalled(row_stall)
  );

  // Indexing section
  index_gen #(.COLS(COLS), .WORDS(WORDS), .NROWS(3)) u_idx (
    .clk, .rst_n, .start(idx_start), .base(idx_base), .step(idx_step), .addr(rd_addr)
  );

  // Caching section: previous, present and next row
  pixel_t col_pix [3];

  for (genvar r = 0; r < 3; r++) begin : g_cache
    row_cache u_cache (
      .clk, .rst_n, .load(cache_load), .word(rd_data[r]), .shift(cache_shift),
      .pixel(col_pix[r]), .count(cache_count[r])
    );
  end

  // Pipeline
  logic   res_valid;
  pixel_t res_pix;

  sobel_pipeline u_pipe (
    .clk, .rst_n, .col_valid, .row_start, .col_pix, .res_valid, .res_pix
  );

  // Result cache and result frame buffer
  logic          wr_en;
  logic [AW-1:0] wr_addr;
  word_t         wr_data;

  result_cache #(.COLS(COLS), .WORDS(WORDS)) u_res (
    .clk, .rst_n, .row_start(res_row_start), .row_base(res_row_base),
    .res_valid, .res_pix, .wr_en, .wr_addr, .wr_data
  );

  logic          vo_rd_en;
  logic [AW-1:0] vo_rd_addr [1];
  word_t         vo_rd_data [1];

  frame_buffer #(.WORDS(WORDS), .NRD(1)) u_out_mem (
    .clk, .we({PIX_PER_WORD{wr_en}}), .waddr(wr_addr), .wdata(wr_data),
    .re(vo_rd_en), .raddr(vo_rd_addr), .rdata(vo_rd_data)
  );

  // Output video driver
  video_out #(.COLS(COLS), .ROWS(ROWS)) u_vo (
    .clk, .rst_n, .start(frame_go), .rows_ready(rows_out), .rd_en(vo_rd_en), .rd_addr(vo_rd_addr[0]),
    .rd_data(vo_rd_data[0]), .vout, .busy(vo_busy), .done(frame_done)
  );

  assign busy = ctrl_busy || vo_busy;

  // Composite video rule: a pixel is never valid during a sync pulse.
  a_vin_sync: assert property (@(posedge clk) disable iff (!rst_n)
    !(vin.valid && (vin.hsync || vin.vsync)))
    else $error("input pixel valid during a sync pulse");
  a_vout_sync: assert property (@(posedge clk) disable iff (!rst_n)
    !(vout.valid && (vout.hsync || vout.vsync)))
    else $error("output pixel valid during a sync pulse");
  // When the last row is done every result row has been released.
  a_done_rows: assert property (@(posedge clk) disable iff (!rst_n)
    proc_done |-> rows_out == RW'(ROWS - 2))
    else $error("frame ended with result rows unreleased");
  // The output driver never reads the row the pipeline is writing.
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
    !(wr_en && vo_rd_en && (wr_addr / AW'(COLS / PIX_PER_WORD)) == (vo_rd_addr[0] / AW'(COLS / PIX_PER_WORD))))
    else $error("result row read while being written");

endmodule
