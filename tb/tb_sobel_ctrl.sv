// Testbench of sobel_ctrl with a real row cache for the count feedback:
// no row may start before start_ok, nor before input rows r-1..r+1 are
// in the buffer (the row stall); each row must load the indexing section
// with the word address of row r-1 and the result cache with that of row
// r, read COLS/4 words, load the caches COLS/4 times, shift COLS columns
// with one row_start, and take COLS+7 clocks when its input is ready.
// rows_out must count the finished rows, frame_go must pulse once, and
// proc_done must follow the last result row ROWS-2.
module tb_sobel_ctrl;
  import sobel_pkg::*;
  localparam int COLS = 16, ROWS = 8;

  logic clk = 0, rst_n = 0, frame_start = 0, start_ok = 0;
  logic [3:0] rows_done = '0;
  logic idx_start, idx_step, rd_en, cache_load, cache_shift, col_valid, row_start;
  logic res_row_start, proc_done, busy, stalled, frame_go;
  logic [3:0] rows_out;
  int n_go = 0;
  logic [4:0] idx_base, res_row_base;
  logic [2:0] cache_count;
  pixel_t pixel;
  int checks = 0, failures = 0, cyc = 0;
  bit prev_full = 0;
  int row = 0, n_rd = 0, n_ld = 0, n_col = 0, n_rs = 0, t_row = -1, n_stall = 0, n_done = 0, n_period = 0;

  sobel_ctrl #(.COLS(COLS), .ROWS(ROWS)) dut (.clk, .rst_n, .frame_start, .rows_done, .start_ok,
    .idx_start, .idx_base, .idx_step, .rd_en, .cache_load, .cache_shift, .cache_count,
    .col_valid, .row_start, .res_row_start, .res_row_base, .proc_done, .frame_go, .rows_out, .busy, .stalled);

  row_cache u_cache (.clk, .rst_n, .load(cache_load), .word('0), .shift(cache_shift),
    .pixel, .count(cache_count));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (stalled) n_stall++;
    if (rd_en) n_rd++;
    if (cache_load) n_ld++;
    if (col_valid) n_col++;
    if (row_start) n_rs++;
    chk(idx_step == rd_en, "index steps with each read");
    if (frame_go) begin
      n_go++;
      chk(start_ok, "frame_go only with start_ok");
    end
    if (idx_start) begin
      // Result rows before this one are released, this one is not.
      chk(int'(rows_out) == row, $sformatf("rows_out %0d at start of row %0d", rows_out, row + 1));
      if (row > 0) begin
        chk(n_rd == COLS / 4 && n_ld == COLS / 4, $sformatf("row %0d: %0d reads %0d loads", row, n_rd, n_ld));
        chk(n_col == COLS && n_rs == 1, $sformatf("row %0d: %0d columns %0d row starts", row, n_col, n_rs));
      end
      row++;
      chk(start_ok, "row started while output busy");
      chk(int'(rows_done) >= row + 2, $sformatf("row %0d started with %0d input rows", row, rows_done));
      chk(res_row_start, "result cache starts with the row");
      chk(int'(idx_base) == (row - 1) * COLS / 4, "index base is row r-1");
      chk(int'(res_row_base) == row * COLS / 4, "result base is row r");
      // Period between two rows that both found their input ready.
      if (prev_full) begin
        chk(cyc - t_row == COLS + 7, $sformatf("row period %0d", cyc - t_row));
        n_period++;
      end
      prev_full = (int'(rows_done) == ROWS);
      t_row = cyc;
      n_rd = 0; n_ld = 0; n_col = 0; n_rs = 0;
    end
    if (proc_done) begin
      n_done++;
      chk(row == ROWS - 2, $sformatf("proc_done after %0d rows", row));
      chk(n_col == COLS && n_rd == COLS / 4, "last row complete");
    end
    if (n_done > 0) begin
      chk(int'(rows_out) == ROWS - 2, "all rows released");
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    frame_start = 1;
    @(negedge clk);
    frame_start = 0;
    // Input rows arrive slowly; the output side is busy at first.
    for (int r = 1; r <= ROWS; r++) begin
      repeat ((r <= 4) ? 30 : 1) @(negedge clk);
      rows_done = 4'(r);
      if (r == 3) start_ok = 1;
      chk(row == 0 || start_ok, "waits for start_ok");
    end
    wait (n_done == 1);
    repeat (3) @(negedge clk);
    chk(!busy, "idle after proc_done");
    chk(n_stall > 0, "row stall seen");
    chk(n_period > 0, "row period measured");
    chk(n_go == 1, "one frame_go");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
