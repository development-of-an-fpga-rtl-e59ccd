// Testbench of video_out: a behavioural result frame buffer (one clock of
// read latency) holds a random frame; after start the driver must send
// rows 1..ROWS-2 unchanged and rows 0 and ROWS-1 as zero, COLS pixels then
// one hsync per row, one vsync, and done. Run 0 has every row ready and
// must take ROWS*(COLS+1) clocks from the first pixel to the vsync (one
// pixel per clock). Run 1 releases one row every 25 clocks: no word of a
// row may be read before the row is released, and the output must pause.
module tb_video_out;
  import sobel_pkg::*;
  localparam int COLS = 8, ROWS = 5, WORDS = COLS * ROWS / 4;

  logic clk = 0, rst_n = 0, start = 0;
  logic [2:0] rows_ready = '0;
  int pauses = 0, bad_reads = 0;
  bit sending = 0;
  logic rd_en;
  logic [3:0] rd_addr;
  word_t rd_data;
  video_t vout;
  logic busy, done;
  word_t mem [WORDS];
  int checks = 0, failures = 0, cyc = 0, first = -1, vs = -1, n_h = 0, n_done = 0;
  int got [$];

  video_out #(.COLS(COLS), .ROWS(ROWS)) dut (.clk, .rst_n, .start, .rows_ready, .rd_en, .rd_addr,
    .rd_data, .vout, .busy, .done);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (rd_en) begin
    automatic int r = int'(rd_addr) / (COLS / 4);
    rd_data <= mem[rd_addr];
    if (r != 0 && int'(rows_ready) < ((r > ROWS - 2) ? ROWS - 2 : r)) bad_reads++;
  end

  always @(posedge clk) if (rst_n) begin
    if (first >= 0 && busy && !vout.valid && !vout.hsync && !vout.vsync) pauses++;
    if (vout.valid) begin
      if (first < 0) first = cyc;
      got.push_back(int'(vout.data));
    end
    if (vout.hsync) begin
      n_h++;
      checks++;
      if (got.size() != n_h * COLS) begin
        failures++;
        $display("FAIL hsync after %0d pixels", got.size());
      end
    end
    if (vout.vsync) vs = cyc;
    if (done) n_done++;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    checks += 2;
    if (bad_reads != 0) begin failures++; $display("FAIL %0d reads of unreleased rows", bad_reads); end
    if (pauses == 0) begin failures++; $display("FAIL output never paused for a row"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd_data = '0;
    for (int a = 0; a < WORDS; a++) mem[a] = $urandom | 32'h0101_0101;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      @(negedge clk);
      rows_ready = (run == 0) ? 3'(ROWS - 2) : '0;
      start = 1;
      @(negedge clk);
      start = 0;
      if (run == 1) begin
        pauses = 0;
        for (int k = 1; k <= ROWS - 2; k++) begin
          repeat (25) @(negedge clk);
          rows_ready = 3'(k);
        end
      end
      wait (n_done == run + 1);
      @(negedge clk);
      checks++;
      if (got.size() != COLS * ROWS || n_h != ROWS || busy
          || (run == 0 && vs - first != ROWS * (COLS + 1))) begin
        failures++;
        $display("FAIL run %0d: %0d pixels %0d hsync %0d clocks", run, got.size(), n_h, vs - first);
      end
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) begin
          automatic int w = r * COLS + c;
          automatic int e = (r == 0 || r == ROWS - 1) ? 0 : int'(mem[w / 4][(w % 4) * 8 +: 8]);
          automatic int g = (got.size() > 0) ? got.pop_front() : -1;
          checks++;
          if (g != e) begin
            failures++;
            $display("FAIL r %0d c %0d got %0d expected %0d", r, c, g, e);
          end
        end
      n_h = 0; first = -1;
    end
    checks += 2;
    if (bad_reads != 0) begin failures++; $display("FAIL %0d reads of unreleased rows", bad_reads); end
    if (pauses == 0) begin failures++; $display("FAIL output never paused for a row"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
