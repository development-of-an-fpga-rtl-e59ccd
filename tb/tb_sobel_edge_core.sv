// End-to-end testbench of sobel_edge_core at a small frame size: two
// frames, the first sent at one pixel per clock, the second with random
// idle clocks. The output video must be the reference Sobel magnitude
// image, row by row with one hsync per row and one vsync. Result rows must
// leave while the frame is still arriving and end shortly after it. It also
// counts the row stalls (core waiting for input rows),
// pipeline flushes, row cache reloads and saturated pixels.
module tb_sobel_edge_core;
  import sobel_pkg::*;
  localparam int COLS = 16, ROWS = 10;

  logic clk = 0, rst_n = 0;
  video_t vin = VIDEO_IDLE, vout;
  logic busy, frame_done, frame_received, row_stall;
  int checks = 0, failures = 0;
  int cyc = 0;
  logic [7:0] img [];
  int out_pix [$];
  int n_h = 0, n_v = 0, n_done = 0;
  int first_out = -1, vs_cyc = -1, in_vs = -1;
  int stalls = 0, flushes = 0, reloads = 0, saturated = 0;

  sobel_edge_core #(.COLS(COLS), .ROWS(ROWS)) dut (.clk, .rst_n, .vin, .vout, .busy,
    .frame_done, .frame_received, .row_stall);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n) begin
    if (row_stall) stalls++;
    if (dut.u_ctrl.cache_shift
        && int'(dut.u_ctrl.col) == COLS - 1) flushes++;
    if (dut.cache_load) reloads++;
    if (vout.valid) begin
      if (first_out < 0) first_out = cyc;
      out_pix.push_back(int'(vout.data));
    end
    if (vout.hsync) n_h++;
    if (vout.vsync) begin n_v++; vs_cyc = cyc; end
    if (frame_done) n_done++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_frame(input int f);
    checks++;
    if (out_pix.size() != COLS * ROWS || n_h != ROWS || n_v != 1) begin
      failures++;
      $display("FAIL frame %0d: %0d pixels %0d hsync %0d vsync", f, out_pix.size(), n_h, n_v);
    end
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        automatic int e = sobel_ref_pkg::sobel_ref(img, COLS, ROWS, r, c);
        automatic int g = (out_pix.size() > 0) ? out_pix.pop_front() : -1;
        checks++;
        if (e == 255) saturated++;
        if (g != e) begin
          failures++;
          if (failures < 10) $display("FAIL frame %0d r %0d c %0d: got %0d expected %0d", f, r, c, g, e);
        end
      end
    // Rows are released as they are computed: the output starts before
    // the input frame has ended, and ends within three row times (plus the
    // sequencer's backlog of 6 clocks per row) after the input vsync.
    $display("frame %0d: output from %0d clocks before to %0d clocks after the input vsync",
             f, in_vs - first_out, vs_cyc - in_vs);
    checks += 2;
    if (first_out >= in_vs) begin
      failures++;
      $display("FAIL output did not start before the end of the input frame");
    end
    if (vs_cyc - in_vs > 3 * (COLS + 8) + 6 * ROWS + 16) begin
      failures++;
      $display("FAIL output ended %0d clocks after the input frame", vs_cyc - in_vs);
    end
    n_h = 0; n_v = 0; first_out = -1;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      sobel_ref_pkg::make_image(img, COLS, ROWS, f * 17);
      for (int r = 0; r < ROWS; r++) begin
        for (int c = 0; c < COLS; c++) begin
          @(negedge clk);
          vin = VIDEO_IDLE;
          if (f == 1) repeat ($urandom % 3) @(negedge clk);
          vin = '{data: img[r * COLS + c], valid: 1'b1, hsync: 1'b0, vsync: 1'b0};
        end
        @(negedge clk);
        vin = '{data: '0, valid: 1'b0, hsync: 1'b1, vsync: 1'b0};
      end
      @(negedge clk);
      vin = '{data: '0, valid: 1'b0, hsync: 1'b0, vsync: 1'b1};
      in_vs = cyc + 1;
      @(negedge clk);
      vin = VIDEO_IDLE;
      checks++;
      if (!frame_received) begin
        failures++;
        $display("FAIL frame_received not set");
      end
      wait (n_done == f + 1);
      @(negedge clk);
      check_frame(f);
      checks++;
      if (busy) begin
        failures++;
        $display("FAIL busy after frame_done");
      end
    end
    $display("stalls %0d flushes %0d reloads %0d saturated %0d", stalls, flushes, reloads, saturated);
    checks += 4;
    if (stalls == 0)   begin failures++; $display("FAIL no row stall"); end
    if (flushes != 2 * (ROWS - 2)) begin failures++; $display("FAIL flushes %0d", flushes); end
    if (reloads != 2 * (ROWS - 2) * COLS / 4) begin failures++; $display("FAIL reloads %0d", reloads); end
    if (saturated == 0) begin failures++; $display("FAIL no saturation"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
