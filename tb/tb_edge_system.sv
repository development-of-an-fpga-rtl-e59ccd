// End-to-end testbench of edge_system: test frames are written as
// hex-image text (two hex digits per pixel, ',' after each row, '*' after
// the frame, with some lower-case digits, line breaks and idle clocks),
// fed through camera model, edge core and display model, and the text that
// comes out is compared with the reference Sobel image written the same
// way. Counted mechanisms: row stalls (core waiting for the camera),
// pipeline flushes at row ends, row cache reloads, saturated pixels, zero
// border pixels, ignored characters, row and frame sync pulses. Each must
// occur at least once. Frame size comes from the COLS/ROWS parameters.
module tb_edge_system #(
  parameter int COLS = 32,
  parameter int ROWS = 16,
  parameter int FRAMES = 2
);
  import sobel_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [7:0] cam_char = '0;
  logic cam_char_valid = 0;
  logic [7:0] disp_chars [2];
  logic [1:0] disp_nchars;
  logic busy, frame_done, frame_received, row_stall;
  int checks = 0, failures = 0;
  int cyc = 0;
  logic [7:0] img [];
  logic [7:0] out_q [$];
  int n_done = 0;
  int stalls = 0, flushes = 0, reloads = 0, saturated = 0, borders = 0, ignored = 0;
  int t_start = 0, t_rx = 0;

  edge_system #(.COLS(COLS), .ROWS(ROWS)) dut (.clk, .rst_n, .cam_char, .cam_char_valid,
    .disp_chars, .disp_nchars, .busy, .frame_done, .frame_received, .row_stall);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n) begin
    if (row_stall) stalls++;
    if (dut.u_core.u_ctrl.cache_shift && int'(dut.u_core.u_ctrl.col) == COLS - 1) flushes++;
    if (dut.u_core.cache_load) reloads++;
    for (int i = 0; i < int'(disp_nchars); i++) out_q.push_back(disp_chars[i]);
    if (frame_done) n_done++;
  end

  initial begin
    repeat (40 * COLS * ROWS * FRAMES + 10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input logic [7:0] ch);
    @(negedge clk);
    cam_char = ch; cam_char_valid = 1;
  endtask

  task automatic expect_char(input logic [7:0] e, inout int bad);
    logic [7:0] g;
    checks++;
    g = (out_q.size() > 0) ? out_q.pop_front() : 8'h00;
    if (g !== e) begin
      bad++;
      failures++;
      if (bad < 8) $display("FAIL char %0d ('%c') expected '%c'", g, g, e);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < FRAMES; f++) begin
      int bad;
      sobel_ref_pkg::make_image(img, COLS, ROWS, f * 29 + 3);
      t_start = cyc;
      for (int r = 0; r < ROWS; r++) begin
        for (int c = 0; c < COLS; c++) begin
          logic [7:0] hi, lo;
          hi = sobel_ref_pkg::hex_digit(img[r * COLS + c][7:4]);
          lo = sobel_ref_pkg::hex_digit(img[r * COLS + c][3:0]);
          if (r == 2 && hi > 8'h39) hi = hi + 8'h20;       // lower case
          send(hi);
          send(lo);
        end
        send(8'h2C);
        if (r == 1) begin send(8'h0A); ignored++; end       // line break
        if (f == 1 && r == 3) begin                          // idle clocks
          @(negedge clk); cam_char_valid = 0;
          repeat (5) @(negedge clk);
        end
      end
      send(8'h2A);
      @(negedge clk);
      cam_char_valid = 0;
      @(negedge clk);
      t_rx = cyc;
      wait (n_done == f + 1);
      repeat (3) @(negedge clk);
      $display("frame %0d: %0dx%0d, input %0d clocks, output done %0d clocks after the '*'",
               f, COLS, ROWS, t_rx - t_start, cyc - t_rx);
      bad = 0;
      for (int r = 0; r < ROWS; r++) begin
        for (int c = 0; c < COLS; c++) begin
          int e;
          e = sobel_ref_pkg::sobel_ref(img, COLS, ROWS, r, c);
          if (e == 255) saturated++;
          if (r == 0 || c == 0 || r == ROWS - 1 || c == COLS - 1) borders++;
          expect_char(sobel_ref_pkg::hex_digit(4'(e >> 4)), bad);
          expect_char(sobel_ref_pkg::hex_digit(4'(e)), bad);
        end
        expect_char(8'h2C, bad);
      end
      expect_char(8'h2A, bad);
      checks++;
      if (out_q.size() != 0 || busy) begin
        failures++;
        $display("FAIL %0d extra characters, busy %0d", out_q.size(), busy);
      end
    end
    $display("stalls %0d flushes %0d reloads %0d saturated %0d borders %0d ignored %0d",
             stalls, flushes, reloads, saturated, borders, ignored);
    checks += 6;
    if (stalls == 0)    begin failures++; $display("FAIL no row stall"); end
    if (flushes != FRAMES * (ROWS - 2)) begin failures++; $display("FAIL flushes"); end
    if (reloads != FRAMES * (ROWS - 2) * COLS / 4) begin failures++; $display("FAIL reloads"); end
    if (saturated == 0) begin failures++; $display("FAIL no saturation"); end
    if (borders == 0)   begin failures++; $display("FAIL no border"); end
    if (ignored == 0)   begin failures++; $display("FAIL no ignored character"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
