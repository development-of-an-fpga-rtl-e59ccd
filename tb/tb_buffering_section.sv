// Testbench of buffering_section: a frame arriving with random idle clocks
// must be stored pixel by pixel (checked by reading all words back through
// the three read ports), rows_done must count the hsync pulses,
// frame_in_done must follow vsync, and frame_start must pulse once with
// the first pixel of each frame. A second frame checks the restart.
module tb_buffering_section;
  import sobel_pkg::*;
  localparam int COLS = 12, ROWS = 6, WORDS = COLS * ROWS / 4;

  logic clk = 0, rst_n = 0, rd_en = 0;
  video_t vin = VIDEO_IDLE;
  logic [4:0] rd_addr [3];
  word_t rd_data [3];
  logic [2:0] rows_done;
  logic frame_in_done, frame_start;
  int checks = 0, failures = 0, starts = 0;
  logic [7:0] img [];

  buffering_section #(.COLS(COLS), .ROWS(ROWS)) dut (.clk, .rst_n, .vin, .rd_en, .rd_addr,
    .rd_data, .rows_done, .frame_in_done, .frame_start);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && frame_start) starts++;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd_addr = '{default: '0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      sobel_ref_pkg::make_image(img, COLS, ROWS, 40 + f);
      for (int r = 0; r < ROWS; r++) begin
        for (int c = 0; c < COLS; c++) begin
          @(negedge clk);
          vin = VIDEO_IDLE;
          repeat ($urandom % 2) @(negedge clk);
          vin = '{data: img[r * COLS + c], valid: 1'b1, hsync: 1'b0, vsync: 1'b0};
          if (f == 1 && r == 0 && c == 1)
            chk(rows_done == 0 && !frame_in_done, "restart at new frame");
        end
        @(negedge clk);
        vin = '{data: '0, valid: 1'b0, hsync: 1'b1, vsync: 1'b0};
        @(negedge clk);
        vin = VIDEO_IDLE;
        chk(int'(rows_done) == r + 1, $sformatf("rows_done %0d after row %0d", rows_done, r));
        chk(!frame_in_done, "frame_in_done early");
      end
      @(negedge clk);
      vin = '{data: '0, valid: 1'b0, hsync: 1'b0, vsync: 1'b1};
      @(negedge clk);
      vin = VIDEO_IDLE;
      chk(frame_in_done, "frame_in_done after vsync");
      chk(int'(rows_done) == ROWS, "rows_done holds after vsync");
      chk(starts == f + 1, "one frame_start per frame");
      // Read back every word, three at a time.
      for (int a = 0; a < WORDS; a += 3) begin
        @(negedge clk);
        rd_en = 1;
        for (int p = 0; p < 3; p++) rd_addr[p] = 5'((a + p) % WORDS);
        @(negedge clk);
        rd_en = 0;
        for (int p = 0; p < 3; p++)
          for (int k = 0; k < 4; k++) begin
            automatic int w = (a + p) % WORDS;
            chk(rd_data[p][k*8 +: 8] === img[w * 4 + k],
                $sformatf("frame %0d word %0d lane %0d", f, w, k));
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
