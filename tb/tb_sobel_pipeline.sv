// Testbench of sobel_pipeline: streams rows of random columns (some with
// idle clocks in between, some back to back), checks every result against
// the Sobel definition, the number of results per row (COLS-2: nothing
// while the window refills after row_start) and the latency of two clocks
// from the column that completes a window to its result.
module tb_sobel_pipeline;
  import sobel_pkg::*;
  localparam int COLS = 24, NROWS = 12;

  logic clk = 0, rst_n = 0, col_valid = 0, row_start = 0;
  pixel_t col_pix [3];
  logic res_valid;
  pixel_t res_pix;
  int checks = 0, failures = 0, saturated = 0;

  logic [7:0] img [];           // NROWS+2 image rows
  int exp_q [$];                // expected results in order
  int t_col [$];                // clock of the completing column
  int cyc = 0;

  sobel_pipeline dut (.clk, .rst_n, .col_valid, .row_start, .col_pix, .res_valid, .res_pix);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Result checker.
  always @(posedge clk) if (rst_n && res_valid) begin
    int e, t;
    checks += 2;
    if (exp_q.size() == 0) begin
      failures++;
      $display("FAIL unexpected result %0d", res_pix);
    end else begin
      e = exp_q.pop_front();
      t = t_col.pop_front();
      if (res_pix !== 8'(e)) begin
        failures++;
        $display("FAIL result %0d expected %0d", res_pix, e);
      end
      // Column taken into the window at edge t, Dx/Dy at t+1, |D| at t+2.
      // This block runs at edge t+3 and reads cyc before its update (t+2).
      if (cyc - t != 2) begin
        failures++;
        $display("FAIL latency %0d at %0d", cyc - t, cyc);
      end
      if (e == 255) saturated++;
    end
  end

  initial begin
    sobel_ref_pkg::make_image(img, COLS, NROWS + 2, 5);
    col_pix = '{default: '0};
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // Inputs change at the falling edge; the design samples them at the
    // next rising edge, whose cycle number is recorded with the expectation.
    for (int r = 1; r <= NROWS; r++) begin
      for (int c = 0; c < COLS; c++) begin
        @(negedge clk);
        if (r % 3 == 0) begin
          col_valid = 0;
          repeat ($urandom % 3) @(negedge clk);
        end
        col_valid = 1;
        row_start = (c == 0);
        for (int k = 0; k < 3; k++) col_pix[k] = img[(r - 1 + k) * COLS + c];
        if (c >= 2) begin
          exp_q.push_back(sobel_ref_pkg::sobel_ref(img, COLS, NROWS + 2, r, c - 1));
          t_col.push_back(cyc + 1);
        end
      end
      // Rows follow each other without a gap half of the time.
      if (r % 2 == 0) begin
        @(negedge clk);
        col_valid = 0;
        row_start = 0;
        @(negedge clk);
      end
    end
    @(negedge clk);
    col_valid = 0;
    row_start = 0;
    repeat (10) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", exp_q.size());
    end
    checks++;
    if (saturated == 0) begin
      failures++;
      $display("FAIL saturation never exercised");
    end
    $display("saturated results: %0d", saturated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
