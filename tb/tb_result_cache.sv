// Testbench of result_cache: rows of COLS-2 results (columns 1..COLS-2)
// arriving with random gaps must become COLS/4 word writes at row_base,
// row_base+1, ... with border columns 0 and COLS-1 written as zero.
module tb_result_cache;
  import sobel_pkg::*;
  localparam int COLS = 16, WORDS = 64;

  logic clk = 0, rst_n = 0, row_start = 0, res_valid = 0;
  logic [5:0] row_base = '0;
  pixel_t res_pix = '0;
  logic wr_en;
  logic [5:0] wr_addr;
  word_t wr_data;
  word_t mem [WORDS];
  logic [WORDS-1:0] written;
  int checks = 0, failures = 0, writes = 0;

  result_cache #(.COLS(COLS), .WORDS(WORDS)) dut (.clk, .rst_n, .row_start, .row_base,
    .res_valid, .res_pix, .wr_en, .wr_addr, .wr_data);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n && wr_en) begin
    checks++;
    if (written[wr_addr]) begin
      failures++;
      $display("FAIL word %0d written twice", wr_addr);
    end
    written[wr_addr] <= 1'b1;
    mem[wr_addr] <= wr_data;
    writes++;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] img [COLS * 4];
    written = '0;
    for (int i = 0; i < COLS * 4; i++) img[i] = 8'($urandom | 1);
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 4; r++) begin
      @(negedge clk);
      row_start = 1; row_base = 6'(r * COLS / 4);
      @(negedge clk);
      row_start = 0;
      for (int c = 1; c <= COLS - 2; c++) begin
        res_valid = 0;
        if (r % 2 == 1) repeat ($urandom % 2) @(negedge clk);
        res_valid = 1; res_pix = img[r * COLS + c];
        @(negedge clk);
      end
      res_valid = 0;
      repeat (3) @(negedge clk);
    end
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < COLS; c++) begin
        automatic logic [7:0] e = (c == 0 || c == COLS - 1) ? 8'h00 : img[r * COLS + c];
        automatic int a = r * COLS / 4 + c / 4;
        checks++;
        if (!written[a] || mem[a][(c % 4) * 8 +: 8] !== e) begin
          failures++;
          $display("FAIL row %0d col %0d: got %h expected %h", r, c, mem[a][(c % 4) * 8 +: 8], e);
        end
      end
    checks++;
    if (writes != 4 * COLS / 4) begin
      failures++;
      $display("FAIL %0d writes", writes);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
