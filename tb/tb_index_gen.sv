// Testbench of index_gen: three-row form (previous, present, next row
// addresses) and one-row form, against base + count + p*COLS/4.
module tb_index_gen;
  localparam int COLS = 32, WORDS = 256;
  logic clk = 0, rst_n = 0, start = 0, step = 0;
  logic [7:0] base = '0;
  logic [7:0] addr3 [3];
  logic [7:0] addr1 [1];
  int checks = 0, failures = 0;

  index_gen #(.COLS(COLS), .WORDS(WORDS), .NROWS(3)) dut3 (.clk, .rst_n, .start, .base, .step, .addr(addr3));
  index_gen #(.COLS(COLS), .WORDS(WORDS), .NROWS(1)) dut1 (.clk, .rst_n, .start, .base, .step, .addr(addr1));

  always #5 clk = ~clk;

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int b, cnt;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 4; t++) begin
      b = 8 * t + 3;
      start <= 1; base <= 8'(b);
      @(posedge clk);
      start <= 0;
      cnt = 0;
      for (int i = 0; i < 20; i++) begin
        step <= ($urandom % 2) == 0;
        #1;
        for (int p = 0; p < 3; p++) begin
          checks++;
          if (addr3[p] !== 8'(b + cnt + p * COLS / 4)) begin
            failures++;
            $display("FAIL row %0d addr %0d expected %0d", p, addr3[p], b + cnt + p * COLS / 4);
          end
        end
        checks++;
        if (addr1[0] !== 8'(b + cnt)) begin
          failures++;
          $display("FAIL one-row addr %0d expected %0d", addr1[0], b + cnt);
        end
        if (step) cnt++;
        @(posedge clk);
      end
      step <= 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
