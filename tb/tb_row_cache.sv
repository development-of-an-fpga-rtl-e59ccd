// Testbench of row_cache: loads words, shifts pixels out lowest column
// first, refills in the same clock as the last shift, and holds on idle.
module tb_row_cache;
  import sobel_pkg::*;

  logic clk = 0, rst_n = 0, load = 0, shift = 0;
  word_t word = '0;
  pixel_t pixel;
  logic [2:0] count;
  int checks = 0, failures = 0;

  row_cache dut (.clk, .rst_n, .load, .word, .shift, .pixel, .count);

  always #5 clk = ~clk;

  task automatic check(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t w [8];
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    check(8'(count), 0, "count after reset");
    for (int i = 0; i < 8; i++) w[i] = $urandom;
    // word 0: load, idle one clock, then shift four pixels; word k+1 loads
    // together with the last shift of word k.
    load <= 1; word <= w[0];
    @(posedge clk);
    load <= 0;
    @(posedge clk);
    check(8'(count), 4, "count after load");
    check(pixel, w[0][7:0], "hold");
    for (int k = 0; k < 8; k++) begin
      for (int p = 0; p < 4; p++) begin
        shift <= 1;
        load  <= (p == 3) && (k < 7);
        word  <= (k < 7) ? w[k + 1] : '0;
        #1;
        check(pixel, w[k][p*8 +: 8], $sformatf("word %0d pixel %0d", k, p));
        check(8'(count), 8'(4 - p), "count while shifting");
        @(posedge clk);
      end
    end
    shift <= 0; load <= 0;
    @(posedge clk);
    check(8'(count), 0, "empty at end");
    shift <= 1;
    @(posedge clk);
    check(8'(count), 0, "shift on empty keeps zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
