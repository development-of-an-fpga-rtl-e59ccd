// Testbench of hex_display: pixels become two upper-case hex digits,
// hsync ',' and vsync '*', one clock later; idle clocks give no character.
module tb_hex_display;
  import sobel_pkg::*;
  logic clk = 0, rst_n = 0;
  video_t vin = VIDEO_IDLE;
  logic [7:0] chars [2];
  logic [1:0] nchars;
  int checks = 0, failures = 0;
  logic [7:0] exp_c [$];
  string got = "";

  hex_display dut (.clk, .rst_n, .vin, .chars, .nchars);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n)
    for (int i = 0; i < int'(nchars); i++) begin
      checks++;
      if (exp_c.size() == 0 || chars[i] !== exp_c.pop_front()) begin
        failures++;
        $display("FAIL char %c", chars[i]);
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
    @(negedge clk); rst_n = 1;
    for (int r = 0; r < 20; r++) begin
      for (int c = 0; c < 8; c++) begin
        automatic logic [7:0] p = 8'($urandom);
        @(negedge clk);
        vin = '{data: p, valid: 1'b1, hsync: 1'b0, vsync: 1'b0};
        exp_c.push_back(sobel_ref_pkg::hex_digit(p[7:4]));
        exp_c.push_back(sobel_ref_pkg::hex_digit(p[3:0]));
        if (c == 4) begin
          @(negedge clk);
          vin = VIDEO_IDLE;
          vin.data = 8'hAA;                 // data without valid: nothing
        end
      end
      @(negedge clk);
      vin = '{data: '0, valid: 1'b0, hsync: 1'b1, vsync: 1'b0};
      exp_c.push_back(8'h2C);
    end
    @(negedge clk);
    vin = '{data: '0, valid: 1'b0, hsync: 1'b0, vsync: 1'b1};
    exp_c.push_back(8'h2A);
    @(negedge clk);
    vin = VIDEO_IDLE;
    repeat (3) @(negedge clk);
    checks++;
    if (exp_c.size() != 0) begin
      failures++;
      $display("FAIL %0d characters missing", exp_c.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
