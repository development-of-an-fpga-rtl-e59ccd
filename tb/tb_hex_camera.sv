// Testbench of hex_camera: a hex-image character stream (upper and lower
// case digits, stray spaces and line breaks, idle clocks) must give one
// valid pixel per digit pair, one hsync per ',' and one vsync per '*',
// each one clock after the character, with valid low during sync pulses.
module tb_hex_camera;
  import sobel_pkg::*;
  logic clk = 0, rst_n = 0, char_valid = 0;
  logic [7:0] char_in = '0;
  video_t vout;
  int checks = 0, failures = 0;
  int exp_pix [$];
  int n_h = 0, n_v = 0, exp_h = 0, exp_v = 0;

  hex_camera dut (.clk, .rst_n, .char_in, .char_valid, .vout);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if ((vout.hsync || vout.vsync) && vout.valid) begin
      failures++;
      $display("FAIL valid during sync");
    end
    if (vout.hsync) n_h++;
    if (vout.vsync) n_v++;
    if (vout.valid) begin
      checks++;
      if (exp_pix.size() == 0 || int'(vout.data) != exp_pix.pop_front()) begin
        failures++;
        $display("FAIL pixel %h", vout.data);
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input logic [7:0] ch);
    @(negedge clk);
    char_in = ch; char_valid = 1;
    if ($urandom % 4 == 0) begin
      @(negedge clk);
      char_valid = 0; char_in = 8'h2C;   // an idle ',' must be ignored
    end
  endtask

  initial begin
    @(negedge clk); rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      for (int r = 0; r < 6; r++) begin
        for (int c = 0; c < 10; c++) begin
          automatic logic [7:0] p = 8'($urandom);
          automatic logic [7:0] hi = sobel_ref_pkg::hex_digit(p[7:4]);
          automatic logic [7:0] lo = sobel_ref_pkg::hex_digit(p[3:0]);
          if (c % 3 == 0 && hi > 8'h39) hi = hi + 8'h20;   // lower case
          exp_pix.push_back(int'(p));
          send(hi);
          if (c == 5) send(8'h20);                         // stray space
          send(lo);
        end
        send(8'h2C); exp_h++;
        send(8'h0A);                                       // line break
      end
      send(8'h2A); exp_v++;
    end
    @(negedge clk); char_valid = 0;
    repeat (3) @(negedge clk);
    checks += 3;
    if (n_h != exp_h || n_v != exp_v || exp_pix.size() != 0) begin
      failures++;
      $display("FAIL hsync %0d/%0d vsync %0d/%0d left %0d", n_h, exp_h, n_v, exp_v, exp_pix.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
