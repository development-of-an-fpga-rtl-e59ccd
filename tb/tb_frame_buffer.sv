// Testbench of frame_buffer: byte-lane writes, whole-word writes, three
// read ports with one clock of read latency, and rdata hold while re is low.
module tb_frame_buffer;
  import sobel_pkg::*;
  localparam int WORDS = 64;
  logic clk = 0;
  logic [3:0] we = '0;
  logic [5:0] waddr = '0;
  word_t wdata = '0;
  logic re = 0;
  logic [5:0] raddr [3];
  word_t rdata [3];
  word_t model [WORDS];
  int checks = 0, failures = 0;

  frame_buffer #(.WORDS(WORDS), .NRD(3)) dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    raddr = '{default: '0};
    // Fill by whole words.
    for (int a = 0; a < WORDS; a++) begin
      model[a] = $urandom;
      we <= 4'hF; waddr <= 6'(a); wdata <= model[a];
      @(posedge clk);
    end
    // Random single-byte writes, as the buffering section does.
    for (int i = 0; i < 200; i++) begin
      automatic int a = $urandom % WORDS, l = $urandom % 4;
      automatic logic [7:0] v = 8'($urandom);
      model[a][l*8 +: 8] = v;
      we <= 4'(1 << l); waddr <= 6'(a); wdata <= {4{v}};
      @(posedge clk);
    end
    we <= '0;
    // Reads on three ports.
    for (int i = 0; i < 100; i++) begin
      int a [3];
      for (int p = 0; p < 3; p++) a[p] = $urandom % WORDS;
      re <= 1;
      for (int p = 0; p < 3; p++) raddr[p] <= 6'(a[p]);
      @(posedge clk);
      re <= 0;
      for (int p = 0; p < 3; p++) raddr[p] <= 6'($urandom);
      @(posedge clk);      // rdata must still hold after an idle clock
      for (int p = 0; p < 3; p++) begin
        checks++;
        if (rdata[p] !== model[a[p]]) begin
          failures++;
          $display("FAIL port %0d addr %0d got %h expected %h", p, a[p], rdata[p], model[a[p]]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
