// Indexing section: frame buffer word addresses for the row caches.
//
// start loads the base address (first word of the topmost row of the
// window) and clears the counter; every step advances the counter by one
// word, that is by four pixels. Output p is base + counter + p*COLS/4,
// so with NROWS = 3 the three outputs address the previous, present and
// next image rows of the same four columns, and with NROWS = 1 the same
// circuit walks one row of the result frame buffer. Addresses are in
// words, so "+COLS" pixels is "+COLS/4" words.
//
// The base + counter (+ columns, + 2 x columns) scheme follows the
// original design; counting in words is this implementation's choice.
module index_gen
  import sobel_pkg::*;
#(
  parameter int unsigned COLS  = 640,
  parameter int unsigned WORDS = 76800,
  parameter int unsigned NROWS = 3,
  localparam int unsigned AW   = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [AW-1:0] base,
  input  logic          step,
  output logic [AW-1:0] addr [NROWS]
);

  localparam int unsigned ROW_WORDS = COLS / PIX_PER_WORD;

  logic [AW-1:0] base_q, cnt_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      base_q <= '0;
      cnt_q  <= '0;
    end else if (start) begin
      base_q <= base;
      cnt_q  <= '0;
    end else if (step) begin
      cnt_q  <= cnt_q + 1'b1;
    end
  end

  always_comb
    for (int p = 0; p < NROWS; p++)
      addr[p] = base_q + cnt_q + AW'(p * ROW_WORDS);

endmodule
