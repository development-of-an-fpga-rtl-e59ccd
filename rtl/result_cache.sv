// Result cache: four result pixels gathered into one word of the result
// frame buffer (third pipeline stage).
//
// row_start (a pulse before the results of a row arrive) loads row_base,
// the word address of that row in the result frame buffer, into the output
// indexing circuit and clears the cache. The results of a row arrive in
// column order for columns 1 .. COLS-2; the border columns 0 and COLS-1 are
// written as 0. When the lane for column mod 4 = 3 is filled, or the last
// result of the row arrives, the word is written (wr_en for one clock) and
// the index advances by one word. Results may arrive at up to one per clock.
//
// Gathering four results per write and the output-side indexing follow
// the original design; the zero border columns are this implementation's
// choice.
module result_cache
  import sobel_pkg::*;
#(
  parameter int unsigned COLS  = 640,
  parameter int unsigned WORDS = 76800,
  localparam int unsigned AW   = (WORDS > 1) ? $clog2(WORDS) : 1,
  localparam int unsigned CW   = $clog2(COLS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          row_start,
  input  logic [AW-1:0] row_base,
  input  logic          res_valid,
  input  pixel_t        res_pix,
  output logic          wr_en,
  output logic [AW-1:0] wr_addr,
  output word_t         wr_data
);

  logic [CW-1:0] col;
  word_t         acc, merged;
  logic [1:0]    lane;
  logic          last, flush;
  logic [AW-1:0] addr [1];

  index_gen #(.COLS(COLS), .WORDS(WORDS), .NROWS(1)) u_idx (
    .clk, .rst_n, .start(row_start), .base(row_base), .step(wr_en), .addr
  );

  assign lane  = col[1:0];
  assign last  = (col == CW'(COLS - 2));
  assign flush = res_valid && (lane == 2'd3 || last);

  always_comb begin
    merged = acc;
    merged[lane*PIX_W +: PIX_W] = res_pix;
    if (last) merged[3*PIX_W +: PIX_W] = '0;   // border column COLS-1
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      col     <= CW'(1);
      acc     <= '0;
      wr_en   <= 1'b0;
      wr_data <= '0;
    end else begin
      wr_en <= 1'b0;
      if (row_start) begin
        col <= CW'(1);
        acc <= '0;                               // border column 0
      end else if (res_valid) begin
        col <= col + 1'b1;
        acc <= flush ? '0 : merged;
        if (flush) begin
          wr_en   <= 1'b1;
          wr_data <= merged;
        end
      end
    end
  end

  assign wr_addr = addr[0];

endmodule
