// Row cache: four pixels of one image row.
//
// load copies a 4-pixel word from the frame buffer; each shift moves the
// next pixel (lowest column first) to the pixel output. count tells how many
// pixels are still held, pixel is the oldest of them. A load in the same
// cycle as the last shift refills the cache without a gap, so a stream of
// one pixel per clock can be kept up. The edge core uses three of these
// caches (previous, present and next row) and one more to read the result
// frame buffer.
//
// The four-pixel cache per row follows the original design; the shift
// order and the gap-free refill are choices of this implementation.
module row_cache
  import sobel_pkg::*;
#(
  parameter int unsigned N_PIX = PIX_PER_WORD
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic                                   load,
  input  logic [PIX_W*N_PIX-1:0]        word,
  input  logic                                   shift,
  output pixel_t                                 pixel,
  output logic [$clog2(N_PIX+1)-1:0]    count
);

  logic [PIX_W*N_PIX-1:0] data;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      data  <= '0;
      count <= '0;
    end else if (load) begin
      data  <= word;
      count <= ($clog2(N_PIX+1))'(N_PIX);
    end else if (shift && count != 0) begin
      data  <= data >> PIX_W;
      count <= count - 1'b1;
    end
  end

  assign pixel = data[PIX_W-1:0];

endmodule
