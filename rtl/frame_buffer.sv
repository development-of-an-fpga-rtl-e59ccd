// Frame memory of the edge core, used both as input frame buffer and as
// result frame buffer.
//
// WORDS words of four 8-bit pixels. One write port with a write enable per
// byte lane, so the buffering section can store a single pixel per clock
// while the result cache stores a whole word. NRD read ports share one read
// enable and return their words one clock after re (registered read, as a
// block RAM does); rdata holds its value while re is low. Three read ports
// let the indexing section fetch the previous, present and next rows in the
// same cycle. The memory is not reset; only written words are read.
//
// The on-chip frame buffer and the parallel fetch of three rows follow the
// original design; byte-lane enables and the registered read are choices
// of this implementation.
module frame_buffer
  import sobel_pkg::*;
#(
  parameter int unsigned WORDS = 76800,
  parameter int unsigned NRD   = 3,
  localparam int unsigned AW   = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic                    clk,
  input  logic [PIX_PER_WORD-1:0] we,
  input  logic [AW-1:0]           waddr,
  input  word_t                   wdata,
  input  logic                    re,
  input  logic [AW-1:0]           raddr [NRD],
  output word_t                   rdata [NRD]
);

  word_t mem [WORDS];

  always_ff @(posedge clk) begin
    for (int k = 0; k < PIX_PER_WORD; k++)
      if (we[k]) mem[waddr][k*PIX_W +: PIX_W] <= wdata[k*PIX_W +: PIX_W];
  end

  always_ff @(posedge clk) begin
    if (re)
      for (int p = 0; p < NRD; p++) rdata[p] <= mem[raddr[p]];
  end

endmodule
