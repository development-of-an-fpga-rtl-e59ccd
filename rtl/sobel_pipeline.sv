// Sobel pipeline: 3x3 pixel window and the first two of the three pipeline
// stages of the edge core (the third is the register in the result cache).
//
// Each clock with col_valid a column of three pixels (previous, present and
// next image row, from the three row caches) shifts into the window from
// the right. Stage 1 computes the horizontal and vertical Sobel sums Dx and
// Dy in parallel into 11-bit signed registers, using only shifts, adds and
// negations. Stage 2 forms |D| = |Dx| + |Dy| and saturates it to 8 bits.
// res_valid/res_pix therefore follow the column that completes a window by
// two clocks. A result is produced only when the window holds three columns
// of the current row: row_start (with the first column of a row) restarts
// the fill count, so the two columns after it refill the window and no
// result mixing two rows is ever emitted. The n-th result of a row belongs
// to image column n (columns 1 .. COLS-2).
//
// The window, the parallel Dx/Dy stage, the |Dx|+|Dy| stage and the
// shift-and-negate masks follow the original design. The standard Sobel
// coefficients, clipping to 255 and the fill-count gating are choices of
// this implementation.
module sobel_pipeline
  import sobel_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   col_valid,
  input  logic   row_start,
  input  pixel_t col_pix [3],   // [0] previous row, [1] present, [2] next
  output logic   res_valid,
  output pixel_t res_pix
);

  typedef logic signed [SUM_W-1:0] sum_t;

  pixel_t      win [3][3];     // win[row][col], col 0 oldest (left)
  logic [1:0]  fill;
  logic        win_ok;         // window just completed by a new column
  sum_t        dx_q, dy_q;
  logic        v1_q;
  logic [MAG_W-1:0] mag;

  // Window shift register and fill count.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fill   <= '0;
      win_ok <= 1'b0;
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++) win[r][c] <= '0;
    end else begin
      win_ok <= 1'b0;
      if (col_valid) begin
        for (int r = 0; r < 3; r++) begin
          win[r][0] <= win[r][1];
          win[r][1] <= win[r][2];
          win[r][2] <= col_pix[r];
        end
        if (row_start) fill <= 2'd1;
        else if (fill != 2'd3) fill <= fill + 2'd1;
        win_ok <= row_start ? 1'b0 : (fill >= 2'd2);
      end
    end
  end

  // Zero-extend a pixel and optionally double it (a left shift).
  function automatic sum_t px(input pixel_t p, input bit dbl);
    return dbl ? sum_t'({p, 1'b0}) : sum_t'(p);
  endfunction

  // Stage 1: Dx and Dy in parallel.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dx_q <= '0;
      dy_q <= '0;
      v1_q <= 1'b0;
    end else begin
      v1_q <= win_ok;
      if (win_ok) begin
        dx_q <= (px(win[0][2], 0) + px(win[1][2], 1) + px(win[2][2], 0))
              - (px(win[0][0], 0) + px(win[1][0], 1) + px(win[2][0], 0));
        dy_q <= (px(win[2][0], 0) + px(win[2][1], 1) + px(win[2][2], 0))
              - (px(win[0][0], 0) + px(win[0][1], 1) + px(win[0][2], 0));
      end
    end
  end

  // Stage 2: magnitude approximation and saturation to a pixel.
  function automatic logic [MAG_W-1:0] absval(input sum_t v);
    return v[SUM_W-1] ? MAG_W'(-v) : MAG_W'(v);
  endfunction

  assign mag = absval(dx_q) + absval(dy_q);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      res_valid <= 1'b0;
      res_pix   <= '0;
    end else begin
      res_valid <= v1_q;
      if (v1_q) res_pix <= (mag > MAG_W'(255)) ? 8'hFF : mag[PIX_W-1:0];
    end
  end

endmodule
