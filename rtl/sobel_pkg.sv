// Shared types and constants of the Sobel edge detection core.
//
// Pixels are 8-bit grey levels. Frame memories hold words of four pixels
// (pixel k of a word sits in bits [8k+7:8k], k = column mod 4), the width of
// the row caches. The digital composite video signal between the camera
// model, the edge core and the display model is carried as video_t: pixel
// data with a valid flag plus one-cycle horizontal (end of row) and vertical
// (end of frame) sync pulses. Valid is low whenever a sync pulse is high.
// Partial sums of the Sobel masks need 11 bits with sign (|sum| <= 1020).
//
// The 8-bit pixels, 4-pixel words and 11-bit sums follow the original
// design; the packed video_t bundle is this implementation's choice.
package sobel_pkg;

  localparam int unsigned PIX_W        = 8;
  localparam int unsigned PIX_PER_WORD = 4;
  localparam int unsigned WORD_W       = PIX_W * PIX_PER_WORD;
  localparam int unsigned SUM_W        = 11;
  localparam int unsigned MAG_W        = SUM_W;  // |Dx|+|Dy| <= 2040

  typedef logic [PIX_W-1:0]  pixel_t;
  typedef logic [WORD_W-1:0] word_t;

  typedef struct packed {
    pixel_t data;
    logic   valid;
    logic   hsync;
    logic   vsync;
  } video_t;

  localparam video_t VIDEO_IDLE = '{data: '0, valid: 1'b0, hsync: 1'b0, vsync: 1'b0};

  // Sobel masks, rows top (previous image row) to bottom (next image row),
  // columns left to right:
  //   Gx = [-1 0 +1; -2 0 +2; -1 0 +1]   Gy = [-1 -2 -1; 0 0 0; +1 +2 +1]
  // They are applied with shifts and negations, never a multiplier.

  // ASCII codes of the hex-image character stream.
  localparam logic [7:0] CH_ROW_END   = 8'h2C;  // ','
  localparam logic [7:0] CH_FRAME_END = 8'h2A;  // '*'

  function automatic logic [7:0] hex_char(input logic [3:0] nib);
    return (nib < 4'd10) ? (8'h30 + {4'd0, nib}) : (8'h37 + {4'd0, nib});
  endfunction

endpackage
