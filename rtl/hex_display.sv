// Display model: digital composite video to hex-image characters.
//
// Each clock it looks at the incoming video: a valid pixel becomes two
// upper-case hexadecimal digits (high nibble in chars[0]), a horizontal
// sync pulse becomes ',' and a vertical sync pulse '*' (vertical wins if
// both are high). nchars tells how many of chars[0..1] are valid this
// clock (0, 1 or 2). Output is registered: one clock after the input.
//
// The coding follows the original display model; the two-character
// output port is this implementation's choice.
module hex_display
  import sobel_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  video_t     vin,
  output logic [7:0] chars [2],
  output logic [1:0] nchars
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      chars  <= '{default: '0};
      nchars <= '0;
    end else begin
      nchars <= '0;
      if (vin.vsync) begin
        chars[0] <= CH_FRAME_END;
        nchars   <= 2'd1;
      end else if (vin.hsync) begin
        chars[0] <= CH_ROW_END;
        nchars   <= 2'd1;
      end else if (vin.valid) begin
        chars[0] <= hex_char(vin.data[7:4]);
        chars[1] <= hex_char(vin.data[3:0]);
        nchars   <= 2'd2;
      end
    end
  end

endmodule
