// Camera model: hex-image character stream to digital composite video.
//
// The frame arrives as ASCII text, one character per clock with
// char_valid: each pixel is two hexadecimal digits, high nibble first
// ('0'-'9', 'A'-'F' or 'a'-'f'), a ',' ends a row and a '*' ends the frame.
// The second digit of a pixel produces one clock of vout.valid with the
// pixel; ',' produces a one-clock horizontal sync pulse and '*' a one-clock
// vertical sync pulse, with valid low. Other characters (white space, line
// breaks) are ignored; a sync character also drops a dangling first digit.
// Output is registered: one clock after the character.
//
// The character coding and the sync pulses follow the original camera
// model; one-clock sync pulses, lower-case digits and skipping other
// characters are choices of this implementation.
module hex_camera
  import sobel_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] char_in,
  input  logic       char_valid,
  output video_t     vout
);

  logic       have_hi;
  logic [3:0] hi, nib;
  logic       is_hex;

  always_comb begin
    is_hex = 1'b1;
    nib    = '0;
    if (char_in >= 8'h30 && char_in <= 8'h39)      nib = 4'(char_in - 8'h30);
    else if (char_in >= 8'h41 && char_in <= 8'h46) nib = 4'(char_in - 8'h37);
    else if (char_in >= 8'h61 && char_in <= 8'h66) nib = 4'(char_in - 8'h57);
    else                                           is_hex = 1'b0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      have_hi <= 1'b0;
      hi      <= '0;
      vout    <= VIDEO_IDLE;
    end else begin
      vout <= VIDEO_IDLE;
      if (char_valid) begin
        if (is_hex) begin
          if (have_hi) begin
            vout.data  <= {hi, nib};
            vout.valid <= 1'b1;
            have_hi    <= 1'b0;
          end else begin
            hi      <= nib;
            have_hi <= 1'b1;
          end
        end else if (char_in == CH_ROW_END) begin
          vout.hsync <= 1'b1;
          have_hi    <= 1'b0;
        end else if (char_in == CH_FRAME_END) begin
          vout.vsync <= 1'b1;
          have_hi    <= 1'b0;
        end
      end
    end
  end

endmodule
