// Complete simulated video edge detection system.
//
// A camera model turns a hex-image character stream (two hex digits per
// pixel, ',' after each row, '*' after the frame) into digital composite
// video; the Sobel edge detection core stores the frame, computes the
// gradient magnitude image and sends it out as composite video; a display
// model turns that video back into hex-image characters. The input takes
// at most one character per clock, so a pixel arrives every second clock;
// the output gives up to two characters per clock (disp_nchars).
// busy is high from the first pixel of a frame until frame_done;
// frame_received marks the end of the input frame and row_stall is high
// while the core waits for input rows (the camera is slower than the core).
//
// The camera -> processor -> display chain follows the original test set-up,
// here as synthesizable logic on one clock.
module edge_system
  import sobel_pkg::*;
#(
  parameter int unsigned COLS = 640,
  parameter int unsigned ROWS = 480
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] cam_char,
  input  logic       cam_char_valid,
  output logic [7:0] disp_chars [2],
  output logic [1:0] disp_nchars,
  output logic       busy,
  output logic       frame_done,
  output logic       frame_received,
  output logic       row_stall
);

  video_t cam_video, edge_video;

  hex_camera u_cam (
    .clk, .rst_n, .char_in(cam_char), .char_valid(cam_char_valid), .vout(cam_video)
  );

  sobel_edge_core #(.COLS(COLS), .ROWS(ROWS)) u_core (
    .clk, .rst_n, .vin(cam_video), .vout(edge_video), .busy, .frame_done,
    .frame_received, .row_stall
  );

  hex_display u_disp (
    .clk, .rst_n, .vin(edge_video), .chars(disp_chars), .nchars(disp_nchars)
  );

endmodule
