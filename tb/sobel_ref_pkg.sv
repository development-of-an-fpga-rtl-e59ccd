// Reference model for the testbenches: test images and the expected Sobel
// magnitude image, computed directly from the definition
//   Dx = (p[r-1][c+1] + 2p[r][c+1] + p[r+1][c+1]) - (p[r-1][c-1] + 2p[r][c-1] + p[r+1][c-1])
//   Dy = (p[r+1][c-1] + 2p[r+1][c] + p[r+1][c+1]) - (p[r-1][c-1] + 2p[r-1][c] + p[r-1][c+1])
//   out = min(|Dx| + |Dy|, 255), 0 on the one-pixel border.
package sobel_ref_pkg;

  typedef logic [7:0] img_t [];

  // Test image: smooth ramps, a bright rectangle with sharp edges (to reach
  // saturation) and a band of pseudo-random noise.
  function automatic void make_image(ref logic [7:0] img [], input int cols,
                                     input int rows, input int seed);
    int unsigned s = 32'h1234_5678 ^ seed;
    img = new[cols * rows];
    for (int r = 0; r < rows; r++)
      for (int c = 0; c < cols; c++) begin
        int v;
        s = s * 1103515245 + 12345;
        v = (r * 7 + c * 3 + seed) & 'h7F;
        if (r > rows / 4 && r < rows / 2 && c > cols / 4 && c < cols / 2) v = 250;
        if (r >= (3 * rows) / 4) v = (s >> 16) & 'hFF;
        img[r * cols + c] = 8'(v);
      end
  endfunction

  function automatic int sobel_ref(ref logic [7:0] img [], input int cols,
                                   input int rows, input int r, input int c);
    int p [3][3];
    int dx, dy, m;
    if (r == 0 || c == 0 || r == rows - 1 || c == cols - 1) return 0;
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) p[i][j] = int'(img[(r - 1 + i) * cols + (c - 1 + j)]);
    dx = (p[0][2] + 2 * p[1][2] + p[2][2]) - (p[0][0] + 2 * p[1][0] + p[2][0]);
    dy = (p[2][0] + 2 * p[2][1] + p[2][2]) - (p[0][0] + 2 * p[0][1] + p[0][2]);
    m  = (dx < 0 ? -dx : dx) + (dy < 0 ? -dy : dy);
    return (m > 255) ? 255 : m;
  endfunction

  function automatic logic [7:0] hex_digit(input logic [3:0] n);
    return (n < 10) ? 8'h30 + 8'(n) : 8'h37 + 8'(n);
  endfunction

endpackage
