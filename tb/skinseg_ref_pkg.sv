// skinseg_ref_pkg: reference model for the skin segmentation testbenches.
//
// Works out the expected YCrCb value and skin decision of an RGB pixel in
// floating point (exact here, since every intermediate fits a double),
// written independently of the RTL's integer datapath:
//   Y  = floor((4899 R + 9617 G + 1868 B) / 2^14 + 1/2)
//   Cr = clamp(floor(((R - Y) 11682) / 2^14 + 128 + 1/2), 0, 255)
//   Cb = clamp(floor(((B - Y) 9241) / 2^14 + 128 + 1/2), 0, 255)
// and the skin test 133 <= Cr <= 173, 77 <= Cb <= 127 (bounds as arguments).
package skinseg_ref_pkg;

  function automatic int clamp255(input real v);
    int q;
    q = int'($floor(v));
    if (q < 0) q = 0;
    if (q > 255) q = 255;
    return q;
  endfunction

  function automatic int ref_y(input int r, input int g, input int b);
    return int'($floor((4899.0 * r + 9617.0 * g + 1868.0 * b) / 16384.0 + 0.5));
  endfunction

  function automatic int ref_cr(input int r, input int g, input int b);
    int y;
    y = ref_y(r, g, b);
    return clamp255(((r - y) * 11682.0) / 16384.0 + 128.0 + 0.5);
  endfunction

  function automatic int ref_cb(input int r, input int g, input int b);
    int y;
    y = ref_y(r, g, b);
    return clamp255(((b - y) * 9241.0) / 16384.0 + 128.0 + 0.5);
  endfunction

  function automatic bit ref_skin_ycc(input int cr, input int cb,
                                      input int cr_min = 133, input int cr_max = 173,
                                      input int cb_min = 77,  input int cb_max = 127);
    return (cr >= cr_min) && (cr <= cr_max) && (cb >= cb_min) && (cb <= cb_max);
  endfunction

  function automatic logic [7:0] ref_bin(input int r, input int g, input int b);
    return ref_skin_ycc(ref_cr(r, g, b), ref_cb(r, g, b)) ? 8'hFF : 8'h00;
  endfunction

  // A deterministic test image: a skin-toned ellipse on a varied background.
  function automatic logic [23:0] test_pixel(input int row, input int col,
                                             input int rows, input int cols);
    int dx, dy, r, g, b;
    dx = 2 * col - cols;
    dy = 2 * row - rows;
    if (dx * dx * rows * rows / 4 + dy * dy * cols * cols / 4 < (rows * cols * rows * cols) / 16) begin
      r = 200 + (row % 40);           // skin-like: R high, G mid, B lower
      g = 140 + (col % 30);
      b = 110 + ((row + col) % 25);
    end else begin
      r = (col * 7 + row * 3) % 256;
      g = (col * 5 + row * 11) % 256;
      b = (col * 13 + row) % 256;
    end
    return {r[7:0], g[7:0], b[7:0]};
  endfunction

endpackage
