// derive_pixel: horizontal and vertical Sobel gradients of one pixel.
// The 3x3 neighbourhood is numbered row by row, p0 p1 p2 / p3 p4 p5 / p6 p7 p8;
// the centre p4 has weight 0 in both masks and is not an input.
//   Ix = (p2 - p0) + 2*(p5 - p3) + (p8 - p6)      mask [-1 0 1; -2 0 2; -1 0 1]
//   Iy = (p6 - p0) + 2*(p7 - p1) + (p8 - p2)      mask [-1 -2 -1; 0 0 0; 1 2 1]
// Each gradient is three 9-bit differences, the middle one doubled by a
// wired shift, added together. Both are signed 11-bit (|I| <= 4*255) and
// keep their sign, which the Harris products need. Purely combinational.
module derive_pixel (
  input  ipu_pkg::pixel_t p0, p1, p2, p3, p5, p6, p7, p8,
  output ipu_pkg::grad_t  ix,
  output ipu_pkg::grad_t  iy
);
  typedef logic signed [8:0] diff_t;

  function automatic diff_t sub(input ipu_pkg::pixel_t a, input ipu_pkg::pixel_t b);
    return $signed({1'b0, a}) - $signed({1'b0, b});
  endfunction

  diff_t dx0, dx1, dx2, dy0, dy1, dy2;

  always_comb begin
    dx0 = sub(p2, p0);
    dx1 = sub(p5, p3);
    dx2 = sub(p8, p6);
    dy0 = sub(p6, p0);
    dy1 = sub(p7, p1);
    dy2 = sub(p8, p2);
    ix  = ipu_pkg::grad_t'(dx0) + (ipu_pkg::grad_t'(dx1) <<< 1) + ipu_pkg::grad_t'(dx2);
    iy  = ipu_pkg::grad_t'(dy0) + (ipu_pkg::grad_t'(dy1) <<< 1) + ipu_pkg::grad_t'(dy2);
  end
endmodule
