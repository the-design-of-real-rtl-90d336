// tb_pkg: test-pattern definition shared by the camera and DSP models.
// Pixel (0,0) of frame f holds f itself so that a reader can tell which
// frame it got; every other pixel is (37f + 5x + 11y + 1) mod 256.
package tb_pkg;
  function automatic logic [7:0] pix(input int f, input int x, input int y);
    if (x == 0 && y == 0) return 8'(f);
    return 8'(f * 37 + x * 5 + y * 11 + 1);
  endfunction
endpackage
