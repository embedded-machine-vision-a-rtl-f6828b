// tb_image_pkg: synthetic test image used by the sensor model and the
// reference models of the testbenches. A checkerboard of 40x30 tiles (dark 40,
// light 200) gives horizontal and vertical edges; a saturated white patch
// (255) exercises clamping in the low-pass filter; a small hashed noise term
// (0..15) varies with the frame number.
package tb_image_pkg;
  function automatic logic [7:0] img_pixel(input int f, input int x, input int y);
    int base, noise;
    if (x >= 100 && x < 140 && y >= 60 && y < 100) return 8'd255;
    base  = (((x / 40) + (y / 30)) % 2 == 1) ? 200 : 40;
    noise = ((x * 7919 + y * 104729 + f * 31337) ^ (x * y)) & 15;
    return 8'(base + noise);
  endfunction
endpackage
