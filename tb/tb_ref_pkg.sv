// tb_ref_pkg: reference arithmetic and test images for the testbenches.
//
// Written independently of the RTL: plain integer arithmetic on whole
// sample histories, no fixed-width tricks. blur_ref and emboss_ref take the
// channel history newest first (x[0] is the current sample).
package tb_ref_pkg;

  // 9-tap Gaussian weights, C(8,k), normalised by 256
  function automatic int blur_ref(input int x [9]);
    int w [9] = '{1, 8, 28, 56, 70, 56, 28, 8, 1};
    int s = 0;
    for (int k = 0; k < 9; k++) s += w[k] * x[k];
    return s / 256;
  endfunction

  // Emboss IIR state: previous unclipped outputs, newest first.
  // v[n] = round((256*x[n] - 256*x[n-1] + 64*v[n-1]) / 256), halves rounded
  // up, saturated to
  // 16 bits signed; output = clip(v + 128, 0, 255).
  function automatic int floor_div256(input int a);
    return (a >= 0) ? a / 256 : -((-a + 255) / 256);
  endfunction

  function automatic int emboss_v(input int x0, input int x1, input int v1);
    int v = floor_div256(256 * x0 - 256 * x1 + 64 * v1 + 128);
    if (v > 32767)  v = 32767;
    if (v < -32768) v = -32768;
    return v;
  endfunction

  function automatic int clip8(input int y);
    return (y < 0) ? 0 : (y > 255) ? 255 : y;
  endfunction

  // Test image: a pixel word per address (pad byte random-looking too, it
  // must be ignored). Smooth ramps plus hashed noise so edges exist.
  function automatic logic [31:0] image_word(input int unsigned a);
    logic [31:0] h;
    h = a * 32'h9E3779B1;
    h = h ^ (h >> 15);
    return {h[31:24], 8'(a * 3) ^ h[7:0], 8'(a >> 2), ((a % 64) < 32) ? 8'd230 : 8'd20};
  endfunction

  // Grayscale test picture of size w x h (R = G = B): a bright disc with a
  // soft rim and a little texture on a flat dark background, like a
  // photographed fruit. Pixel a is at row a / w, column a % w.
  function automatic logic [31:0] gray_disc_word(input int unsigned a, input int unsigned w,
                                                 input int unsigned h);
    int x, y, d2, r2, lum;
    x  = int'(a % w) - int'(w / 2);
    y  = int'(a / w) - int'(h / 2);
    d2 = x * x + y * y;
    r2 = int'(w * w / 9);
    lum = (d2 < r2) ? 200 - (50 * d2) / r2 : 30;
    if (d2 < r2) lum += int'((a * 7) % 5);  // texture on the disc only
    return {8'h00, 8'(lum), 8'(lum), 8'(lum)};
  endfunction

  // Picture selector shared by the memory model and the checkers.
  function automatic logic [31:0] picture_word(input int pic, input int unsigned a,
                                               input int unsigned w, input int unsigned h);
    return (pic == 1) ? gray_disc_word(a, w, h) : image_word(a);
  endfunction

endpackage
