// tb_video_pkg: test-pattern and reference functions for the video tests.
//
// The pattern gives every source pixel a luma value and every pixel pair a
// chroma pair that depend on position, line and field, always inside the
// legal 16..235/240 range so no data byte can be mistaken for a timing
// code. The reference conversion to RGB565 is written from the BT.601
// equations in 8.8 fixed point (coefficients 298, 409, 100, 208, 516).
package tb_video_pkg;

  function automatic logic [7:0] pat_y(int x, int line, int field);
    return 8'(16 + ((x * 3 + line * 5 + field * 101) % 220));
  endfunction

  function automatic logic [7:0] pat_cb(int pair, int line, int field);
    return 8'(16 + ((pair * 7 + line * 3 + field * 53) % 225));
  endfunction

  function automatic logic [7:0] pat_cr(int pair, int line, int field);
    return 8'(16 + ((pair * 11 + line * 13 + field * 29) % 225));
  endfunction

  function automatic int clip(int v);
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction

  function automatic logic [23:0] ref_rgb888(logic [7:0] y, logic [7:0] cb, logic [7:0] cr);
    int c, d, e, r, g, b;
    c = int'(y) - 16;
    d = int'(cb) - 128;
    e = int'(cr) - 128;
    r = clip((298 * c + 409 * e + 128) >>> 8);
    g = clip((298 * c - 100 * d - 208 * e + 128) >>> 8);
    b = clip((298 * c + 516 * d + 128) >>> 8);
    return {8'(r), 8'(g), 8'(b)};
  endfunction

  function automatic logic [15:0] ref_rgb565(logic [7:0] y, logic [7:0] cb, logic [7:0] cr);
    logic [23:0] p;
    p = ref_rgb888(y, cb, cr);
    return {p[23:19], p[15:10], p[7:3]};
  endfunction

  // RGB565 expected at output pixel (ox, oy) of the capture path: field-0
  // line oy, source pixel h_offset + 2*ox.
  function automatic logic [15:0] ref_capture(int ox, int oy, int h_offset);
    int xs;
    xs = h_offset + 2 * ox;
    return ref_rgb565(pat_y(xs, oy, 0), pat_cb(xs / 2, oy, 0), pat_cr(xs / 2, oy, 0));
  endfunction

endpackage
