// mva_tb_pkg: test image and reference model shared by the testbenches.
//
// img_pix gives the colour of pixel (x, y) of stored image img; the EEPROM
// model serves these values, image after image, row after row. ref_pixel is
// an independent model of what monitor m must show at (h, v) for a given
// picture position, enlargement and image: it works from canvas coordinates
// straight to source pixels, without the read schedule of the hardware.
package mva_tb_pkg;
  import mva_pkg::*;

  function automatic rgb_t img_pix(int img, int x, int y);
    rgb_t p;
    p.r = 8'(x * 7 + img * 91 + (y & 3) * 64);
    p.g = 8'(y * 13 + img * 29 + x / 5);
    p.b = 8'(x * 3 + y * 5 + img * 57);
    return p;
  endfunction

  function automatic rgb_t ref_avg(rgb_t a, rgb_t b);
    rgb_t o;
    o.r = 8'((int'(a.r) + int'(b.r) + 1) / 2);
    o.g = 8'((int'(a.g) + int'(b.g) + 1) / 2);
    o.b = 8'((int'(a.b) + int'(b.b) + 1) / 2);
    return o;
  endfunction

  function automatic rgb_t ref_pixel(int m, int h, int v, int h_active, int v_active,
                                     int img_w, int img_h, int px, int py, bit zoom, int img);
    int X, Y, rx, ry, u0, u1, w0, w1;
    rgb_t a, b;
    X  = (m % 2) * h_active + h;
    Y  = (m / 2) * v_active + v;
    rx = X - px;
    ry = Y - py;
    if (!zoom) begin
      if (rx < 0 || ry < 0 || rx >= img_w || ry >= img_h) return '0;
      return img_pix(img, rx, ry);
    end
    if (rx < 0 || ry < 0 || rx >= 2 * img_w || ry >= 2 * img_h) return '0;
    u0 = rx / 2; u1 = (rx + 1) / 2; if (u1 > img_w - 1) u1 = img_w - 1;
    w0 = ry / 2; w1 = (ry + 1) / 2; if (w1 > img_h - 1) w1 = img_h - 1;
    a = (rx % 2 != 0) ? ref_avg(img_pix(img, u0, w0), img_pix(img, u1, w0)) : img_pix(img, u0, w0);
    b = (rx % 2 != 0) ? ref_avg(img_pix(img, u0, w1), img_pix(img, u1, w1)) : img_pix(img, u0, w1);
    return (ry % 2 != 0) ? ref_avg(a, b) : a;
  endfunction

endpackage
