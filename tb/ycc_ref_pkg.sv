// ycc_ref_pkg: reference model of the RGB to YCC conversion for testbenches.
//
// Evaluates the conversion equations directly in 64-bit integer arithmetic,
// with its own copy of the coefficients, so it shares nothing with the
// hardware it checks:
//   Y  = (0x4c8b R + 0x9646 G + 0x1d2f B) >> 16
//   Cr = (((0x8000 R - 0x6b2f G - 0x14d1 B) >> 16) + 128) & 0xff
//   Cb = (((-0x2b33 R - 0x54cd G + 0x8000 B) >> 16) + 128) & 0xff
//   YCC = Y << 16 | Cb << 8 | Cr
package ycc_ref_pkg;
  function automatic logic [23:0] ref_ycc(logic [23:0] rgb);
    longint r, g, b, sy, scr, scb, y, cr, cb;
    r = longint'(rgb[23:16]); g = longint'(rgb[15:8]); b = longint'(rgb[7:0]);
    sy  =  64'sh4c8b * r + 64'sh9646 * g + 64'sh1d2f * b;
    scr =  64'sh8000 * r - 64'sh6b2f * g - 64'sh14d1 * b;
    scb = -64'sh2b33 * r - 64'sh54cd * g + 64'sh8000 * b;
    y  = sy >>> 16;
    cr = ((scr >>> 16) + 128) & 64'hff;
    cb = ((scb >>> 16) + 128) & 64'hff;
    return 24'((y << 16) + (cb << 8) + cr);
  endfunction
endpackage
