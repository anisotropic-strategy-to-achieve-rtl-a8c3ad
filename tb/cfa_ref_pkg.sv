// cfa_ref_pkg: reference model of the colour interpolation, for the testbenches.
//
// Works on a whole frame held as a flat array (img[r*w + c]) and computes the
// expected RGB value and green model of any pixel with plain integer arithmetic,
// written independently of the RTL datapath. Samples outside the frame are taken
// from the mirror position about the pixel being computed.
package cfa_ref_pkg;

  // Divide an eighths sum by eight, rounding half up, and clamp to 0..maxv.
  function automatic int rnd8(input int t, input int maxv);
    int q;
    q = t + 4;
    q = (q >= 0) ? q / 8 : -((-q + 7) / 8);   // floor division
    if (q < 0) q = 0;
    if (q > maxv) q = maxv;
    return q;
  endfunction

  // True when the eighths sum had to be clamped.
  function automatic bit clamps(input int t, input int maxv);
    int q;
    q = t + 4;
    q = (q >= 0) ? q / 8 : -((-q + 7) / 8);
    return (q < 0) || (q > maxv);
  endfunction

  function automatic int absv(input int a);
    return (a < 0) ? -a : a;
  endfunction

  // Sample at offset (dr, dc) from (r, c), mirrored about (r, c) when off the frame.
  function automatic int px(ref int img[], input int w, input int h,
                            input int r, input int c, input int dr, input int dc);
    int rr, cc;
    rr = r + dr;
    cc = c + dc;
    if (rr < 0 || rr >= h) rr = r - dr;
    if (cc < 0 || cc >= w) cc = c - dc;
    return img[rr*w + cc];
  endfunction

  // Green model at a red/blue site: 0 none, 1 horizontal, 2 vertical.
  function automatic int gmode(ref int img[], input int w, input int h,
                               input int r, input int c);
    int dh, dv, td;
    dh = absv(px(img,w,h,r,c,0,-1) - px(img,w,h,r,c,0,1))
       + absv(px(img,w,h,r,c,-1,-1) - px(img,w,h,r,c,-1,1))
       + absv(px(img,w,h,r,c,1,-1) - px(img,w,h,r,c,1,1));
    dv = absv(px(img,w,h,r,c,-1,0) - px(img,w,h,r,c,1,0))
       + absv(px(img,w,h,r,c,-1,-1) - px(img,w,h,r,c,1,-1))
       + absv(px(img,w,h,r,c,-1,1) - px(img,w,h,r,c,1,1));
    td = dh + dv;
    if (4*dh < td) return 1;
    if (4*dv < td) return 2;
    return 0;
  endfunction

  // Green at a red/blue site, as an eighths sum.
  function automatic int g8(ref int img[], input int w, input int h,
                            input int r, input int c);
    int gl, gr, gu, gd, lap;
    gl  = px(img,w,h,r,c,0,-1);
    gr  = px(img,w,h,r,c,0,1);
    gu  = px(img,w,h,r,c,-1,0);
    gd  = px(img,w,h,r,c,1,0);
    lap = 2*px(img,w,h,r,c,0,0) - px(img,w,h,r,c,0,-2) - px(img,w,h,r,c,0,2);
    case (gmode(img,w,h,r,c))
      1:       return 4*(gl+gr) + 2*lap;
      2:       return 3*(gu+gd) + (gl+gr) + lap;
      default: return 2*(gl+gr+gu+gd) + lap;
    endcase
  endfunction

  // Red/blue models as eighths sums.
  function automatic int m1_8(ref int img[], input int w, input int h, input int r, input int c);
    return 4*(px(img,w,h,r,c,0,-1) + px(img,w,h,r,c,0,1))
         + 2*(2*px(img,w,h,r,c,0,0) - px(img,w,h,r,c,0,-2) - px(img,w,h,r,c,0,2));
  endfunction

  function automatic int m2_8(ref int img[], input int w, input int h, input int r, input int c);
    return 4*(px(img,w,h,r,c,-1,0) + px(img,w,h,r,c,1,0))
         + 4*px(img,w,h,r,c,0,0) - px(img,w,h,r,c,-1,-1) - px(img,w,h,r,c,-1,1)
         - px(img,w,h,r,c,1,-1) - px(img,w,h,r,c,1,1);
  endfunction

  function automatic int m3_8(ref int img[], input int w, input int h, input int r, input int c,
                              input int ghat);
    return 2*(px(img,w,h,r,c,-1,-1) + px(img,w,h,r,c,-1,1) + px(img,w,h,r,c,1,-1)
              + px(img,w,h,r,c,1,1))
         + 4*ghat - px(img,w,h,r,c,0,-1) - px(img,w,h,r,c,0,1)
         - px(img,w,h,r,c,-1,0) - px(img,w,h,r,c,1,0);
  endfunction

  // Expected output pixel. kind: 0 red site, 1 green on red row, 2 green on blue
  // row, 3 blue site. nclamp counts the clamped results.
  function automatic void expect_rgb(ref int img[], input int w, input int h,
                                     input int r, input int c, input int kind,
                                     input int maxv, output int er, output int eg,
                                     output int eb, output int em, inout int nclamp);
    int ctr, gh;
    ctr = img[r*w + c];
    em  = 0;
    if (kind == 0 || kind == 3) begin
      em = gmode(img,w,h,r,c);
      if (clamps(g8(img,w,h,r,c), maxv)) nclamp++;
      gh = rnd8(g8(img,w,h,r,c), maxv);
      eg = gh;
      if (clamps(m3_8(img,w,h,r,c,gh), maxv)) nclamp++;
      if (kind == 0) begin er = ctr; eb = rnd8(m3_8(img,w,h,r,c,gh), maxv); end
      else           begin eb = ctr; er = rnd8(m3_8(img,w,h,r,c,gh), maxv); end
    end else begin
      eg = ctr;
      if (clamps(m1_8(img,w,h,r,c), maxv) || clamps(m2_8(img,w,h,r,c), maxv)) nclamp++;
      if (kind == 1) begin er = rnd8(m1_8(img,w,h,r,c), maxv); eb = rnd8(m2_8(img,w,h,r,c), maxv); end
      else           begin eb = rnd8(m1_8(img,w,h,r,c), maxv); er = rnd8(m2_8(img,w,h,r,c), maxv); end
    end
  endfunction

  // Colour kind of (r, c) for red at parity (r_row, r_col).
  function automatic int kind_at(input int r, input int c, input int r_row, input int r_col);
    bit rr, cc;
    rr = ((r & 1) == r_row);
    cc = ((c & 1) == r_col);
    if (rr && cc)   return 0;
    if (!rr && !cc) return 3;
    if (rr)         return 1;
    return 2;
  endfunction

endpackage
