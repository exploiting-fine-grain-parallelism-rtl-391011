// deblock_ref_pkg -- reference model for the testbenches: the H.264 luma
// edge filter for one line of samples, and a whole-picture deblocking in the
// standard order (MB by MB in raster order; inside an MB the four vertical
// edges left to right, then the four horizontal edges top to bottom).
// It is written independently of the RTL and shares no code with it.
package deblock_ref_pkg;

  // alpha'(indexA) and beta'(indexB), indexes 0..51
  const int ALPHA_T[52] = '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,
                            4,4,5,6,7,8,9,10,12,13,15,17,20,22,25,28,32,36,40,45,
                            50,56,63,71,80,90,101,113,127,144,162,182,203,226,255,255};
  const int BETA_T[52]  = '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,
                            2,2,2,3,3,3,3,4,4,4,6,6,7,7,8,8,9,9,10,10,
                            11,11,12,12,13,13,14,14,15,15,16,16,17,17,18,18};
  // tC0 for bS = 1, 2, 3 from indexA 17 upwards (zero below)
  const int TC0_1[35] = '{0,0,0,0,0,0,1,1,1,1,1,1,1,1,1,1,2,2,2,2,3,3,3,4,4,4,5,6,6,7,8,9,10,11,13};
  const int TC0_2[35] = '{0,0,0,0,1,1,1,1,1,1,1,1,1,1,2,2,2,2,3,3,3,4,4,5,5,6,7,8,8,10,11,12,13,15,17};
  const int TC0_3[35] = '{1,1,1,1,1,1,1,1,1,1,2,2,2,2,3,3,3,4,4,4,5,6,6,7,8,9,10,11,13,14,16,18,20,23,25};

  function automatic int clampi(int v, int lo, int hi);
    if (v < lo) return lo;
    if (v > hi) return hi;
    return v;
  endfunction

  function automatic int absd(int a, int b);
    return (a > b) ? a - b : b - a;
  endfunction

  // Filter one line. s[0..7] = p3 p2 p1 p0 q0 q1 q2 q3, modified in place.
  // Returns 0 = untouched, 1 = normal filter, 2 = strong filter.
  function automatic int filter_line(ref int s[8], input int bs, input int qpp, input int qpq,
                                     input int offa, input int offb);
    int ia, ib, al, be, t0, tc, d, ap, aq, strong_ok;
    int P[4], Q[4];
    for (int i = 0; i < 4; i++) begin P[i] = s[3-i]; Q[i] = s[4+i]; end
    ia = clampi(((qpp + qpq + 1) / 2) + offa, 0, 51);
    ib = clampi(((qpp + qpq + 1) / 2) + offb, 0, 51);
    al = ALPHA_T[ia];
    be = BETA_T[ib];
    if (bs == 0) return 0;
    if (!(absd(P[0], Q[0]) < al && absd(P[1], P[0]) < be && absd(Q[1], Q[0]) < be)) return 0;
    ap = absd(P[2], P[0]);
    aq = absd(Q[2], Q[0]);
    if (bs < 4) begin
      t0 = (ia < 17) ? 0 : (bs == 1 ? TC0_1[ia-17] : (bs == 2 ? TC0_2[ia-17] : TC0_3[ia-17]));
      tc = t0 + (ap < be) + (aq < be);
      d  = clampi((4 * (Q[0] - P[0]) + (P[1] - Q[1]) + 4) >>> 3, -tc, tc);
      s[3] = clampi(P[0] + d, 0, 255);
      s[4] = clampi(Q[0] - d, 0, 255);
      if (ap < be) s[2] = P[1] + clampi((P[2] + ((P[0] + Q[0] + 1) >>> 1) - 2 * P[1]) >>> 1, -t0, t0);
      if (aq < be) s[5] = Q[1] + clampi((Q[2] + ((P[0] + Q[0] + 1) >>> 1) - 2 * Q[1]) >>> 1, -t0, t0);
      return 1;
    end
    strong_ok = absd(P[0], Q[0]) < (al / 4 + 2);
    if (ap < be && strong_ok) begin
      s[3] = (P[2] + 2 * P[1] + 2 * P[0] + 2 * Q[0] + Q[1] + 4) / 8;
      s[2] = (P[2] + P[1] + P[0] + Q[0] + 2) / 4;
      s[1] = (2 * P[3] + 3 * P[2] + P[1] + P[0] + Q[0] + 4) / 8;
    end else s[3] = (2 * P[1] + P[0] + Q[1] + 2) / 4;
    if (aq < be && strong_ok) begin
      s[4] = (P[1] + 2 * P[0] + 2 * Q[0] + 2 * Q[1] + Q[2] + 4) / 8;
      s[5] = (P[0] + Q[0] + Q[1] + Q[2] + 2) / 4;
      s[6] = (2 * Q[3] + 3 * Q[2] + Q[1] + Q[0] + P[0] + 4) / 8;
    end else s[4] = (2 * Q[1] + Q[0] + P[1] + 2) / 4;
    return 2;
  endfunction

  // Deblock a whole picture of mbw x mbh MBs in the standard order.
  // pic[y*16*mbw + x], bsv[(mb*32) + boundary], qp[mb].  Boundary numbering:
  // 0..15 vertical edge e=b/4, rows 4*(b%4).., 16..31 horizontal edge
  // e=(b-16)/4, columns 4*((b-16)%4)..
  // Returns the number of lines that were filtered.
  function automatic int deblock_picture(ref byte unsigned pic[], input int mbw, input int mbh,
                                         ref byte unsigned bsv[], ref byte unsigned qp[],
                                         input int offa, input int offb);
    int pw, s[8], n, mb, X, Y, qpp, b;
    pw = 16 * mbw;
    n  = 0;
    for (int r = 0; r < mbh; r++) begin
      for (int c = 0; c < mbw; c++) begin
        mb = r * mbw + c;
        for (int e = 0; e < 4; e++) begin
          X = 16 * c + 4 * e;
          if (X == 0) continue;
          qpp = (e == 0) ? qp[mb - 1] : qp[mb];
          for (int y = 16 * r; y < 16 * r + 16; y++) begin
            b = 4 * e + (y % 16) / 4;
            for (int k = 0; k < 8; k++) s[k] = pic[y * pw + X - 4 + k];
            if (filter_line(s, bsv[mb * 32 + b], qpp, qp[mb], offa, offb) != 0) n++;
            for (int k = 0; k < 8; k++) pic[y * pw + X - 4 + k] = byte'(s[k]);
          end
        end
        for (int e = 0; e < 4; e++) begin
          Y = 16 * r + 4 * e;
          if (Y == 0) continue;
          qpp = (e == 0) ? qp[mb - mbw] : qp[mb];
          for (int x = 16 * c; x < 16 * c + 16; x++) begin
            b = 16 + 4 * e + (x % 16) / 4;
            for (int k = 0; k < 8; k++) s[k] = pic[(Y - 4 + k) * pw + x];
            if (filter_line(s, bsv[mb * 32 + b], qpp, qp[mb], offa, offb) != 0) n++;
            for (int k = 0; k < 8; k++) pic[(Y - 4 + k) * pw + x] = byte'(s[k]);
          end
        end
      end
    end
    return n;
  endfunction

  // Picture content that exercises the filter: smooth ramps per 4x4 block
  // with a random step at block borders and a little noise.
  function automatic void make_picture(ref byte unsigned pic[], input int mbw, input int mbh);
    int pw, ph, base, v;
    int blk[];
    pw = 16 * mbw; ph = 16 * mbh;
    blk = new[(pw / 4) * (ph / 4)];
    foreach (blk[i]) blk[i] = 40 + int'($urandom_range(0, 170));
    for (int y = 0; y < ph; y++)
      for (int x = 0; x < pw; x++) begin
        base = blk[(y / 4) * (pw / 4) + x / 4];
        // neighbouring blocks differ by a small step most of the time
        if (((x / 4) + (y / 4)) % 3 != 0) base = blk[0] + ((x / 4) % 5) * 3 + ((y / 4) % 7) * 2;
        v = base + int'($urandom_range(0, 4)) - 2;
        pic[y * pw + x] = byte'(clampi(v, 0, 255));
      end
  endfunction

endpackage
