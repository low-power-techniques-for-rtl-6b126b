// h264_ref_pkg: reference models used by the testbenches, written
// directly from the H.264 definitions on whole frames (not from the RTL
// structure): quarter-pel luma interpolation, 4x4 intra prediction,
// inverse transform, and the luma deblocking edge filter. Frames live in
// the package array fb (frame f, pixel x,y at f*fw*fh + y*fw + x).
package h264_ref_pkg;

  int fw = 16, fh = 16;
  byte unsigned fb [];

  function automatic void set_size(int w, int h, int nf);
    fw = w; fh = h;
    fb = new[nf * w * h];
  endfunction

  function automatic int clip255(int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction
  function automatic int clampi(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  function automatic int px(int f, int x, int y);
    return int'(fb[f*fw*fh + clampi(y, 0, fh-1)*fw + clampi(x, 0, fw-1)]);
  endfunction
  function automatic void setpx(int f, int x, int y, int v);
    fb[f*fw*fh + y*fw + x] = byte'(v);
  endfunction

  function automatic int tap6(int a, int b, int c, int d, int e, int f);
    return a - 5*b + 20*c + 20*d - 5*e + f;
  endfunction

  // half-pel samples at integer position (x,y) of frame f
  function automatic int b1(int f, int x, int y);  // between x and x+1
    return tap6(px(f,x-2,y), px(f,x-1,y), px(f,x,y), px(f,x+1,y), px(f,x+2,y), px(f,x+3,y));
  endfunction
  function automatic int h1(int f, int x, int y);  // between y and y+1
    return tap6(px(f,x,y-2), px(f,x,y-1), px(f,x,y), px(f,x,y+1), px(f,x,y+2), px(f,x,y+3));
  endfunction
  function automatic int bb(int f, int x, int y); return clip255((b1(f,x,y) + 16) >>> 5); endfunction
  function automatic int hh(int f, int x, int y); return clip255((h1(f,x,y) + 16) >>> 5); endfunction
  function automatic int jj(int f, int x, int y);
    int j1 = tap6(h1(f,x-2,y), h1(f,x-1,y), h1(f,x,y), h1(f,x+1,y), h1(f,x+2,y), h1(f,x+3,y));
    return clip255((j1 + 512) >>> 10);
  endfunction
  function automatic int av(int a, int b); return (a + b + 1) >>> 1; endfunction

  // luma sample at integer (x,y) plus quarter fraction (xf,yf)
  function automatic int luma_q(int f, int x, int y, int xf, int yf);
    int G = px(f,x,y);
    case (yf*4 + xf)
      0:  return G;
      1:  return av(G, bb(f,x,y));
      2:  return bb(f,x,y);
      3:  return av(bb(f,x,y), px(f,x+1,y));
      4:  return av(G, hh(f,x,y));
      5:  return av(bb(f,x,y), hh(f,x,y));
      6:  return av(bb(f,x,y), jj(f,x,y));
      7:  return av(bb(f,x,y), hh(f,x+1,y));
      8:  return hh(f,x,y);
      9:  return av(hh(f,x,y), jj(f,x,y));
      10: return jj(f,x,y);
      11: return av(jj(f,x,y), hh(f,x+1,y));
      12: return av(px(f,x,y+1), hh(f,x,y));
      13: return av(hh(f,x,y), bb(f,x,y+1));
      14: return av(jj(f,x,y), bb(f,x,y+1));
      default: return av(hh(f,x+1,y), bb(f,x,y+1));
    endcase
  endfunction

  // inverse transform of one block, raster order
  function automatic void ref_it(input int lv [16], input int qp, output int r [16]);
    int vt [6][3] = '{'{10,16,13},'{11,18,14},'{13,20,16},'{14,23,18},'{16,25,20},'{18,29,23}};
    int d [4][4], g [4][4], t [4][4];
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        int cls = (i % 2 == 0 && j % 2 == 0) ? 0 : (i % 2 == 1 && j % 2 == 1) ? 1 : 2;
        d[i][j] = lv[4*i+j] * vt[qp % 6][cls] * (1 << (qp / 6));
      end
    for (int i = 0; i < 4; i++) begin
      t[i][0] = d[i][0] + d[i][2] + d[i][1] + (d[i][3] >>> 1);
      t[i][1] = d[i][0] - d[i][2] + (d[i][1] >>> 1) - d[i][3];
      t[i][2] = d[i][0] - d[i][2] - (d[i][1] >>> 1) + d[i][3];
      t[i][3] = d[i][0] + d[i][2] - d[i][1] - (d[i][3] >>> 1);
    end
    for (int j = 0; j < 4; j++) begin
      g[0][j] = t[0][j] + t[2][j] + t[1][j] + (t[3][j] >>> 1);
      g[1][j] = t[0][j] - t[2][j] + (t[1][j] >>> 1) - t[3][j];
      g[2][j] = t[0][j] - t[2][j] - (t[1][j] >>> 1) + t[3][j];
      g[3][j] = t[0][j] + t[2][j] - t[1][j] - (t[3][j] >>> 1);
    end
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) r[4*i+j] = (g[i][j] + 32) >>> 6;
  endfunction

  // 4x4 intra prediction from frame f at block origin (x0,y0)
  function automatic void ref_intra(input int f, input int x0, input int y0, input int mode,
                                    input bit ta, input bit la, input bit tra, output int p [16]);
    int T [-1:7];
    int L [-1:3];
    int s = 0;
    for (int i = -1; i < 8; i++) T[i] = (i >= 4 && !tra) ? px(f, x0+3, y0-1) : px(f, x0+i, y0-1);
    for (int j = -1; j < 4; j++) L[j] = px(f, x0-1, y0+j);
    for (int y = 0; y < 4; y++)
      for (int x = 0; x < 4; x++) begin
        int v, z;
        case (mode)
          0: v = T[x];
          1: v = L[y];
          2: begin
            int st = T[0]+T[1]+T[2]+T[3], sl = L[0]+L[1]+L[2]+L[3];
            v = (ta && la) ? (st+sl+4)>>3 : ta ? (st+2)>>2 : la ? (sl+2)>>2 : 128;
          end
          3: v = (x==3 && y==3) ? (T[6]+3*T[7]+2)>>2 : (T[x+y]+2*T[x+y+1]+T[x+y+2]+2)>>2;
          4: v = (x>y) ? (T[x-y-2]+2*T[x-y-1]+T[x-y]+2)>>2 :
                 (x<y) ? (L[y-x-2]+2*L[y-x-1]+L[y-x]+2)>>2 : (T[0]+2*T[-1]+L[0]+2)>>2;
          5: begin
            z = 2*x - y;
            if (z >= 0 && z%2 == 0) v = (T[x-(y>>1)-1]+T[x-(y>>1)]+1)>>1;
            else if (z > 0) v = (T[x-(y>>1)-2]+2*T[x-(y>>1)-1]+T[x-(y>>1)]+2)>>2;
            else if (z == -1) v = (L[0]+2*L[-1]+T[0]+2)>>2;
            else v = (L[y-1]+2*L[y-2]+L[y-3]+2)>>2;
          end
          6: begin
            z = 2*y - x;
            if (z >= 0 && z%2 == 0) v = (L[y-(x>>1)-1]+L[y-(x>>1)]+1)>>1;
            else if (z > 0) v = (L[y-(x>>1)-2]+2*L[y-(x>>1)-1]+L[y-(x>>1)]+2)>>2;
            else if (z == -1) v = (L[0]+2*L[-1]+T[0]+2)>>2;
            else v = (T[x-1]+2*T[x-2]+T[x-3]+2)>>2;
          end
          7: v = (y%2 == 0) ? (T[x+(y>>1)]+T[x+(y>>1)+1]+1)>>1
                            : (T[x+(y>>1)]+2*T[x+(y>>1)+1]+T[x+(y>>1)+2]+2)>>2;
          default: begin
            z = x + 2*y;
            if (z > 5) v = L[3];
            else if (z == 5) v = (L[2]+3*L[3]+2)>>2;
            else if (z%2 == 0) v = (L[y+(x>>1)]+L[y+(x>>1)+1]+1)>>1;
            else v = (L[y+(x>>1)]+2*L[y+(x>>1)+1]+L[y+(x>>1)+2]+2)>>2;
          end
        endcase
        p[4*y+x] = v;
      end
  endfunction

  // deblocking thresholds (H.264 Tables 8-16, 8-17), index = QP
  function automatic int alpha_of(int q);
    int t [52] = '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,4,4,5,6,7,8,9,10,12,13,15,17,20,22,25,28,
                   32,36,40,45,50,56,63,71,80,90,101,113,127,144,162,182,203,226,255,255};
    return t[q];
  endfunction
  function automatic int beta_of(int q);
    int t [52] = '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,2,2,2,3,3,3,3,4,4,4,6,6,7,7,8,8,
                   9,9,10,10,11,11,12,12,13,13,14,14,15,15,16,16,17,17,18,18};
    return t[q];
  endfunction
  function automatic int tc0_of(int q, int bs);
    int t [3][52] = '{
      '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,1,1,1,1,1,1,1,1,1,1,2,2,2,2,3,3,3,4,4,4,5,6,6,7,8,9,10,11,13},
      '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,1,1,1,1,1,1,1,1,1,2,2,2,2,3,3,3,4,4,5,5,6,7,8,8,10,11,12,13,15,17,17},
      '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,1,1,1,1,1,1,1,1,1,2,2,2,2,3,3,3,4,4,4,5,6,6,7,8,9,10,11,13,14,16,18,20,23,25,25}};
    return t[bs-1][q];
  endfunction

  // filter one line of 8 samples p3 p2 p1 p0 q0 q1 q2 q3 in place
  function automatic void filt_line(inout int s [8], input int bs, input int qp);
    int al = alpha_of(qp), be = beta_of(qp);
    int p0 = s[3], p1 = s[2], p2 = s[1], p3 = s[0], q0 = s[4], q1 = s[5], q2 = s[6], q3 = s[7];
    int ap = (p2 > p0) ? p2 - p0 : p0 - p2;
    int aq = (q2 > q0) ? q2 - q0 : q0 - q2;
    int d0 = (p0 > q0) ? p0 - q0 : q0 - p0;
    int d1 = (p1 > p0) ? p1 - p0 : p0 - p1;
    int d2 = (q1 > q0) ? q1 - q0 : q0 - q1;
    if (bs == 0 || !(d0 < al && d1 < be && d2 < be)) return;
    if (bs < 4) begin
      int c0 = tc0_of(qp, bs);
      int tc = c0 + (ap < be) + (aq < be);
      int dl = clampi((((q0 - p0) << 2) + (p1 - q1) + 4) >>> 3, -tc, tc);
      s[3] = clip255(p0 + dl);
      s[4] = clip255(q0 - dl);
      if (ap < be) s[2] = p1 + clampi((p2 + ((p0 + q0 + 1) >>> 1) - (p1 << 1)) >>> 1, -c0, c0);
      if (aq < be) s[5] = q1 + clampi((q2 + ((p0 + q0 + 1) >>> 1) - (q1 << 1)) >>> 1, -c0, c0);
    end else begin
      bit sm = d0 < ((al >>> 2) + 2);
      if (ap < be && sm) begin
        s[3] = (p2 + 2*p1 + 2*p0 + 2*q0 + q1 + 4) >>> 3;
        s[2] = (p2 + p1 + p0 + q0 + 2) >>> 2;
        s[1] = (2*p3 + 3*p2 + p1 + p0 + q0 + 4) >>> 3;
      end else s[3] = (2*p1 + p0 + q1 + 2) >>> 2;
      if (aq < be && sm) begin
        s[4] = (p1 + 2*p0 + 2*q0 + 2*q1 + q2 + 4) >>> 3;
        s[5] = (p0 + q0 + q1 + q2 + 2) >>> 2;
        s[6] = (2*q3 + 3*q2 + q1 + q0 + p0 + 4) >>> 3;
      end else s[4] = (2*q1 + q0 + p1 + 2) >>> 2;
    end
  endfunction

  // deblock the whole luma frame f in place, MB by MB in raster order.
  // bsl/bst: boundary strength of the left/top edge of each 4x4 block,
  // qpm: QP of each macroblock.
  function automatic void ref_deblock(input int f, ref int bsl [], ref int bst [], ref int qpm []);
    int mbw = fw / 16, mbh = fh / 16, bw = fw / 4;
    for (int my = 0; my < mbh; my++)
      for (int mx = 0; mx < mbw; mx++) begin
        for (int e = 0; e < 4; e++)               // vertical edges
          for (int yy = 0; yy < 16; yy++) begin
            int x = mx*16 + 4*e, y = my*16 + yy, s [8], bs, q;
            if (x == 0) continue;
            bs = bsl[(y/4)*bw + x/4];
            q  = (e == 0) ? (qpm[my*mbw + mx] + qpm[my*mbw + mx - 1] + 1) >> 1 : qpm[my*mbw + mx];
            for (int k = 0; k < 8; k++) s[k] = px(f, x - 4 + k, y);
            filt_line(s, bs, q);
            for (int k = 0; k < 8; k++) setpx(f, x - 4 + k, y, s[k]);
          end
        for (int e = 0; e < 4; e++)               // horizontal edges
          for (int xx = 0; xx < 16; xx++) begin
            int x = mx*16 + xx, y = my*16 + 4*e, s [8], bs, q;
            if (y == 0) continue;
            bs = bst[(y/4)*bw + x/4];
            q  = (e == 0) ? (qpm[my*mbw + mx] + qpm[(my-1)*mbw + mx] + 1) >> 1 : qpm[my*mbw + mx];
            for (int k = 0; k < 8; k++) s[k] = px(f, x, y - 4 + k);
            filt_line(s, bs, q);
            for (int k = 0; k < 8; k++) setpx(f, x, y - 4 + k, s[k]);
          end
      end
  endfunction

endpackage
