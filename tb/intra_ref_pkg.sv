// intra_ref_pkg: behavioural reference model of H.264/AVC intra prediction
// for the testbenches, written directly from the equations of the standard
// (Intra4x4, Intra8x8 with reference filtering, Intra16x16, chroma 4:2:0),
// one sample at a time and independent of the RTL structure.
//
// Picture content is generated, not stored: orig() is a hash of the
// coordinates mixed with gradients, and the reconstruction for QP index q is
// rec() = orig + 37*q (mod 256). The final reconstruction of every
// macroblock is the QP 0 one. Neighbours inside the current macroblock are
// taken from the reconstruction of the QP being predicted, neighbours
// outside from the final reconstruction, as in the predictor.
package intra_ref_pkg;

  typedef logic [15:0][7:0] blk16_t;
  typedef int tarr_t [-1:15];   // p[x,-1], x = -1..15
  typedef int larr_t [-1:7];    // p[-1,y], y = -1..7

  int pic_w_mb = 4;    // picture width in macroblocks
  int flat_mb  = -1;   // a macroblock index whose content is saturated (clip tests)

  function automatic int orig(input int c, input int x, input int y);
    int unsigned h;
    int mbi;
    mbi = (c == 0) ? (y / 16) * pic_w_mb + x / 16 : (y / 8) * pic_w_mb + x / 8;
    if (mbi == flat_mb) return ((x + y) % 2 == 0) ? 255 : 250;
    h = (32'(x) * 32'd2654435761) ^ (32'(y) * 32'd40503) ^ (32'(c) * 32'd977);
    h = h ^ (h >> 15);
    h = h * 32'd2246822519;
    h = h ^ (h >> 13);
    case ((x / 16 + y / 16 + c) % 3)
      0:       return int'(h % 256);
      1:       return (x * 9 + y * 3 + int'(h % 16)) % 256;
      default: return (255 - x * 2 - y * 7 - int'(h % 8)) & 255;
    endcase
  endfunction

  function automatic int rec(input int q, input int c, input int x, input int y);
    return (orig(c, x, y) + 37 * q) % 256;
  endfunction

  // sample of component c at (X,Y) relative to macroblock (mx,my)
  function automatic int nb(input int c, input int mx, input int my, input int q,
                            input int X, input int Y);
    int s;
    s = (c == 0) ? 16 : 8;
    if (X >= 0 && X < s && Y >= 0 && Y < s) return rec(q, c, mx * s + X, my * s + Y);
    return rec(0, c, mx * s + X, my * s + Y);
  endfunction

  function automatic int f2(input int a, input int b);
    return (a + b + 1) >> 1;
  endfunction
  function automatic int f3(input int a, input int b, input int c);
    return (a + 2 * b + c + 2) >> 2;
  endfunction

  function automatic int zzi(input int bx, input int by);
    return (by / 2) * 8 + (bx / 2) * 4 + (by % 2) * 2 + (bx % 2);
  endfunction

  // Intra4x4 / Intra8x8 prediction of the 4x4 quarter (qx,qy) (in 4x4 units
  // inside the MB) of block at 4x4 position (bx,by), size n (4 or 8)
  function automatic blk16_t pred_nxn(input int n, input int mx, input int my, input int q,
                                      input bit avl, input bit avt, input bit avtl, input bit avtr,
                                      input int bx, input int by, input int mode,
                                      input int qx, input int qy);
    tarr_t T, Tf;   // T[-1] is the corner
    larr_t L, Lf;
    bit la, ta, ca, ura;
    int x0, y0;
    x0 = bx * 4; y0 = by * 4;
    la = (bx > 0) || avl;
    ta = (by > 0) || avt;
    if (bx > 0 && by > 0) ca = 1;
    else if (bx == 0 && by > 0) ca = avl;
    else if (bx > 0) ca = avt;
    else ca = avtl;
    if (n == 4) begin
      if (by == 0) ura = (bx < 3) ? avt : avtr;
      else ura = (bx < 3) && (zzi(bx + 1, by - 1) < zzi(bx, by));
    end else begin
      if (by == 0) ura = (bx == 0) ? avt : avtr;
      else ura = (bx == 0);
    end
    for (int i = -1; i < 2 * n; i++) T[i] = nb(0, mx, my, q, x0 + i, y0 - 1);
    for (int i = -1; i < n; i++)     L[i] = nb(0, mx, my, q, x0 - 1, y0 + i);
    L[-1] = T[-1];
    if (!ura) for (int i = n; i < 2 * n; i++) T[i] = T[n - 1];
    for (int i = -1; i < 16; i++) Tf[i] = (i < 2 * n) ? T[i] : 0;
    for (int i = -1; i < 8; i++)  Lf[i] = (i < n) ? L[i] : 0;
    if (n == 8) filter8(T, L, ta, la, ca, Tf, Lf);
    return pred_edges(n, Tf, Lf, ta, la, mode, qx - bx, qy - by);
  endfunction

  // Intra8x8 reference sample filtering
  function automatic void filter8(input tarr_t T, input larr_t L, input bit ta, input bit la,
                                  input bit ca, inout tarr_t Tf, inout larr_t Lf);
      // reference sample filtering of Intra8x8
      if (ta) begin
        Tf[0] = ca ? f3(T[-1], T[0], T[1]) : (3 * T[0] + T[1] + 2) >> 2;
        for (int i = 1; i < 15; i++) Tf[i] = f3(T[i - 1], T[i], T[i + 1]);
        Tf[15] = (T[14] + 3 * T[15] + 2) >> 2;
      end
      if (ca) begin
        if (!ta && la)      Tf[-1] = (3 * T[-1] + L[0] + 2) >> 2;
        else if (ta && !la) Tf[-1] = (3 * T[-1] + T[0] + 2) >> 2;
        else                Tf[-1] = f3(T[0], T[-1], L[0]);
      end
      if (la) begin
        Lf[0] = ca ? f3(T[-1], L[0], L[1]) : (3 * L[0] + L[1] + 2) >> 2;
        for (int i = 1; i < 7; i++) Lf[i] = f3(L[i - 1], L[i], L[i + 1]);
        Lf[7] = (L[6] + 3 * L[7] + 2) >> 2;
      end
      Lf[-1] = Tf[-1];
  endfunction

  // prediction of quarter (qx,qy) of an NxN block from (filtered) neighbours
  function automatic blk16_t pred_edges(input int n, input tarr_t Tf, input larr_t Lf,
                                        input bit ta, input bit la, input int mode,
                                        input int qx, input int qy);
    blk16_t r;
    int v;
    for (int yy = 0; yy < 4; yy++) begin
      for (int xx = 0; xx < 4; xx++) begin
        int x, y, z, st, sl;
        x = qx * 4 + xx;
        y = qy * 4 + yy;
        v = 0;
        case (mode)
          0: v = Tf[x];
          1: v = Lf[y];
          2: begin
            st = 0; sl = 0;
            for (int i = 0; i < n; i++) begin st += Tf[i]; sl += Lf[i]; end
            if (ta && la) v = (st + sl + n) >> ((n == 4) ? 3 : 4);
            else if (la)  v = (sl + n / 2) >> ((n == 4) ? 2 : 3);
            else if (ta)  v = (st + n / 2) >> ((n == 4) ? 2 : 3);
            else          v = 128;
          end
          3: begin
            if (x == n - 1 && y == n - 1) v = (Tf[2 * n - 2] + 3 * Tf[2 * n - 1] + 2) >> 2;
            else v = f3(Tf[x + y], Tf[x + y + 1], Tf[x + y + 2]);
          end
          4: begin
            if (x > y)      v = f3(Tf[x - y - 2], Tf[x - y - 1], Tf[x - y]);
            else if (x < y) v = f3(Lf[y - x - 2], Lf[y - x - 1], Lf[y - x]);
            else            v = f3(Tf[0], Tf[-1], Lf[0]);
          end
          5: begin
            z = 2 * x - y;
            if (z >= 0 && z % 2 == 0)  v = f2(Tf[x - (y >> 1) - 1], Tf[x - (y >> 1)]);
            else if (z >= 0)           v = f3(Tf[x - (y >> 1) - 2], Tf[x - (y >> 1) - 1], Tf[x - (y >> 1)]);
            else if (z == -1)          v = f3(Lf[0], Lf[-1], Tf[0]);
            else if (n == 4)           v = f3(Lf[y - 1], Lf[y - 2], Lf[y - 3]);
            else                       v = f3(Lf[y - 2 * x - 1], Lf[y - 2 * x - 2], Lf[y - 2 * x - 3]);
          end
          6: begin
            z = 2 * y - x;
            if (z >= 0 && z % 2 == 0)  v = f2(Lf[y - (x >> 1) - 1], Lf[y - (x >> 1)]);
            else if (z >= 0)           v = f3(Lf[y - (x >> 1) - 2], Lf[y - (x >> 1) - 1], Lf[y - (x >> 1)]);
            else if (z == -1)          v = f3(Lf[0], Lf[-1], Tf[0]);
            else if (n == 4)           v = f3(Tf[x - 1], Tf[x - 2], Tf[x - 3]);
            else                       v = f3(Tf[x - 2 * y - 1], Tf[x - 2 * y - 2], Tf[x - 2 * y - 3]);
          end
          7: begin
            if (y % 2 == 0) v = f2(Tf[x + (y >> 1)], Tf[x + (y >> 1) + 1]);
            else            v = f3(Tf[x + (y >> 1)], Tf[x + (y >> 1) + 1], Tf[x + (y >> 1) + 2]);
          end
          default: begin
            z = x + 2 * y;
            if (z > 2 * n - 3)       v = Lf[n - 1];
            else if (z == 2 * n - 3) v = (Lf[n - 2] + 3 * Lf[n - 1] + 2) >> 2;
            else if (z % 2 == 0)     v = f2(Lf[y + (x >> 1)], Lf[y + (x >> 1) + 1]);
            else                     v = f3(Lf[y + (x >> 1)], Lf[y + (x >> 1) + 1], Lf[y + (x >> 1) + 2]);
          end
        endcase
        r[yy * 4 + xx] = 8'(v);
      end
    end
    return r;
  endfunction

  // 16x16 luma (c=0) or 8x8 chroma (c=1,2) prediction of 4x4 block (bx,by);
  // mode 0 V, 1 H, 2 DC, 9 plane
  function automatic blk16_t pred_mb(input int c, input int mx, input int my,
                                     input bit avl, input bit avt,
                                     input int bx, input int by, input int mode);
    int s, v, hh, vv, a, b, cc, st, sl, k, ctr;
    bit ut, ul;
    blk16_t r;
    s = (c == 0) ? 16 : 8;
    k = s / 2;
    hh = 0; vv = 0;
    for (int i = 0; i < k; i++) begin
      hh += (i + 1) * (nb(c, mx, my, 0, k + i, -1) - nb(c, mx, my, 0, k - 2 - i, -1));
      vv += (i + 1) * (nb(c, mx, my, 0, -1, k + i) - nb(c, mx, my, 0, -1, k - 2 - i));
    end
    a = 16 * (nb(c, mx, my, 0, -1, s - 1) + nb(c, mx, my, 0, s - 1, -1));
    if (c == 0) begin b = (5 * hh + 32) >>> 6; cc = (5 * vv + 32) >>> 6; ctr = 7; end
    else        begin b = (34 * hh + 32) >>> 6; cc = (34 * vv + 32) >>> 6; ctr = 3; end
    // DC sums
    st = 0; sl = 0;
    if (c == 0) begin
      for (int i = 0; i < 16; i++) begin
        st += nb(c, mx, my, 0, i, -1);
        sl += nb(c, mx, my, 0, -1, i);
      end
    end else begin
      for (int i = 0; i < 4; i++) begin
        st += nb(c, mx, my, 0, bx * 4 + i, -1);
        sl += nb(c, mx, my, 0, -1, by * 4 + i);
      end
    end
    if (c != 0) begin
      if ((bx == 0 && by == 0) || (bx > 0 && by > 0)) begin ut = avt; ul = avl; end
      else if (bx > 0) begin ut = avt; ul = !avt && avl; end
      else begin ul = avl; ut = !avl && avt; end
    end else begin
      ut = avt; ul = avl;
    end
    for (int yy = 0; yy < 4; yy++) begin
      for (int xx = 0; xx < 4; xx++) begin
        int x, y;
        x = bx * 4 + xx; y = by * 4 + yy;
        case (mode)
          0: v = nb(c, mx, my, 0, x, -1);
          1: v = nb(c, mx, my, 0, -1, y);
          2: begin
            if (c == 0) begin
              if (ut && ul) v = (st + sl + 16) >> 5;
              else if (ul)  v = (sl + 8) >> 4;
              else if (ut)  v = (st + 8) >> 4;
              else          v = 128;
            end else begin
              if (ut && ul) v = (st + sl + 4) >> 3;
              else if (ul)  v = (sl + 2) >> 2;
              else if (ut)  v = (st + 2) >> 2;
              else          v = 128;
            end
          end
          default: begin
            v = (a + b * (x - ctr) + cc * (y - ctr) + 16) >>> 5;
            if (v < 0) v = 0;
            if (v > 255) v = 255;
          end
        endcase
        r[yy * 4 + xx] = 8'(v);
      end
    end
    return r;
  endfunction

endpackage
