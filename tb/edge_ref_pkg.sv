// edge_ref_pkg: reference model of the edge detector for testbenches.
//
// Computes, with plain integer arithmetic and coordinate clamping, what the
// camera channel's edge detector must write for one raw Bayer frame: the
// luminance of each 2x2 cell, the 5x5 Gaussian (weights summing to 273,
// normalised by 7695/2^19 and saturated to 18 bits), the four directional
// gradients (top 9 of 18 bits), thinning and threshold, and finally the
// words of the bitmap with each line padded to a multiple of 8 words.
package edge_ref_pkg;
  localparam int WT [5][5] = '{'{1,4,7,4,1}, '{4,16,26,16,4}, '{7,26,41,26,7},
                               '{4,16,26,16,4}, '{1,4,7,4,1}};

  function automatic int cl(int v, int hi);
    return v < 0 ? 0 : (v > hi ? hi : v);
  endfunction

  function automatic int line_grad(int p[5]);
    int pos, mn;
    pos = 0;
    for (int i = 1; i < 5; i++) if (p[i] > p[pos]) pos = i;
    mn = 1 << 30;
    for (int i = 0; i < 5; i++)
      if ((pos < 2 && i >= 2) || (pos > 2 && i <= 2) || (pos == 2 && i != 2))
        if (p[i] < mn) mn = p[i];
    return (p[pos] - mn) >> 9;
  endfunction

  // raw: RW*RH pixels in raster order. Returns the expected words (one per
  // output word, raster order) and the number of edge pixels.
  function automatic void edge_words(input int raw[], input int RW, input int RH,
                                     input int thr, output logic [31:0] words[$],
                                     output int edges);
    int GW, GH, lw;
    int gray[], blr[], grd[];
    bit edg[];
    GW = RW / 2;
    GH = RH / 2;
    lw = (((GW + 31) / 32 + 7) / 8) * 8;
    gray = new[GW * GH];
    blr  = new[GW * GH];
    grd  = new[GW * GH * 4];
    edg  = new[GW * GH];
    edges = 0;
    words.delete();
    for (int y = 0; y < GH; y++)
      for (int x = 0; x < GW; x++)
        gray[y*GW+x] = (307 * raw[(2*y+1)*RW + 2*x+1] + 302 * raw[(2*y)*RW + 2*x+1]
                      + 302 * raw[(2*y+1)*RW + 2*x] + 113 * raw[(2*y)*RW + 2*x]) >> 4;
    for (int y = 0; y < GH; y++)
      for (int x = 0; x < GW; x++) begin
        longint s;
        s = 0;
        for (int k = 0; k < 5; k++)
          for (int j = 0; j < 5; j++)
            s += WT[k][j] * gray[cl(y-2+k, GH-1)*GW + cl(x-2+j, GW-1)];
        s = (s * 7695) >> 19;
        blr[y*GW+x] = (s > 262143) ? 262143 : int'(s);
      end
    for (int y = 0; y < GH; y++)
      for (int x = 0; x < GW; x++) begin
        int lh[5], lv[5], ld[5], la[5];
        for (int i = 0; i < 5; i++) begin
          lh[i] = blr[y*GW + cl(x-2+i, GW-1)];
          lv[i] = blr[cl(y-2+i, GH-1)*GW + x];
          ld[i] = blr[cl(y-2+i, GH-1)*GW + cl(x-2+i, GW-1)];
          la[i] = blr[cl(y-2+i, GH-1)*GW + cl(x+2-i, GW-1)];
        end
        grd[(y*GW+x)*4 + 0] = line_grad(lh);
        grd[(y*GW+x)*4 + 1] = line_grad(lv);
        grd[(y*GW+x)*4 + 2] = line_grad(ld);
        grd[(y*GW+x)*4 + 3] = line_grad(la);
      end
    for (int y = 0; y < GH; y++)
      for (int x = 0; x < GW; x++) begin
        edg[y*GW+x] = 0;
        for (int d = 0; d < 4; d++) begin
          int g[5], s;
          bit mx;
          for (int i = 0; i < 5; i++) begin
            int yy, xx;
            case (d)
              0: begin yy = y; xx = x - 2 + i; end
              1: begin yy = y - 2 + i; xx = x; end
              2: begin yy = y - 2 + i; xx = x - 2 + i; end
              default: begin yy = y - 2 + i; xx = x + 2 - i; end
            endcase
            g[i] = grd[(cl(yy, GH-1)*GW + cl(xx, GW-1))*4 + d];
          end
          mx = 1;
          s = 0;
          for (int i = 0; i < 5; i++) begin
            if (g[i] > g[2]) mx = 0;
            s += g[i];
          end
          if (mx && s > thr) edg[y*GW+x] = 1;
        end
        if (edg[y*GW+x]) edges++;
      end
    for (int y = 0; y < GH; y++)
      for (int w = 0; w < lw; w++) begin
        logic [31:0] d;
        d = '0;
        for (int i = 0; i < 32; i++) if (w * 32 + i < GW) d[i] = edg[y*GW + w*32 + i];
        words.push_back(d);
      end
  endfunction
endpackage
