// slic_ref_pkg -- frame-at-a-time reference model of the FP-SLIC algorithm,
// for testbenches.
//
// It computes, from a whole frame held in arrays, what the pipelined
// hardware must output: initial centres at the middle pixel of each S x S
// square (the middle of the part inside the image for cut-short squares),
// then ITER assignment passes over the pixels in raster order.  Each pass
// gives every pixel the nearest valid centre among the nine squares around
// its own, with distance (d_rgb << F) + round(m * 2^F / S) * d_xy (Manhattan
// distances), ties to the first candidate in window raster order.  Between
// passes each centre becomes the integer average (truncating) of the
// pixels assigned to it; a centre with no pixels is invalid.  The result is
// the superpixel ID ceil(W/S) * row + col of every pixel.
//
// The model is written without reference to the hardware's banks, delays
// and sliding window, so it checks those mechanisms end to end.
package slic_ref_pkg;

  function automatic int gridn(int len, int s);
    return (len + s - 1) / s;
  endfunction

  function automatic int midoff(int len, int s, int idx);
    int last_len = len - (gridn(len, s) - 1) * s;
    return (idx == gridn(len, s) - 1) ? (last_len - 1) / 2 : (s - 1) / 2;
  endfunction

  function automatic int iabs(int v);
    return v < 0 ? -v : v;
  endfunction

  function automatic int ref_dist(int m, int s, int f,
                                  int pr, int pg, int pb, int px, int py,
                                  int cr, int cg, int cb, int cx, int cy);
    int wgt = (m * (1 << f) + s / 2) / s;
    return ((iabs(pr - cr) + iabs(pg - cg) + iabs(pb - cb)) << f)
           + wgt * (iabs(px - cx) + iabs(py - cy));
  endfunction

  // img_*: W*H samples in raster order.  Returns one ID per pixel.
  function automatic void slic_frame(int w, int h, int s, int m, int f, int iter,
                                     const ref int img_r[], const ref int img_g[],
                                     const ref int img_b[], ref int ids[]);
    int nc = gridn(w, s);
    int nr = gridn(h, s);
    int cr[], cg[], cb[], cx[], cy[], cv[];
    longint sr[], sg[], sb[], sx[], sy[], sn[];
    cr = new[nc * nr]; cg = new[nc * nr]; cb = new[nc * nr];
    cx = new[nc * nr]; cy = new[nc * nr]; cv = new[nc * nr];
    ids = new[w * h];
    for (int rr = 0; rr < nr; rr++)
      for (int cc = 0; cc < nc; cc++) begin
        int x = cc * s + midoff(w, s, cc);
        int y = rr * s + midoff(h, s, rr);
        int k = rr * nc + cc;
        cr[k] = img_r[y * w + x]; cg[k] = img_g[y * w + x]; cb[k] = img_b[y * w + x];
        cx[k] = x; cy[k] = y; cv[k] = 1;
      end
    for (int it = 1; it <= iter; it++) begin
      sr = new[nc * nr]; sg = new[nc * nr]; sb = new[nc * nr];
      sx = new[nc * nr]; sy = new[nc * nr]; sn = new[nc * nr];
      for (int y = 0; y < h; y++)
        for (int x = 0; x < w; x++) begin
          int p = y * w + x;
          int br = y / s, bc = x / s;
          int best_r = br, best_c = bc;
          longint best_d = 64'h7fff_ffff_ffff;
          for (int k = 0; k < 9; k++) begin
            int rr = br + k / 3 - 1;
            int cc = bc + k % 3 - 1;
            if (rr >= 0 && rr < nr && cc >= 0 && cc < nc && cv[rr * nc + cc] != 0) begin
              int q = rr * nc + cc;
              int d = ref_dist(m, s, f, img_r[p], img_g[p], img_b[p], x, y,
                               cr[q], cg[q], cb[q], cx[q], cy[q]);
              if (d < best_d) begin
                best_d = d; best_r = rr; best_c = cc;
              end
            end
          end
          ids[p] = best_r * nc + best_c;
          sr[ids[p]] += img_r[p]; sg[ids[p]] += img_g[p]; sb[ids[p]] += img_b[p];
          sx[ids[p]] += x; sy[ids[p]] += y; sn[ids[p]] += 1;
        end
      for (int k = 0; k < nc * nr; k++) begin
        cv[k] = (sn[k] != 0);
        if (sn[k] != 0) begin
          cr[k] = int'(sr[k] / sn[k]); cg[k] = int'(sg[k] / sn[k]);
          cb[k] = int'(sb[k] / sn[k]); cx[k] = int'(sx[k] / sn[k]);
          cy[k] = int'(sy[k] / sn[k]);
        end
      end
    end
  endfunction

  // Test image: a few smooth colour regions with curved borders plus noise,
  // so that superpixel borders move away from the square grid.
  function automatic void make_image(int w, int h, int seed, ref int r[], ref int g[], ref int b[]);
    int unsigned st = seed;
    r = new[w * h]; g = new[w * h]; b = new[w * h];
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        int p = y * w + x;
        int reg_id = ((x * 7 + y * 3 + ((x * y) % 23) + seed) / 19) % 4;
        int n;
        st = st * 1103515245 + 12345;
        n = int'((st >> 16) % 24) - 12;
        case (reg_id)
          0: begin r[p] = 200; g[p] = 40;  b[p] = 40;  end
          1: begin r[p] = 30;  g[p] = 180; b[p] = 60;  end
          2: begin r[p] = 50;  g[p] = 60;  b[p] = 210; end
          default: begin r[p] = 220; g[p] = 220; b[p] = 90; end
        endcase
        r[p] = (r[p] + n < 0) ? 0 : (r[p] + n > 255 ? 255 : r[p] + n);
        g[p] = (g[p] - n < 0) ? 0 : (g[p] - n > 255 ? 255 : g[p] - n);
        b[p] = (b[p] + n / 2 < 0) ? 0 : (b[p] + n / 2 > 255 ? 255 : b[p] + n / 2);
      end
  endfunction

endpackage
