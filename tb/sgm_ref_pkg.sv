// sgm_ref_pkg: reference model of census-based 4-path SGM for testbenches.
//
// Written directly from the algorithm, independently of the RTL's data
// layout: census vectors over a zero-padded linear raster, Hamming cost
// against the right pixel d positions to the left, path recursion
//   L(p,d) = C + min(L(p-r,d), L(p-r,d+-1)+P1, min L(p-r,.)+P2) - min L(p-r,.)
// with neighbours outside the image ignored, the four paths summed, bounded to
// 2**SUM_W-1, and the first minimum taken as the disparity.
package sgm_ref_pkg;

  function automatic int px(const ref byte unsigned p[], input int k);
    return (k < 0 || k >= p.size()) ? 0 : int'(p[k]);
  endfunction

  typedef logic [255:0] cvec_t;   // census vector, windows up to 15x15

  function automatic cvec_t census(const ref byte unsigned p[], input int W, input int WIN,
                                   input int m);
    cvec_t v = '0;
    int rad = WIN / 2;
    for (int i = 0; i < WIN; i++)
      for (int j = 0; j < WIN; j++)
        v[i*WIN+j] = px(p, m + (i - rad) * W + (j - rad)) > px(p, m);
    return v;
  endfunction

  // disp[y*W+x] = disparity of pixel (x,y); clamp[...] = 1 if the bound took effect
  function automatic void sgm(input int W, input int H, input int WIN, input int D,
                              input int P1, input int P2, input int SUM_W,
                              const ref byte unsigned l[], const ref byte unsigned r[],
                              ref int disp[], ref int clamp[]);
    int prev[], cur[], c[];
    cvec_t cl[], cr[];
    cl = new[W * H];
    cr = new[W * H];
    for (int m = 0; m < W * H; m++) begin
      cl[m] = census(l, W, WIN, m);
      cr[m] = census(r, W, WIN, m);
    end
    prev = new[W * 4 * D];
    cur  = new[W * 4 * D];
    c    = new[D];
    disp  = new[W * H];
    clamp = new[W * H];
    for (int y = 0; y < H; y++) begin
      for (int x = 0; x < W; x++) begin
        int m = y * W + x, best = 1 << 30, bestd = 0;
        for (int d = 0; d < D; d++) c[d] = $countones(cl[m] ^ ((m - d < 0) ? cvec_t'(0) : cr[m - d]));
        for (int p = 0; p < 4; p++) begin
          int nx = (p == 0 || p == 3) ? x - 1 : (p == 1) ? x : x + 1;
          bit ok = (nx >= 0) && (nx < W) && (p == 3 || y > 0);
          int mn = 1 << 30;
          if (ok)
            for (int i = 0; i < D; i++) begin
              int v = (p == 3) ? cur[(nx*4+p)*D+i] : prev[(nx*4+p)*D+i];
              if (v < mn) mn = v;
            end
          for (int d = 0; d < D; d++) begin
            if (!ok) cur[(x*4+p)*D+d] = c[d];
            else begin
              int b, v;
              b = (p == 3) ? cur[(nx*4+p)*D+d] : prev[(nx*4+p)*D+d];
              if (d > 0) begin
                v = ((p == 3) ? cur[(nx*4+p)*D+d-1] : prev[(nx*4+p)*D+d-1]) + P1;
                if (v < b) b = v;
              end
              if (d < D - 1) begin
                v = ((p == 3) ? cur[(nx*4+p)*D+d+1] : prev[(nx*4+p)*D+d+1]) + P1;
                if (v < b) b = v;
              end
              if (mn + P2 < b) b = mn + P2;
              cur[(x*4+p)*D+d] = c[d] + b - mn;
            end
          end
        end
        clamp[m] = 0;
        for (int d = 0; d < D; d++) begin
          int s = cur[(x*4+0)*D+d] + cur[(x*4+1)*D+d] + cur[(x*4+2)*D+d] + cur[(x*4+3)*D+d];
          if (s > 2**SUM_W - 1) begin s = 2**SUM_W - 1; clamp[m] = 1; end
          if (s < best) begin best = s; bestd = d; end
        end
        disp[m] = bestd;
      end
      prev = cur;
      cur  = new[W * 4 * D];
    end
  endfunction

endpackage
