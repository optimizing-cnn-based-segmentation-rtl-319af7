// Reference models used by the testbenches: the arithmetic definitions of
// the layers, independent of the hardware's loop order and datapath.
//   conv_ref:   zero-padded 3x3 convolution summed over channels; per filter
//               the (cropped) full map unless only pooling is on, then the
//               2x2 max-pooled map when pooling is on.
//   deconv_ref: O[f][y][x] = sum of I[c][r][q] * K[f][c][i][j] over
//               s*r+i = y+p, s*q+j = x+p (border p removed).
// Results are shifted by frac, clamped at zero with relu and saturated to
// dw bits, as the hardware writes them back. Coefficient arrays are in the
// stream order the units consume (see conv_module / deconv_module).
package tb_ref_pkg;

  function automatic longint qz(longint a, int frac, int dw, bit relu);
    longint v = a >>> frac;
    longint hi = (64'sd1 <<< (dw - 1)) - 1;
    if (relu && v < 0) v = 0;
    if (v > hi) v = hi;
    if (v < -hi - 1) v = -hi - 1;
    return v;
  endfunction

  function automatic void conv_ref(input int in_map[], input int coefs[], input int nc, nf, h, w, pf,
                                   input bit pool, crop_en, input int crop, input bit relu,
                                   input int frac, dw, ref longint exp_q[$]);
    longint o [];
    int n = 0;
    o = new[nf*h*w];
    foreach (o[i]) o[i] = 0;
    for (int g = 0; g < nf; g += pf)
      for (int c = 0; c < nc; c++)
        for (int f = g; f < g + pf && f < nf; f++)
          for (int a = 0; a < 3; a++)
            for (int b = 0; b < 3; b++) begin
              longint kv = coefs[n++];
              for (int y = 0; y < h; y++)
                for (int x = 0; x < w; x++) begin
                  int yy = y + a - 1, xx = x + b - 1;
                  if (yy >= 0 && yy < h && xx >= 0 && xx < w)
                    o[(f*h+y)*w+x] += longint'(in_map[(c*h+yy)*w+xx]) * kv;
                end
            end
    for (int f = 0; f < nf; f++) begin
      int lo = crop_en ? crop : 0;
      if (crop_en || !pool)
        for (int y = lo; y < h - lo; y++)
          for (int x = lo; x < w - lo; x++) exp_q.push_back(qz(o[(f*h+y)*w+x], frac, dw, relu));
      if (pool)
        for (int y = 0; y < h/2; y++)
          for (int x = 0; x < w/2; x++) begin
            longint m = o[(f*h+2*y)*w+2*x];
            if (o[(f*h+2*y)*w+2*x+1] > m) m = o[(f*h+2*y)*w+2*x+1];
            if (o[(f*h+2*y+1)*w+2*x] > m) m = o[(f*h+2*y+1)*w+2*x];
            if (o[(f*h+2*y+1)*w+2*x+1] > m) m = o[(f*h+2*y+1)*w+2*x+1];
            exp_q.push_back(qz(m, frac, dw, relu));
          end
    end
  endfunction

  function automatic void deconv_ref(input int in_map[], input int coefs[], input int nc, nf, h, w, k, s, p,
                                     input bit relu, input int frac, dw, ref longint exp_q[$]);
    int ho = s*(h-1)+k-2*p, wo = s*(w-1)+k-2*p;
    longint o [];
    o = new[nf*ho*wo];
    foreach (o[i]) o[i] = 0;
    for (int f = 0; f < nf; f++)
      for (int c = 0; c < nc; c++)
        for (int r = 0; r < h; r++)
          for (int q = 0; q < w; q++)
            for (int i = 0; i < k; i++)
              for (int j = 0; j < k; j++) begin
                int y = s*r+i-p, x = s*q+j-p;
                if (y >= 0 && y < ho && x >= 0 && x < wo)
                  o[(f*ho+y)*wo+x] += longint'(in_map[(c*h+r)*w+q]) *
                                      longint'(coefs[((f*nc+c)*k+j)*k+i]);
              end
    foreach (o[i]) exp_q.push_back(qz(o[i], frac, dw, relu));
  endfunction

endpackage
