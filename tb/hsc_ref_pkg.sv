// hsc_ref_pkg: reference models used by the testbenches.
//
// Plain integer models written from the defining formulas, independent of the
// structure of the RTL: the 5/3 wavelet in direct form on a whole line with
// symmetric extension, the three-level pyramid, and small helpers.
package hsc_ref_pkg;
  // floor division by 2^n of a signed integer
  function automatic int fdiv(input int v, input int n);
    int q;
    q = v / (1 << n);
    if (v < 0 && q * (1 << n) != v) q = q - 1;
    return q;
  endfunction

  function automatic int ext(input int x[$], input int i);
    int n;
    n = x.size();
    if (i < 0)  return x[-i];
    if (i >= n) return x[2*n - 2 - i];
    return x[i];
  endfunction

  // one 5/3 analysis stage of a line (even length)
  function automatic void dwt53(input int x[$], output int d[$], output int s[$]);
    d = {};
    s = {};
    for (int k = 0; k < x.size() / 2; k++) begin
      d.push_back(fdiv(2*ext(x,2*k+1) - ext(x,2*k) - ext(x,2*k+2), 1));
      s.push_back(fdiv(-ext(x,2*k-2) + 2*ext(x,2*k-1) + 6*ext(x,2*k) + 2*ext(x,2*k+1)
                       - ext(x,2*k+2), 3));
    end
  endfunction

  // wavelet line in transmission order A3 | D3 | D2 | D1
  function automatic void dwt_line(input int x[$], output int w[$]);
    int cur[$], nxt[$], det[3][$];
    cur = x;
    for (int l = 0; l < 3; l++) begin
      nxt = {};
      det[l] = {};
      for (int k = 0; k < cur.size() / 2; k++) begin
        det[l].push_back(fdiv(2*ext(cur,2*k+1) - ext(cur,2*k) - ext(cur,2*k+2), 1));
        nxt.push_back(fdiv(-ext(cur,2*k-2) + 2*ext(cur,2*k-1) + 6*ext(cur,2*k)
                           + 2*ext(cur,2*k+1) - ext(cur,2*k+2), 3));
      end
      cur = nxt;
    end
    w = {};
    foreach (cur[i]) w.push_back(cur[i]);
    for (int l = 2; l >= 0; l--) foreach (det[l][i]) w.push_back(det[l][i]);
  endfunction

  function automatic int iabs(input int v);
    return (v < 0) ? -v : v;
  endfunction

  // value of a raster stream at index i, zero before its start
  function automatic int at(input int f[$], input int i);
    return (i < 0) ? 0 : f[i];
  endfunction

  // Sobel magnitude at stream index i (window ending at i), n pixels per line
  function automatic int sobel_at(input int f[$], input int i, input int n);
    int g1, g2, h0, h2;
    g1 = (at(f,i) + 2*at(f,i-1) + at(f,i-2)) - (at(f,i-2*n) + 2*at(f,i-2*n-1) + at(f,i-2*n-2));
    h0 = at(f,i)   + 2*at(f,i-n)   + at(f,i-2*n);
    h2 = at(f,i-2) + 2*at(f,i-n-2) + at(f,i-2*n-2);
    g2 = h0 - h2;
    return iabs(g1) + iabs(g2);
  endfunction

  // 3x3 erosion (dil = 0) or dilation (dil = 1) at stream index i
  function automatic int morph_at(input int f[$], input int i, input int n, input bit dil);
    int r;
    r = dil ? 0 : 1;
    for (int dy = 0; dy < 3; dy++)
      for (int dx = 0; dx < 3; dx++)
        if (dil) r = r | at(f, i - dx - dy*n);
        else     r = r & at(f, i - dx - dy*n);
    return r;
  endfunction
endpackage
