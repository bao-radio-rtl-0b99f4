// rfft_ref_pkg: testbench reference for the real-FFT recombination, written independently of
// the RTL. Given A = Z[k] and B = Z[N/2-k] it returns
//   {X[N/2-k].re, X[N/2-k].im, X[k].re, X[k].im} (8 bits each), where
//   X[k] = (S - jW^k D)/2, X[N/2-k] = conj(S + jW^k D)/2, S = A + conj(B), D = A - conj(B),
// with twiddles round(cos/sin(2*pi*k/N) * 2^14), results rounded half-up and clipped.
package rfft_ref_pkg;
  function automatic int clip8(longint v);
    return v > 127 ? 127 : (v < -128 ? -128 : int'(v));
  endfunction

  function automatic logic [31:0] rfft_pair(int ar, int ai, int br, int bi, int k, int n);
    longint c, s, sr, si, dr, di, rr, ri;
    int xar, xai, xbr, xbi, t;
    c  = longint'($rtoi($floor($cos(6.283185307179586 * k / n) * 16384.0 + 0.5)));
    s  = longint'($rtoi($floor($sin(6.283185307179586 * k / n) * 16384.0 + 0.5)));
    sr = longint'(ar) + longint'(br); si = longint'(ai) - longint'(bi);
    dr = longint'(ar) - longint'(br); di = longint'(ai) + longint'(bi);
    rr = dr * s - di * c;
    ri = dr * c + di * s;
    xar = clip8((sr * 16384 - rr + 16384) >>> 15);
    xai = clip8((si * 16384 - ri + 16384) >>> 15);
    xbr = clip8((sr * 16384 + rr + 16384) >>> 15);
    t   = clip8((si * 16384 + ri + 16384) >>> 15);
    xbi = (t == -128) ? 127 : -t;
    return {8'(xbr), 8'(xbi), 8'(xar), 8'(xai)};
  endfunction
endpackage
