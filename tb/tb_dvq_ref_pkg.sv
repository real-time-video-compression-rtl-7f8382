// tb_dvq_ref_pkg: sample-by-sample software model of the DVQ algorithm, used by the encoder,
// decoder and system testbenches as the expected result. It is written from the algorithm, not
// from the RTL: for every tile of four samples it predicts each sample from the reconstructed
// samples one line back (+/-2 samples) and two lines back, saturates the difference to
// -128..127, searches the whole codebook for the smallest l1 distance (lowest index on a tie),
// and reconstructs prediction + codeword clamped to 0..255. Samples before the start count as 0.
package tb_dvq_ref_pkg;

  function automatic int clampi(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  function automatic int rget(const ref int r[], input int m);
    return (m < 0) ? 0 : r[m];
  endfunction

  // pix: input samples; cb: ncw*4 signed difference components (codeword j, component k at
  // j*4+k); outputs idx (one per tile) and rec (reconstructed samples), plus event counts.
  function automatic void dvq_encode(input int line, input int ncw, const ref int cb[],
                                     const ref int pix[], ref int idx[], ref int rec[],
                                     ref int n_clip, ref int n_ovf, ref int n_unf);
    int n = pix.size() / 4 * 4;
    idx = new[n / 4];
    rec = new[n];
    for (int t = 0; t < n / 4; t++) begin
      int pv[4], d[4];
      int best, bestd;
      for (int k = 0; k < 4; k++) begin
        int m = 4 * t + k;
        int a = rget(rec, m - 2 * line);
        int b = rget(rec, m - line - 2);
        int c = rget(rec, m - line + 2);
        int raw;
        pv[k] = (((b + c) / 2) + a) / 2;
        raw   = pix[m] - pv[k];
        if (raw > 127 || raw < -128) n_clip++;
        d[k]  = clampi(raw, -128, 127);
      end
      best = 0; bestd = 1 << 20;
      for (int j = 0; j < ncw; j++) begin
        int s = 0;
        for (int k = 0; k < 4; k++) begin
          int e = d[k] - cb[j * 4 + k];
          s += (e < 0) ? -e : e;
        end
        if (s < bestd) begin bestd = s; best = j; end
      end
      idx[t] = best;
      for (int k = 0; k < 4; k++) begin
        int v = pv[k] + cb[best * 4 + k];
        if (v > 255) n_ovf++;
        if (v < 0)   n_unf++;
        rec[4 * t + k] = clampi(v, 0, 255);
      end
    end
  endfunction

endpackage
