// dvq_ref_pkg: reference model of the DVQ coding loop for the testbenches.
//
// Written directly from the algorithm, sample by sample, with no timing:
// prediction P[n] = ((R[n-L-2] + R[n-L+2])/2 + R[n-2L])/2 with R the
// reconstructed samples (zero before the first), difference saturated to
// -128..127 and offset by 128, full-search l1 quantization over the codebook
// (lowest index on a tie), reconstruction clamped to 0..255.
package dvq_ref_pkg;

  function automatic int unsigned l1(byte unsigned a[4], byte unsigned b[4]);
    int unsigned s = 0;
    for (int c = 0; c < 4; c++) s += (a[c] > b[c]) ? a[c] - b[c] : b[c] - a[c];
    return s;
  endfunction

  function automatic byte unsigned to_code(int d);
    if (d > 127) d = 127;
    if (d < -128) d = -128;
    return byte'(d + 128);
  endfunction

  class dvq_model;
    int line_len;
    int ncw;
    byte unsigned cb[][4];
    byte unsigned recon[$];
    int unsigned  pvs[$];
    int unsigned  idx[$];
    int unsigned  dmin[$];
    int           n_sat;     // differences that needed saturation
    int           n_clamp;   // reconstructions that needed clamping

    function new(int line_len, int ncw);
      this.line_len = line_len;
      this.ncw = ncw;
      cb = new[ncw];
      n_sat = 0;
      n_clamp = 0;
    endfunction

    function int unsigned r(int m);
      return (m < 0) ? 0 : int'(recon[m]);
    endfunction

    function int unsigned predict(int n);
      int unsigned bc;
      bc = (r(n - line_len - 2) + r(n - line_len + 2)) >> 1;
      return (bc + r(n - 2 * line_len)) >> 1;
    endfunction

    // Code one tile of four samples (must be called in order).
    function void code_tile(byte unsigned pix[4]);
      int n0 = recon.size();
      byte unsigned code[4];
      int unsigned p[4];
      int unsigned best, bd, d;
      for (int c = 0; c < 4; c++) begin
        int df;
        p[c] = predict(n0 + c);
        df = int'(pix[c]) - int'(p[c]);
        if (df > 127 || df < -128) n_sat++;
        code[c] = to_code(df);
      end
      best = 0;
      bd = l1(cb[0], code);
      for (int j = 1; j < ncw; j++) begin
        d = l1(cb[j], code);
        if (d < bd) begin bd = d; best = j; end
      end
      idx.push_back(best);
      dmin.push_back(bd);
      decode_tile(best, p);
    endfunction

    // Reconstruct one tile from an index and its predictions.
    function void decode_tile(int unsigned j, int unsigned p[4]);
      for (int c = 0; c < 4; c++) begin
        int v = int'(p[c]) + int'(cb[j][c]) - 128;
        if (v < 0 || v > 255) n_clamp++;
        if (v < 0) v = 0;
        if (v > 255) v = 255;
        pvs.push_back(p[c]);
        recon.push_back(byte'(v));
      end
    endfunction

    // Decoder side: reconstruct the next tile from a received index.
    function void decode_next(int unsigned j);
      int n0 = recon.size();
      int unsigned p[4];
      for (int c = 0; c < 4; c++) p[c] = predict(n0 + c);
      idx.push_back(j);
      decode_tile(j, p);
    endfunction
  endclass

endpackage
