// ldpc_ref_pkg: behavioural reference for the decoder testbenches.
//
// Builds the parity-check matrix of the (3,6) quasi-cyclic code as a bit
// matrix straight from its definition (block (i,j) is the Z x Z identity
// shifted by i*j mod Z), finds codewords by Gaussian elimination over GF(2),
// and decodes with a plain flooding binary min-max decoder that evaluates
// the check rule by brute force over all bit patterns.  Nothing here reuses
// the design's sequencing, so its results are an independent expectation.
package ldpc_ref_pkg;

  localparam int W    = 12;
  localparam int CMAX = (1 << W) - 1;

  typedef struct {
    int c0;
    int c1;
  } pair_t;

  int Zr, Nr, Mr;
  bit H [][];
  int chk_var [][];   // [m][k] variable on slot k of check m
  int var_chk [][];   // [n][i] check on the i-th edge of variable n
  int var_slot[][];   // [n][i] slot of that edge inside its check
  // Gaussian elimination result
  bit R [][];
  int pivot_col [];
  int rank_r;

  function automatic void build(int z);
    int cnt [];
    Zr = z; Nr = 6 * z; Mr = 3 * z;
    H = new[Mr];
    foreach (H[m]) H[m] = new[Nr];
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 6; j++)
        for (int r = 0; r < z; r++)
          for (int c = 0; c < z; c++)
            H[i*z + r][j*z + c] = (c == (r + i * j) % z);
    chk_var  = new[Mr];
    var_chk  = new[Nr];
    var_slot = new[Nr];
    cnt      = new[Nr];
    foreach (var_chk[n]) begin
      var_chk[n]  = new[3];
      var_slot[n] = new[3];
      cnt[n] = 0;
    end
    for (int m = 0; m < Mr; m++) begin
      int k;
      chk_var[m] = new[6];
      k = 0;
      for (int n = 0; n < Nr; n++)
        if (H[m][n]) begin
          chk_var[m][k] = n;
          var_chk[n][cnt[n]]  = m;
          var_slot[n][cnt[n]] = k;
          cnt[n]++;
          k++;
        end
    end
    gauss();
  endfunction

  function automatic void gauss();
    int row;
    R = new[Mr];
    foreach (R[m]) begin
      R[m] = new[Nr];
      foreach (R[m][n]) R[m][n] = H[m][n];
    end
    pivot_col = new[Mr];
    row = 0;
    for (int col = 0; col < Nr && row < Mr; col++) begin
      int p;
      p = -1;
      for (int r = row; r < Mr; r++) if (R[r][col]) begin p = r; break; end
      if (p < 0) continue;
      if (p != row) begin
        bit tmp [];
        tmp = R[p]; R[p] = R[row]; R[row] = tmp;
      end
      for (int r = 0; r < Mr; r++)
        if (r != row && R[r][col])
          for (int c = 0; c < Nr; c++) R[r][c] ^= R[row][c];
      pivot_col[row] = col;
      row++;
    end
    rank_r = row;
  endfunction

  // Systematic encoding: the information bits fill the non-pivot columns in
  // increasing order, the pivot bits are solved from the reduced matrix.
  function automatic int k_info();
    return Nr - rank_r;
  endfunction

  function automatic void encode(input bit info [], output bit cw []);
    bit is_piv [];
    int q;
    cw = new[Nr];
    is_piv = new[Nr];
    for (int r = 0; r < rank_r; r++) is_piv[pivot_col[r]] = 1;
    q = 0;
    for (int n = 0; n < Nr; n++)
      if (!is_piv[n]) begin cw[n] = info[q]; q++; end
    for (int r = 0; r < rank_r; r++) begin
      bit s;
      s = 0;
      for (int n = 0; n < Nr; n++)
        if (!is_piv[n] && R[r][n]) s ^= cw[n];
      cw[pivot_col[r]] = s;
    end
  endfunction

  // Information bits back out of a codeword.
  function automatic void extract(input bit cw [], output bit info []);
    bit is_piv [];
    int q;
    info = new[k_info()];
    is_piv = new[Nr];
    for (int r = 0; r < rank_r; r++) is_piv[pivot_col[r]] = 1;
    q = 0;
    for (int n = 0; n < Nr; n++)
      if (!is_piv[n]) begin info[q] = cw[n]; q++; end
  endfunction

  // A random codeword.
  function automatic void codeword(output bit cw []);
    bit info [];
    info = new[k_info()];
    foreach (info[k]) info[k] = 1'($urandom);
    encode(info, cw);
  endfunction

  function automatic bit is_codeword(bit cw []);
    for (int m = 0; m < Mr; m++) begin
      bit s;
      s = 0;
      for (int n = 0; n < Nr; n++) if (H[m][n]) s ^= cw[n];
      if (s) return 0;
    end
    return 1;
  endfunction

  function automatic pair_t llr2pair(int llr);
    pair_t p;
    p.c0 = (llr < 0) ? -llr : 0;
    p.c1 = (llr < 0) ? 0 : llr;
    return p;
  endfunction

  function automatic int sat(int v);
    return (v > CMAX) ? CMAX : v;
  endfunction

  // Min-max check rule for the edge whose five neighbours are given.
  function automatic pair_t check_rule(pair_t o [5]);
    pair_t r;
    r.c0 = CMAX; r.c1 = CMAX;
    for (int pat = 0; pat < 32; pat++) begin
      int mx;
      bit par;
      mx = 0; par = 0;
      for (int k = 0; k < 5; k++) begin
        int c;
        c = pat[k] ? o[k].c1 : o[k].c0;
        if (c > mx) mx = c;
        par ^= pat[k];
      end
      if (par) begin if (mx < r.c1) r.c1 = mx; end
      else     begin if (mx < r.c0) r.c0 = mx; end
    end
    return r;
  endfunction

  function automatic pair_t normalise(int a0, int a1);
    pair_t p;
    int mn;
    a0 = sat(a0); a1 = sat(a1);
    mn = (a0 < a1) ? a0 : a1;
    p.c0 = a0 - mn; p.c1 = a1 - mn;
    return p;
  endfunction

  // Full decode: returns hard bits and the a-posteriori pairs.
  function automatic void decode(input int llr [], input int iters,
                                 output bit hard [], output pair_t post []);
    pair_t chan [];
    pair_t v2c [][];
    pair_t c2v [][];
    chan = new[Nr];
    post = new[Nr];
    hard = new[Nr];
    v2c = new[Mr];
    c2v = new[Mr];
    foreach (v2c[m]) begin v2c[m] = new[6]; c2v[m] = new[6]; end
    for (int n = 0; n < Nr; n++) chan[n] = llr2pair(llr[n]);
    for (int m = 0; m < Mr; m++)
      for (int k = 0; k < 6; k++) v2c[m][k] = chan[chk_var[m][k]];
    for (int n = 0; n < Nr; n++) post[n] = chan[n];
    for (int it = 0; it < iters; it++) begin
      for (int m = 0; m < Mr; m++)
        for (int k = 0; k < 6; k++) begin
          pair_t o [5];
          int q;
          q = 0;
          for (int j = 0; j < 6; j++) if (j != k) begin o[q] = v2c[m][j]; q++; end
          c2v[m][k] = check_rule(o);
        end
      for (int n = 0; n < Nr; n++) begin
        int t0, t1;
        t0 = chan[n].c0; t1 = chan[n].c1;
        for (int i = 0; i < 3; i++) begin
          t0 += c2v[var_chk[n][i]][var_slot[n][i]].c0;
          t1 += c2v[var_chk[n][i]][var_slot[n][i]].c1;
        end
        post[n] = normalise(t0, t1);
        for (int i = 0; i < 3; i++) begin
          pair_t e;
          e = c2v[var_chk[n][i]][var_slot[n][i]];
          v2c[var_chk[n][i]][var_slot[n][i]] = normalise(t0 - e.c0, t1 - e.c1);
        end
      end
    end
    for (int n = 0; n < Nr; n++) hard[n] = (post[n].c1 < post[n].c0);
  endfunction

  // Channel: +A for bit 0, -A for bit 1, plus uniform noise in [-noise, noise],
  // clipped to the signed 8-bit range.
  function automatic void channel(input bit cw [], input int amp, input int noise,
                                  output int llr []);
    llr = new[cw.size()];
    foreach (cw[n]) begin
      int v;
      v = (cw[n] ? -amp : amp);
      if (noise > 0) v += int'($urandom_range(2 * noise)) - noise;
      if (v > 127) v = 127;
      if (v < -128) v = -128;
      llr[n] = v;
    end
  endfunction

endpackage
