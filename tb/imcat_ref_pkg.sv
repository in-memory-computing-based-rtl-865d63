// imcat_ref_pkg: reference arithmetic for the attention testbenches.
// Plain integer models of the accelerator's number formats, written
// independently of the RTL: requantisation, the exponent table, the softmax
// weights and the nearest-M selection. Vectors are flattened dynamic arrays:
// a matrix entry (r, c) of a matrix with C columns is at r * C + c.
package imcat_ref_pkg;

  function automatic int rq(longint v, int sh);
    longint r;
    r = (sh == 0) ? v : ((v + (64'sd1 <<< (sh - 1))) >>> sh);
    if (r > 127) return 127;
    if (r < -128) return -128;
    return int'(r);
  endfunction

  function automatic int lut(int k);
    return int'($rtoi(255.0 * $exp(-real'(k) / 16.0) + 0.5));
  endfunction

  // y = M x for a rows x cols matrix
  function automatic void mvm(input int rows, input int cols, input int m[], input int x[],
                              output longint y[]);
    y = new[rows];
    for (int r = 0; r < rows; r++) begin
      y[r] = 0;
      for (int c = 0; c < cols; c++) y[r] += longint'(m[r * cols + c]) * x[c];
    end
  endfunction

  // Attention of query q (dk) over the keys t with sel[t] = 1.
  // kf, vf: n x dk keys and values. Output requantised by 7 (Q0.7 weights).
  function automatic void attend(input int dk, input int n, input int q[], input int kf[],
                                 input int vf[], input bit sel[], input int sb, input int ls,
                                 output int out[]);
    longint s [];
    int e [];
    longint smax, sum, acc;
    int k, w;
    s = new[n];
    e = new[n];
    smax = -(64'sd1 <<< 62);
    for (int t = 0; t < n; t++) if (sel[t]) begin
      s[t] = 0;
      for (int d = 0; d < dk; d++) s[t] += longint'(q[d]) * kf[t * dk + d];
      s[t] = s[t] >>> sb;
      if (s[t] > smax) smax = s[t];
    end
    sum = 0;
    for (int t = 0; t < n; t++) if (sel[t]) begin
      k = int'((smax - s[t]) >> ls);
      if ((smax - s[t]) >> ls > 255) k = 255;
      e[t] = lut(k);
      sum += e[t];
    end
    out = new[dk];
    for (int d = 0; d < dk; d++) begin
      acc = 0;
      for (int t = 0; t < n; t++) if (sel[t]) begin
        w = int'((longint'(e[t]) * 127 + sum / 2) / sum);
        acc += longint'(w) * vf[t * dk + d];
      end
      out[d] = rq(acc, 7);
    end
  endfunction

  // Hamming distances of signature q to the n stored signatures (sig bits each),
  // then the m nearest candidates (lower index first on ties) marked in sel.
  function automatic void nearest(input int n, input int sig, input bit qs[], input bit ks[],
                                  input bit cand[], input int m, output bit sel[]);
    int hd [];
    int best;
    hd = new[n];
    sel = new[n];
    for (int t = 0; t < n; t++) begin
      sel[t] = 0;
      hd[t] = 0;
      for (int b = 0; b < sig; b++) if (qs[b] != ks[t * sig + b]) hd[t]++;
    end
    for (int j = 0; j < m; j++) begin
      best = -1;
      for (int t = 0; t < n; t++)
        if (cand[t] && !sel[t] && (best < 0 || hd[t] < hd[best])) best = t;
      if (best >= 0) sel[best] = 1;
    end
  endfunction

endpackage
