// fs_ref_pkg: reference model of the Flex-Sphere detector for the
// testbenches. It works on plain integers and follows the algorithm, not
// the hardware structure: full expansion of the two top levels, closest
// child (found by trying every allowed constellation value) below, l1
// distances, and the minimum over all final nodes in the order the
// hardware scans them (child of level M-1 outer, child of level M inner,
// first minimum wins). Fixed point: Q(FRAC) values as in fs_pkg.
package fs_ref_pkg;
  import fs_pkg::*;

  localparam longint PEDMAX = (longint'(1) << PW) - 1;
  localparam longint BS_LIM = (longint'(1) << (IW - 2)) - 1;

  typedef struct {
    int R    [M][M];   // R[i-1][j-1] = R_ij
    int rinv [M];
    int y    [M];
    int q    [M];
    int mt;
    int s_tx [M];      // symbols that were sent (for information)
  } job_t;

  function automatic longint sat_ped(input longint v);
    return (v > PEDMAX) ? PEDMAX : v;
  endfunction

  function automatic longint labs(input longint v);
    return (v < 0) ? -v : v;
  endfunction

  // odd value in [-q, q] closest to bs / 2^FRAC, ties to the larger one
  function automatic int ref_slice(input longint bs, input int q);
    int     best;
    longint bd, d;
    best = -q;
    bd   = labs(bs - (longint'(-q) <<< FRAC));
    for (int c = -q + 2; c <= q; c += 2) begin
      d = labs(bs - (longint'(c) <<< FRAC));
      if (d <= bd) begin
        bd   = d;
        best = c;
      end
    end
    return best;
  endfunction

  // scaled b as the hardware forms it: floor(b * rinv / 2^FRAC), limited
  function automatic longint ref_scale(input longint b, input int rinv);
    longint p;
    p = (b * longint'(rinv)) >>> FRAC;
    if (p > BS_LIM)  p = BS_LIM;
    if (p < -BS_LIM) p = -BS_LIM;
    return p;
  endfunction

  // whole detection; s_out[i-1] = symbol of level i (0 if unused)
  function automatic void ref_detect(input job_t j, output int s_out [M], output longint ped_out,
                                     output int clamps);
    int     s [WQ][WQ][M];
    longint t [WQ][WQ];
    int     lo;
    lo     = M - 2 * j.mt + 1;
    clamps = 0;
    for (int r = 0; r < int'(WQ); r++) begin
      for (int k = 0; k < int'(WQ); k++) begin
        int     sm, sm1;
        longint b;
        for (int i = 0; i < int'(M); i++) s[r][k][i] = 0;
        sm  = 2 * r - int'(WQ) + 1;
        sm1 = 2 * k - int'(WQ) + 1;
        s[r][k][M-1] = sm;
        s[r][k][M-2] = sm1;
        // level M
        t[r][k] = labs(longint'(j.y[M-1]) - longint'(j.R[M-1][M-1]) * sm);
        if (sm > j.q[M-1] || sm < -j.q[M-1]) t[r][k] = PEDMAX;
        // level M-1
        b = longint'(j.y[M-2]) - longint'(j.R[M-2][M-1]) * sm;
        if (sm1 > j.q[M-2] || sm1 < -j.q[M-2] || t[r][k] == PEDMAX) t[r][k] = PEDMAX;
        else t[r][k] = sat_ped(t[r][k] + labs(b - longint'(j.R[M-2][M-2]) * sm1));
        // closest child below
        for (int lvl = int'(M) - 2; lvl >= lo; lvl--) begin
          int     sc, raw;
          longint bs;
          b = longint'(j.y[lvl-1]);
          for (int c = lvl; c < int'(M); c++) b -= longint'(j.R[lvl-1][c]) * s[r][k][c];
          bs  = ref_scale(b, j.rinv[lvl-1]);
          sc  = ref_slice(bs, j.q[lvl-1]);
          raw = ref_slice(bs, 7);
          if (raw != sc) clamps++;
          s[r][k][lvl-1] = sc;
          t[r][k] = sat_ped(t[r][k] + labs(b - longint'(j.R[lvl-1][lvl-1]) * sc));
        end
      end
    end
    ped_out = -1;
    for (int k = 0; k < int'(WQ); k++)
      for (int r = 0; r < int'(WQ); r++)
        if (ped_out < 0 || t[r][k] < ped_out) begin
          ped_out = t[r][k];
          for (int i = 0; i < int'(M); i++) s_out[i] = s[r][k][i];
        end
  endfunction

  // random channel and received vector: R_ii in [0.5, 2), R_ij in [-1, 1),
  // 1/R_ii rounded, y' = R s + noise; levels outside M_T are zero
  function automatic job_t make_job(input int mt, input int qsel [M], input int noise);
    job_t j;
    int   lo;
    j.mt = mt;
    lo   = M - 2 * mt + 1;
    for (int i = 0; i < int'(M); i++) begin
      j.q[i] = qsel[i];
      for (int c = 0; c < int'(M); c++) j.R[i][c] = 0;
      j.rinv[i] = 0;
      j.y[i]    = 0;
      j.s_tx[i] = 0;
    end
    for (int i = lo - 1; i < int'(M); i++) begin
      int v;
      v = int'($urandom_range(0, j.q[i]));
      j.s_tx[i] = 2 * v - j.q[i];
      j.R[i][i] = int'($urandom_range(128, 511));
      j.rinv[i] = (65536 + j.R[i][i] / 2) / j.R[i][i];
      for (int c = i + 1; c < int'(M); c++) j.R[i][c] = int'($urandom_range(0, 511)) - 256;
    end
    for (int i = lo - 1; i < int'(M); i++) begin
      int acc;
      acc = int'($urandom_range(0, 2 * noise)) - noise;
      for (int c = i; c < int'(M); c++) acc += j.R[i][c] * j.s_tx[c];
      j.y[i] = acc;
    end
    return j;
  endfunction
endpackage
