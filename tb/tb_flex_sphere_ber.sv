// tb_flex_sphere_ber: bit error rate runs of the detector over a Rayleigh
// fading channel, end to end through the M-RVD front end.
//
// For each vector: a complex channel H (4 receive antennas, M_T streams,
// entries with independent N(0, 1/2) real and imaginary parts), Gray-coded
// QAM symbols and complex Gaussian noise for the given SNR (SNR = received
// signal power per antenna / noise power per antenna) are drawn. H and y are
// quantised and passed through the detector's M-RVD ports; the real model
// that comes out is QR-decomposed here (modified Gram-Schmidt, a model of the
// channel pre-processing, without the stream ordering that a full receiver
// would add), quantised, and sent to the detector as a job.
//
// Checks: every detected vector and PED equal the integer reference model
// fs_ref_pkg (exact), every job returns, and for each configuration the bit
// error rate at the higher SNR is below the one at the lower SNR. The BER
// values are printed; they show the behaviour of this fixed-point detector
// without channel ordering, and are not expected to match published curves.
module tb_flex_sphere_ber;
  import fs_pkg::*;
  import fs_ref_pkg::*;

  localparam int NV    = 2000;    // vectors per configuration and SNR
  localparam int NCFG  = 3;
  localparam int CFG_MT [NCFG] = '{4, 4, 3};
  localparam int CFG_Q  [NCFG] = '{7, 3, 3};
  localparam real CFG_SNR [NCFG][2] = '{'{20.0, 32.0}, '{10.0, 22.0}, '{10.0, 22.0}};
  localparam int NJ = NCFG * 2 * NV;
  localparam real PI = 3.14159265358979;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                 in_valid, in_ready;
  coef_t [M-1:0][M-1:0] in_r;
  coef_t [M-1:0]        in_rinv, in_y;
  qmax_t [M-1:0]        in_q;
  mt_t                  in_mt;
  logic [UIDW-1:0]      in_uid;
  logic                 out_valid;
  logic [UIDW-1:0]      out_uid;
  mt_t                  out_mt;
  sym_t [M-1:0]         out_s;
  ped_t                 out_ped;
  coef_t [MT_MAX-1:0][MT_MAX-1:0] in_hc_re, in_hc_im;
  coef_t [MT_MAX-1:0]             in_yc_re, in_yc_im;
  coef_t [M-1:0][M-1:0]           out_h_mrvd;
  coef_t [M-1:0]                  out_y_mrvd;

  flex_sphere dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_r, .in_rinv, .in_y, .in_q, .in_mt, .in_uid,
    .out_valid, .out_uid, .out_mt, .out_s, .out_ped,
    .in_hc_re, .in_hc_im, .in_yc_re, .in_yc_im, .out_h_mrvd, .out_y_mrvd
  );

  int     checks = 0, failures = 0;
  // jobs in flight, indexed by id (ids are reused modulo 256)
  job_t   jobs [256];
  int     exp_s [256][M];
  longint exp_ped [256];
  bit     pending [256];
  int     point_of [256];
  int     n_sent = 0, n_done = 0;
  longint bit_err [NCFG*2];
  longint bit_cnt [NCFG*2];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic real urand();
    return (real'($urandom_range(0, 32'hfffffffe)) + 1.0) / 4294967296.0;
  endfunction

  function automatic real gauss();   // N(0, 1), Box-Muller
    return $sqrt(-2.0 * $ln(urand())) * $cos(2.0 * PI * urand());
  endfunction

  function automatic coef_t q8(input real v);
    real t;
    t = v * 256.0;
    t = (t >= 0.0) ? t + 0.5 : t - 0.5;
    if (t > 32767.0)  t = 32767.0;
    if (t < -32768.0) t = -32768.0;
    return coef_t'(int'($rtoi(t)));
  endfunction

  function automatic int gray_bits(input int v);   // Gray label of a PAM value
    int idx;
    idx = (v + 7) / 2;
    return idx ^ (idx >> 1);
  endfunction

  // ------------------------------------------------------------ stimulus
  initial begin
    in_valid = 1'b0;
    in_r = '0; in_rinv = '0; in_y = '0; in_q = '0; in_mt = mt_t'(4); in_uid = '0;
    in_hc_re = '0; in_hc_im = '0; in_yc_re = '0; in_yc_im = '0;
    for (int p = 0; p < NCFG * 2; p++) begin
      bit_err[p] = 0;
      bit_cnt[p] = 0;
    end
    for (int u = 0; u < 256; u++) pending[u] = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    for (int cfg = 0; cfg < NCFG; cfg++) begin
      for (int sp = 0; sp < 2; sp++) begin
        int  mt, q, lo, nr, ncol;
        real es, sigma;
        mt    = CFG_MT[cfg];
        q     = CFG_Q[cfg];
        lo    = M - 2 * mt + 1;
        nr    = 2 * MT_MAX;
        ncol  = 2 * mt;
        es    = 2.0 * real'((q + 1) * (q + 1) - 1) / 3.0;       // per complex symbol
        sigma = $sqrt(real'(mt) * es / (10.0 ** (CFG_SNR[cfg][sp] / 10.0)) / 2.0);
        for (int v = 0; v < NV; v++) begin
          int   sre [MT_MAX], sim [MT_MAX];
          real  a [2*MT_MAX][2*MT_MAX];
          real  yv [2*MT_MAX];
          real  rr [2*MT_MAX][2*MT_MAX];
          real  yp [2*MT_MAX];
          job_t j;
          int   id, cl;
          // channel, symbols, noise
          @(negedge clk);
          for (int c = 0; c < int'(MT_MAX); c++) begin
            sre[c] = (c < mt) ? 2 * int'($urandom_range(0, q)) - q : 0;
            sim[c] = (c < mt) ? 2 * int'($urandom_range(0, q)) - q : 0;
          end
          for (int r = 0; r < int'(MT_MAX); r++) begin
            real accr, acci;
            accr = 0.0;
            acci = 0.0;
            for (int c = 0; c < int'(MT_MAX); c++) begin
              real hr, hi;
              hr = (c < mt) ? gauss() * $sqrt(0.5) : 0.0;
              hi = (c < mt) ? gauss() * $sqrt(0.5) : 0.0;
              in_hc_re[r][c] = q8(hr);
              in_hc_im[r][c] = q8(hi);
              accr += real'(in_hc_re[r][c]) / 256.0 * sre[c] - real'(in_hc_im[r][c]) / 256.0 * sim[c];
              acci += real'(in_hc_im[r][c]) / 256.0 * sre[c] + real'(in_hc_re[r][c]) / 256.0 * sim[c];
            end
            in_yc_re[r] = q8(accr + sigma * gauss());
            in_yc_im[r] = q8(acci + sigma * gauss());
          end
          // M-RVD result one cycle later
          @(negedge clk);
          for (int r = 0; r < nr; r++) begin
            yv[r] = real'(out_y_mrvd[r]) / 256.0;
            for (int c = 0; c < ncol; c++) a[r][c] = real'(out_h_mrvd[r][c]) / 256.0;
          end
          // QR by modified Gram-Schmidt: a becomes Q, rr = R, yp = Q^T y
          for (int k = 0; k < ncol; k++) begin
            real nrm;
            nrm = 0.0;
            for (int r = 0; r < nr; r++) nrm += a[r][k] * a[r][k];
            nrm = $sqrt(nrm);
            if (nrm < 1.0e-6) nrm = 1.0e-6;
            rr[k][k] = nrm;
            for (int r = 0; r < nr; r++) a[r][k] = a[r][k] / nrm;
            for (int c = k + 1; c < ncol; c++) begin
              real d;
              d = 0.0;
              for (int r = 0; r < nr; r++) d += a[r][k] * a[r][c];
              rr[k][c] = d;
              for (int r = 0; r < nr; r++) a[r][c] = a[r][c] - d * a[r][k];
            end
          end
          for (int k = 0; k < ncol; k++) begin
            yp[k] = 0.0;
            for (int r = 0; r < nr; r++) yp[k] += a[r][k] * yv[r];
          end
          // job in the detector's level order (lower right corner)
          for (int i = 0; i < int'(M); i++) begin
            j.q[i] = (i >= lo - 1) ? q : 1;
            j.y[i] = 0;
            j.rinv[i] = 0;
            j.s_tx[i] = 0;
            for (int c = 0; c < int'(M); c++) j.R[i][c] = 0;
          end
          j.mt = mt;
          for (int k = 0; k < ncol; k++) begin
            int rii;
            rii = int'(q8(rr[k][k]));
            if (rii < 2) rii = 2;
            j.R[lo-1+k][lo-1+k] = rii;
            j.rinv[lo-1+k] = (65536 + rii / 2) / rii;
            for (int c = k + 1; c < ncol; c++) j.R[lo-1+k][lo-1+c] = int'(q8(rr[k][c]));
            j.y[lo-1+k] = int'(q8(yp[k]));
            j.s_tx[lo-1+k] = (k % 2 == 0) ? sre[k/2] : sim[k/2];
          end
          id = n_sent % 256;
          check(!pending[id], "id reused while in flight");
          jobs[id] = j;
          ref_detect(j, exp_s[id], exp_ped[id], cl);
          pending[id]  = 1'b1;
          point_of[id] = cfg * 2 + sp;
          // offer the job
          for (int i = 0; i < int'(M); i++) begin
            for (int c = 0; c < int'(M); c++) in_r[i][c] = coef_t'(j.R[i][c]);
            in_rinv[i] = coef_t'(j.rinv[i]);
            in_y[i]    = coef_t'(j.y[i]);
            in_q[i]    = qmax_t'(j.q[i]);
          end
          in_mt    = mt_t'(mt);
          in_uid   = UIDW'(id);
          in_valid = 1'b1;
          #1;
          while (!in_ready) begin
            @(negedge clk);
            #1;
          end
          n_sent++;
          @(negedge clk);
          in_valid = 1'b0;
        end
      end
    end
  end

  // ------------------------------------------------------------- results
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      int id, p;
      bit ok;
      id = int'(out_uid);
      ok = pending[id] && longint'(out_ped) == exp_ped[id];
      for (int i = 0; i < int'(M); i++) if (int'(out_s[i]) != exp_s[id][i]) ok = 1'b0;
      check(ok, $sformatf("id %0d result differs from the reference", id));
      p = point_of[id];
      for (int i = M - 2 * jobs[id].mt; i < int'(M); i++) begin
        bit_err[p] += $countones(gray_bits(int'(out_s[i])) ^ gray_bits(jobs[id].s_tx[i]));
        bit_cnt[p] += $clog2(jobs[id].q[i] + 1);
      end
      pending[id] = 1'b0;
      n_done++;
    end
  end

  initial begin
    wait (n_done == NJ);
    repeat (5) @(negedge clk);
    for (int cfg = 0; cfg < NCFG; cfg++) begin
      real b0, b1;
      b0 = real'(bit_err[2*cfg]) / real'(bit_cnt[2*cfg]);
      b1 = real'(bit_err[2*cfg+1]) / real'(bit_cnt[2*cfg+1]);
      $display("%0d streams, 4 receive antennas, %0d-QAM: BER %e at %0.1f dB, %e at %0.1f dB (%0d bits each)",
               CFG_MT[cfg], (CFG_Q[cfg] + 1) * (CFG_Q[cfg] + 1), b0, CFG_SNR[cfg][0],
               b1, CFG_SNR[cfg][1], bit_cnt[2*cfg]);
      check(b1 < b0, $sformatf("configuration %0d: BER does not fall with SNR", cfg));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NJ * 12 + 2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, %0d of %0d results", n_done, NJ);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
