// tb_flex_sphere: end-to-end test of the Flex-Sphere detector at its
// default parameters.
//
// Sends NJOBS detection jobs with random channels, random per-stream
// modulations (4/16/64-QAM) and random M_T (2, 3, 4), partly back to back,
// partly with idle gaps, and checks every result against fs_ref_pkg:
// detected symbols, PED, M_T, and the latency 84/128/172 cycles for
// M_T = 2/3/4. It also checks the input rate (one job per 8 cycles when
// offered continuously with one M_T). Mechanisms that must occur at least
// once: each M_T, each modulation, a Min_Finder slot stall after an M_T
// switch, results leaving out of order, a slicer clamp to the modulation
// edge, and a discarded out-of-range candidate of the fully expanded levels.
module tb_flex_sphere;
  import fs_pkg::*;
  import fs_ref_pkg::*;

  localparam int NJOBS = 64;
  localparam int WATCHDOG = 40000;

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

  int checks = 0, failures = 0;
  job_t   jobs [NJOBS];
  int     exp_s [NJOBS][M];
  longint exp_ped [NJOBS];
  longint acc_cyc [NJOBS];
  bit     done [NJOBS];
  longint cyc = 0;
  int     n_done = 0, last_done = -1;
  // mechanism counters
  int n_mt [5];
  int n_q [8];
  int n_stall = 0, n_ooo = 0, n_clamp = 0, n_oor = 0, n_rate = 0, n_tx_ok = 0;

  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------------------------------------------------- stimulus
  initial begin
    for (int n = 0; n < NJOBS; n++) begin
      int qsel [M];
      int mt, cl;
      // groups of 4 jobs share an M_T so that back-to-back rates show
      mt = 2 + int'($urandom_range(0, 2));
      if (n % 4 != 0) mt = jobs[n-1].mt;
      for (int s = 0; s < int'(MT_MAX); s++) begin
        int qv;
        case ($urandom_range(0, 2))
          0: qv = 1;
          1: qv = 3;
          default: qv = 7;
        endcase
        qsel[2*s] = qv;
        qsel[2*s+1] = qv;
      end
      jobs[n] = make_job(mt, qsel, 48);
      ref_detect(jobs[n], exp_s[n], exp_ped[n], cl);
      n_clamp += cl;
      done[n] = 1'b0;
    end
  end

  initial begin
    in_valid = 1'b0;
    in_r = '0; in_rinv = '0; in_y = '0; in_q = '0; in_mt = mt_t'(2); in_uid = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    for (int n = 0; n < NJOBS; n++) begin
      longint t_offer;
      bit     same;
      // drive job n in the middle of a cycle
      @(negedge clk);
      for (int i = 0; i < int'(M); i++) begin
        for (int c = 0; c < int'(M); c++) in_r[i][c] = coef_t'(jobs[n].R[i][c]);
        in_rinv[i] = coef_t'(jobs[n].rinv[i]);
        in_y[i]    = coef_t'(jobs[n].y[i]);
        in_q[i]    = qmax_t'(jobs[n].q[i]);
      end
      in_mt    = mt_t'(jobs[n].mt);
      in_uid   = UIDW'(n);
      in_valid = 1'b1;
      #1;
      t_offer = cyc;
      while (!in_ready) begin
        @(negedge clk);
        #1;
      end
      // taken at the end of this cycle
      acc_cyc[n] = cyc;
      n_mt[jobs[n].mt]++;
      for (int i = M - 2 * jobs[n].mt; i < int'(M); i++) begin
        n_q[jobs[n].q[i]]++;
        if (jobs[n].q[i] != 7) n_oor++;
      end
      if (n > 0 && jobs[n].mt == jobs[n-1].mt && acc_cyc[n] - acc_cyc[n-1] == FOLD)
        n_rate++;
      // a wait longer than the folding spacing is a Min_Finder slot stall
      if (n > 0 && acc_cyc[n] - acc_cyc[n-1] > FOLD && acc_cyc[n] > t_offer)
        n_stall++;
      // back-to-back jobs must go at the full rate while every job in flight
      // has the same M_T
      same = 1'b1;
      for (int m = 0; m < n; m++)
        if (acc_cyc[n-1] - acc_cyc[m] < 200 && jobs[m].mt != jobs[n].mt) same = 1'b0;
      if (n > 0 && same && t_offer - acc_cyc[n-1] <= FOLD)
        check(acc_cyc[n] - acc_cyc[n-1] == FOLD,
              $sformatf("job %0d rate: gap %0d", n, acc_cyc[n] - acc_cyc[n-1]));
      @(negedge clk);
      in_valid = 1'b0;
      // occasional idle time between groups
      if (n % 4 == 3 && $urandom_range(0, 1) == 1)
        repeat ($urandom_range(1, 120)) @(negedge clk);
    end
  end

  // sample in_ready/in_valid in the cycle they apply
  // (the driver above waits on posedge; acceptance is checked on the same edge)

  // ---------------------------------------------------------- M-RVD path
  // random complex inputs every cycle; one cycle later the real model must
  // hold them interleaved (Re/Im on neighbouring rows and columns)
  int n_mrvd = 0;
  coef_t [MT_MAX-1:0][MT_MAX-1:0] prev_re, prev_im;
  coef_t [MT_MAX-1:0]             prev_yre, prev_yim;
  initial begin
    in_hc_re = '0; in_hc_im = '0; in_yc_re = '0; in_yc_im = '0;
  end
  always @(negedge clk) begin
    if (rst_n && n_mrvd < 200) begin
      bit ok;
      ok = 1'b1;
      if (n_mrvd > 0)
        for (int r = 0; r < int'(MT_MAX); r++) begin
          if (out_y_mrvd[2*r] != prev_yre[r] || out_y_mrvd[2*r+1] != prev_yim[r]) ok = 1'b0;
          for (int c = 0; c < int'(MT_MAX); c++)
            if (out_h_mrvd[2*r][2*c] != prev_re[r][c] || out_h_mrvd[2*r+1][2*c+1] != prev_re[r][c]
                || out_h_mrvd[2*r+1][2*c] != prev_im[r][c] || out_h_mrvd[2*r][2*c+1] != -prev_im[r][c])
              ok = 1'b0;
        end
      if (n_mrvd > 0) check(ok, "M-RVD mapping");
      for (int r = 0; r < int'(MT_MAX); r++) begin
        in_yc_re[r] = coef_t'(int'($urandom_range(0, 8191)) - 4096);
        in_yc_im[r] = coef_t'(int'($urandom_range(0, 8191)) - 4096);
        for (int c = 0; c < int'(MT_MAX); c++) begin
          in_hc_re[r][c] = coef_t'(int'($urandom_range(0, 8191)) - 4096);
          in_hc_im[r][c] = coef_t'(int'($urandom_range(0, 8191)) - 4096);
        end
      end
      prev_re = in_hc_re; prev_im = in_hc_im; prev_yre = in_yc_re; prev_yim = in_yc_im;
      n_mrvd++;
    end
  end

  // ---------------------------------------------------------- results
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      int n, lat;
      n = int'(out_uid);
      check(n < NJOBS && !done[n], $sformatf("unexpected result id %0d", n));
      if (n < NJOBS && !done[n]) begin
        done[n] = 1'b1;
        n_done++;
        lat = int'(cyc - acc_cyc[n]);
        check(lat == 40 + 44 * (jobs[n].mt - 1),
              $sformatf("job %0d M_T=%0d latency %0d", n, jobs[n].mt, lat));
        check(int'(out_mt) == jobs[n].mt, $sformatf("job %0d M_T", n));
        check(longint'(out_ped) == exp_ped[n],
              $sformatf("job %0d PED %0d expected %0d", n, out_ped, exp_ped[n]));
        begin
          bit ok, tx;
          ok = 1'b1;
          tx = 1'b1;
          for (int i = 0; i < int'(M); i++) begin
            if (int'(out_s[i]) != exp_s[n][i]) ok = 1'b0;
            if (int'(out_s[i]) != jobs[n].s_tx[i]) tx = 1'b0;
          end
          check(ok, $sformatf("job %0d symbols", n));
          if (tx) n_tx_ok++;
        end
        if (n < last_done) n_ooo++;
        last_done = n;
      end
    end
  end

  initial begin
    wait (n_done == NJOBS);
    repeat (5) @(posedge clk);
    check(n_mt[2] > 0, "M_T=2 never used");
    check(n_mt[3] > 0, "M_T=3 never used");
    check(n_mt[4] > 0, "M_T=4 never used");
    check(n_q[1] > 0 && n_q[3] > 0 && n_q[7] > 0, "a modulation never used");
    check(n_stall > 0, "no Min_Finder slot stall happened");
    check(n_ooo > 0, "no out-of-order result happened");
    check(n_clamp > 0, "no slicer clamp happened");
    check(n_oor > 0, "no out-of-range candidate happened");
    check(n_rate > 0, "full input rate never reached");
    $display("mechanisms: mt2=%0d mt3=%0d mt4=%0d qam4=%0d qam16=%0d qam64=%0d stalls=%0d out_of_order=%0d clamps=%0d oor_levels=%0d full_rate=%0d sent_vector_found=%0d/%0d",
             n_mt[2], n_mt[3], n_mt[4], n_q[1], n_q[3], n_q[7], n_stall, n_ooo, n_clamp, n_oor, n_rate, n_tx_ok, NJOBS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, %0d of %0d results", n_done, NJOBS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
