// tb_flex_sphere_rates: runs the nine configurations of the detector's
// rate table (M_T = 2, 3, 4 streams, all of 4-, 16- or 64-QAM) at the
// default parameters. For each configuration it sends JPC jobs back to back,
// checks every result against fs_ref_pkg and its latency, measures the
// accepted bits per clock cycle and compares them with the published data
// rates divided by the published 285.71 MHz clock (within 1%).
module tb_flex_sphere_rates;
  import fs_pkg::*;
  import fs_ref_pkg::*;

  localparam int JPC = 12;          // jobs per configuration
  localparam int NJ  = 9 * JPC;
  localparam real FMAX_MHZ = 285.71;
  // published rates in Mbit/s: rows M_T = 2, 3, 4; columns 4, 16, 64-QAM
  localparam real RATE [3][3] = '{'{142.7, 285.7, 428.4},
                                  '{214.1, 428.4, 642.7},
                                  '{285.7, 571.4, 857.1}};

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
  job_t   jobs [NJ];
  int     exp_s [NJ][M];
  longint exp_ped [NJ];
  longint acc_cyc [NJ];
  longint cyc = 0;
  int     n_done = 0;

  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    in_valid = 1'b0;
    in_hc_re = '0; in_hc_im = '0; in_yc_re = '0; in_yc_im = '0;
    in_r = '0; in_rinv = '0; in_y = '0; in_q = '0; in_mt = mt_t'(2); in_uid = '0;
    for (int mi = 0; mi < 3; mi++)
      for (int qi = 0; qi < 3; qi++)
        for (int k = 0; k < JPC; k++) begin
          int n, cl;
          int qsel [M];
          n = (mi * 3 + qi) * JPC + k;
          for (int i = 0; i < int'(M); i++) qsel[i] = (qi == 0) ? 1 : (qi == 1) ? 3 : 7;
          jobs[n] = make_job(mi + 2, qsel, 48);
          ref_detect(jobs[n], exp_s[n], exp_ped[n], cl);
        end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    for (int cfg = 0; cfg < 9; cfg++) begin
      int  first, lastj, bits;
      real meas, pub;
      first = cfg * JPC;
      lastj = first + JPC - 1;
      for (int n = first; n <= lastj; n++) begin
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
        while (!in_ready) begin
          @(negedge clk);
          #1;
        end
        acc_cyc[n] = cyc;
        @(negedge clk);
        in_valid = 1'b0;
      end
      // accepted bits per cycle over the configuration's jobs
      bits = (cfg / 3 + 2) * 2 * ((cfg % 3) + 1);   // M_T * log2(w)
      meas = real'(bits * (JPC - 1)) / real'(acc_cyc[lastj] - acc_cyc[first]);
      pub  = RATE[cfg / 3][cfg % 3] / FMAX_MHZ;
      check(meas > 0.99 * pub && meas < 1.01 * pub,
            $sformatf("M_T=%0d %0d-QAM: %f bits/cycle, published %f", cfg / 3 + 2,
                      4 ** ((cfg % 3) + 1), meas, pub));
      $display("M_T=%0d %0d-QAM: %f bits/cycle (published rate / f_max = %f)",
               cfg / 3 + 2, 4 ** ((cfg % 3) + 1), meas, pub);
      wait (n_done == lastj + 1);
    end
    repeat (5) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      int  n;
      bit  ok;
      n = int'(out_uid);
      ok = (n < NJ);
      if (ok) begin
        for (int i = 0; i < int'(M); i++) if (int'(out_s[i]) != exp_s[n][i]) ok = 1'b0;
        ok = ok && longint'(out_ped) == exp_ped[n]
                && int'(cyc - acc_cyc[n]) == 40 + 44 * (jobs[n].mt - 1);
      end
      check(ok, $sformatf("job %0d result or latency", n));
      n_done++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, %0d of %0d results", n_done, NJ);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
