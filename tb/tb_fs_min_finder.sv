// tb_fs_min_finder: checks the Min_Finder. Each job has an M_T; its 64
// final nodes (8 rows x 8 cycles, first/last flags) arrive on the tap of
// that M_T, while the other taps carry valid decoy nodes of jobs whose
// M_T does not match them (with PED 0), which the input multiplexers must
// ignore. PEDs are drawn from a small range so ties occur. The result must
// be the first minimum in scan order (cycle, then row), with its symbols,
// tag and M_T, 8 cycles after the job's last node.
module tb_fs_min_finder;
  import fs_pkg::*;

  localparam int LAT = 8;
  localparam int N = 300;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  node_t tap [NTAP][WQ];
  node_t result;
  fs_min_finder dut (.clk, .rst_n, .tap, .result);

  int     checks = 0, failures = 0, n_ties = 0;
  longint cyc = 0;
  node_t  exp_res [longint];
  bit     done = 1'b0;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    for (int t = 0; t < int'(NTAP); t++)
      for (int r = 0; r < int'(WQ); r++) tap[t][r] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < N; n++) begin
      int    t, cnt;
      node_t best;
      t = int'($urandom_range(0, NTAP - 1));
      best = '0;
      cnt = 0;
      for (int k = 0; k < int'(WQ); k++) begin
        @(negedge clk);
        for (int r = 0; r < int'(WQ); r++) begin
          node_t v;
          v       = '0;
          v.valid = 1'b1;
          v.first = (k == 0);
          v.last  = (k == int'(WQ) - 1);
          v.tag   = TAGW'(n);
          v.mt    = mt_t'(t + 2);
          for (int i = 0; i < int'(M); i++) v.s[i] = sym_t'($urandom);
          v.s[0]  = sym_t'(r);
          v.s[1]  = sym_t'(k);
          v.ped   = ($urandom_range(0, 7) == 0) ? PED_MAX : ped_t'($urandom_range(0, 40));
          if (!best.valid || v.ped < best.ped) begin
            best = v;
            cnt  = 1;
          end else if (v.ped == best.ped) cnt++;
          for (int u = 0; u < int'(NTAP); u++) begin
            if (u == t) tap[u][r] = v;
            else begin
              tap[u][r]       = v;
              tap[u][r].ped   = '0;
              tap[u][r].mt    = mt_t'(t + 2);
              tap[u][r].s[2]  = sym_t'(u);
            end
          end
        end
      end
      if (cnt > 1) n_ties++;
      best.first = 1'b0;
      best.last  = 1'b0;
      exp_res[cyc + LAT] = best;
      if ($urandom_range(0, 2) == 0) begin
        @(negedge clk);
        for (int u = 0; u < int'(NTAP); u++)
          for (int r = 0; r < int'(WQ); r++) tap[u][r] = '0;
        repeat ($urandom_range(0, 10)) @(negedge clk);
      end
    end
    @(negedge clk);
    for (int u = 0; u < int'(NTAP); u++)
      for (int r = 0; r < int'(WQ); r++) tap[u][r] = '0;
    repeat (LAT + 5) @(negedge clk);
    checks++;
    if (n_ties == 0) begin
      failures++;
      $display("FAIL: no ties exercised");
    end
    done = 1'b1;
  end

  always @(negedge clk) begin
    if (rst_n && !done) begin
      if (exp_res.exists(cyc)) begin
        checks++;
        if (result != exp_res[cyc]) begin
          failures++;
          if (failures < 10)
            $display("FAIL: cycle %0d got ped %0d row %0d cyc %0d, expected ped %0d row %0d cyc %0d",
                     cyc, result.ped, result.s[0], result.s[1],
                     exp_res[cyc].ped, exp_res[cyc].s[0], exp_res[cyc].s[1]);
        end
      end else if (result.valid) begin
        checks++;
        failures++;
        $display("FAIL: unexpected result in cycle %0d", cyc);
      end
    end
  end

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N * 25 + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
