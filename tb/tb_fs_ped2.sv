// tb_fs_ped2: checks one PED_2 row. Random parents (symbol of level M, PED
// including the maximum) arrive every 8 to 11 cycles; the 8 children must
// leave one per cycle, child c at 17 + c cycles after its parent, with
//   T = T_parent + |y'_{M-1} - R_{M-1,M} s_M - R_{M-1,M-1} (2c-7)|,
// out-of-range children and children of a discarded parent at the maximum
// PED, and the first/last flags on children 0 and 7. Coefficients of the
// lower part of the row are random and must be ignored.
module tb_fs_ped2;
  import fs_pkg::*;
  import fs_ref_pkg::*;

  localparam int LAT = 17;
  localparam int N = 150;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  node_t     node_in;
  lvl_coef_t coef_in;
  node_t     node_out;
  fs_ped2 dut (.clk, .rst_n, .node_in, .coef_in, .node_out);

  int     checks = 0, failures = 0;
  longint cyc = 0;
  longint exp_ped [longint];
  int     exp_s7  [longint];
  int     exp_s8  [longint];
  int     exp_c   [longint];
  bit     done = 1'b0;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    node_in = '0; coef_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < N; n++) begin
      int     q, y, r78, r77, s8;
      longint tp, b;
      @(negedge clk);
      case ($urandom_range(0, 2)) 0: q = 1; 1: q = 3; default: q = 7; endcase
      y   = int'($urandom_range(0, 20000)) - 10000;
      r78 = int'($urandom_range(0, 511)) - 256;
      r77 = int'($urandom_range(64, 1023));
      s8  = 2 * int'($urandom_range(0, 7)) - 7;
      tp  = ($urandom_range(0, 9) == 0) ? PEDMAX : longint'($urandom_range(0, 50000));
      node_in       = '0;
      node_in.valid = 1'b1;
      node_in.tag   = TAGW'(n);
      node_in.mt    = mt_t'(4);
      node_in.s[M-1] = sym_t'(s8);
      node_in.ped   = ped_t'(tp);
      coef_in       = '0;
      for (int j = 0; j < int'(M) - 2; j++) coef_in.r[j] = coef_t'($urandom);
      coef_in.r[M-1] = coef_t'(r78);
      coef_in.r[M-2] = coef_t'(r77);
      coef_in.y     = coef_t'(y);
      coef_in.rinv  = coef_t'($urandom);
      coef_in.q     = qmax_t'(q);
      b = longint'(y) - longint'(r78) * s8;
      for (int c = 0; c < int'(WQ); c++) begin
        int sv;
        sv = 2 * c - 7;
        exp_ped[cyc + LAT + c] = (sv > q || sv < -q || tp == PEDMAX) ? PEDMAX
                                 : sat_ped(tp + labs(b - longint'(r77) * sv));
        exp_s7[cyc + LAT + c] = sv;
        exp_s8[cyc + LAT + c] = s8;
        exp_c[cyc + LAT + c]  = c;
      end
      @(negedge clk);
      node_in = '0;
      repeat (6 + $urandom_range(0, 3)) @(negedge clk);
    end
    repeat (LAT + 10) @(negedge clk);
    done = 1'b1;
  end

  always @(negedge clk) begin
    if (rst_n && !done) begin
      if (exp_ped.exists(cyc)) begin
        checks++;
        if (!node_out.valid || longint'(node_out.ped) != exp_ped[cyc]
            || int'(node_out.s[M-2]) != exp_s7[cyc] || int'(node_out.s[M-1]) != exp_s8[cyc]
            || node_out.first != (exp_c[cyc] == 0) || node_out.last != (exp_c[cyc] == 7)) begin
          failures++;
          if (failures < 10)
            $display("FAIL: cycle %0d ped %0d expected %0d", cyc, node_out.ped, exp_ped[cyc]);
        end
      end else if (node_out.valid) begin
        checks++;
        failures++;
        $display("FAIL: unexpected output in cycle %0d", cyc);
      end
    end
  end

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N * 12 + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
