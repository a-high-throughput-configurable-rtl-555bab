// tb_fs_pedg: checks a PED_g block (level M-2, the first general level)
// with one random node per cycle: decided symbols of the levels above,
// random channel row, reciprocal of the diagonal (matching or not) and
// modulation. The output node must carry the closest allowed symbol of
// the level (brute force in fs_ref_pkg) and the accumulated l1 PED, 22
// cycles after the input. Levels at and below the block's own level are
// filled with junk that must not affect the result.
module tb_fs_pedg;
  import fs_pkg::*;
  import fs_ref_pkg::*;

  localparam int LAT = 22;
  localparam int LVL = M - 2;
  localparam int N = 2000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  node_t     node_in;
  lvl_coef_t coef_in;
  node_t     node_out;
  fs_pedg dut (.clk, .rst_n, .node_in, .coef_in, .node_out);

  int     checks = 0, failures = 0;
  node_t  hn [N];
  node_t  en [N];

  initial begin
    node_in = '0; coef_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < N + LAT; n++) begin
      @(negedge clk);
      node_in = '0;
      coef_in = '0;
      if (n < N) begin
        int        q, sc;
        longint    b, bs, tp;
        lvl_coef_t c;
        node_t     v;
        case ($urandom_range(0, 2)) 0: q = 1; 1: q = 3; default: q = 7; endcase
        v       = '0;
        v.valid = 1'b1;
        v.tag   = TAGW'($urandom);
        v.mt    = mt_t'(4);
        for (int j = 0; j < int'(M); j++) v.s[j] = sym_t'(2 * int'($urandom_range(0, 7)) - 7);
        tp      = ($urandom_range(0, 19) == 0) ? PEDMAX : longint'($urandom_range(0, 100000));
        v.ped   = ped_t'(tp);
        c       = '0;
        for (int j = 0; j < int'(M); j++) c.r[j] = coef_t'(int'($urandom_range(0, 511)) - 256);
        c.r[LVL-1] = coef_t'($urandom_range(64, 1023));
        c.rinv  = ($urandom_range(0, 3) == 0) ? coef_t'($urandom)
                : coef_t'((65536 + int'(c.r[LVL-1]) / 2) / int'(c.r[LVL-1]));
        c.y     = coef_t'(int'($urandom_range(0, 30000)) - 15000);
        c.q     = qmax_t'(q);
        // reference
        b = longint'(c.y);
        for (int j = LVL; j < int'(M); j++) b -= longint'(c.r[j]) * longint'(v.s[j]);
        bs = ref_scale(b, int'(c.rinv));
        sc = ref_slice(bs, q);
        en[n] = v;
        en[n].s[LVL-1] = sym_t'(sc);
        en[n].ped = ped_t'(sat_ped(tp + labs(b - longint'(c.r[LVL-1]) * sc)));
        hn[n]   = v;
        node_in = v;
        coef_in = c;
      end
      if (n >= LAT) begin
        checks++;
        if (node_out != en[n-LAT]) begin
          failures++;
          if (failures < 10)
            $display("FAIL: node %0d s=%0d ped=%0d expected s=%0d ped=%0d", n - LAT,
                     node_out.s[LVL-1], node_out.ped, en[n-LAT].s[LVL-1], en[n-LAT].ped);
        end
      end else begin
        checks++;
        if (node_out.valid) begin
          failures++;
          $display("FAIL: output before the latency");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
