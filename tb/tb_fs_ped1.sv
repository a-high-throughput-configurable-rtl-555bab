// tb_fs_ped1: checks PED_1 (root level) against the l1 distance
// |y'_M - R_MM s| of every candidate, with out-of-range candidates at the
// maximum PED, for random coefficients and modulations, one root per
// cycle, and checks the 7-cycle latency and that tag and M_T pass through.
module tb_fs_ped1;
  import fs_pkg::*;
  import fs_ref_pkg::*;

  localparam int LAT = 7;
  localparam int N = 400;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  node_t     node_in;
  lvl_coef_t coef_in;
  node_t     node_out [WQ];
  fs_ped1 dut (.clk, .rst_n, .node_in, .coef_in, .node_out);

  int checks = 0, failures = 0;
  int hy [N], hr [N], hq [N], htag [N];

  initial begin
    node_in = '0; coef_in = '0;
    for (int n = 0; n < N; n++) begin
      case ($urandom_range(0, 2)) 0: hq[n] = 1; 1: hq[n] = 3; default: hq[n] = 7; endcase
      hy[n] = int'($urandom_range(0, 20000)) - 10000;
      hr[n] = int'($urandom_range(64, 1023));
      htag[n] = int'($urandom_range(0, NCTX - 1));
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < N + LAT; n++) begin
      @(negedge clk);
      node_in = '0;
      coef_in = '0;
      if (n < N) begin
        node_in.valid = 1'b1;
        node_in.tag   = TAGW'(htag[n]);
        node_in.mt    = mt_t'(2 + n % 3);
        coef_in.y     = coef_t'(hy[n]);
        coef_in.r[M-1] = coef_t'(hr[n]);
        coef_in.q     = qmax_t'(hq[n]);
      end
      if (n >= LAT) begin
        int k;
        k = n - LAT;
        for (int c = 0; c < int'(WQ); c++) begin
          int     sv;
          longint e;
          sv = 2 * c - 7;
          e  = (sv > hq[k] || sv < -hq[k]) ? PEDMAX : labs(longint'(hy[k]) - longint'(hr[k]) * sv);
          checks++;
          if (!node_out[c].valid || longint'(node_out[c].ped) != e || int'(node_out[c].s[M-1]) != sv
              || int'(node_out[c].tag) != htag[k] || int'(node_out[c].mt) != 2 + k % 3) begin
            failures++;
            if (failures < 10)
              $display("FAIL: root %0d child %0d ped %0d expected %0d", k, c, node_out[c].ped, e);
          end
        end
      end else begin
        checks++;
        if (node_out[0].valid) begin
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
