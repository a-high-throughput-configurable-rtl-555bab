// tb_fs_mrvd: checks the M-RVD block by its defining property: for random
// complex H, s and the mapped real H_hat, s_hat, the real product
// H_hat * s_hat must equal (Re, Im) of the complex product H s, row by row
// in the interleaved order, and y_hat must interleave Re/Im of y. Also
// checks the saturated negation of -2^15 and the 1-cycle latency.
module tb_fs_mrvd;
  import fs_pkg::*;

  localparam int MT = MT_MAX, MR = MT_MAX;
  localparam int N = 500;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  coef_t [MR-1:0][MT-1:0]     h_re, h_im;
  coef_t [MR-1:0]             y_re, y_im;
  coef_t [2*MR-1:0][2*MT-1:0] h_hat;
  coef_t [2*MR-1:0]           y_hat;
  fs_mrvd dut (.clk, .rst_n, .h_re, .h_im, .y_re, .y_im, .h_hat, .y_hat);

  int checks = 0, failures = 0;

  initial begin
    h_re = '0; h_im = '0; y_re = '0; y_im = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < N; n++) begin
      int sr [MT], si [MT];
      @(negedge clk);
      for (int r = 0; r < MR; r++) begin
        y_re[r] = coef_t'($urandom);
        y_im[r] = coef_t'($urandom);
        for (int c = 0; c < MT; c++) begin
          h_re[r][c] = coef_t'(int'($urandom_range(0, 4095)) - 2048);
          h_im[r][c] = (n == 7 && r == 0 && c == 0) ? coef_t'(16'sh8000)
                     : coef_t'(int'($urandom_range(0, 4095)) - 2048);
        end
      end
      for (int c = 0; c < MT; c++) begin
        sr[c] = 2 * int'($urandom_range(0, 7)) - 7;
        si[c] = 2 * int'($urandom_range(0, 7)) - 7;
      end
      @(negedge clk);   // outputs of the inputs set one cycle ago
      for (int r = 0; r < MR; r++) begin
        longint cre, cim, rre, rim;
        cre = 0; cim = 0; rre = 0; rim = 0;
        for (int c = 0; c < MT; c++) begin
          cre += longint'(h_re[r][c]) * sr[c] - longint'(h_im[r][c]) * si[c];
          cim += longint'(h_im[r][c]) * sr[c] + longint'(h_re[r][c]) * si[c];
          rre += longint'(h_hat[2*r][2*c]) * sr[c] + longint'(h_hat[2*r][2*c+1]) * si[c];
          rim += longint'(h_hat[2*r+1][2*c]) * sr[c] + longint'(h_hat[2*r+1][2*c+1]) * si[c];
        end
        checks++;
        if (n == 7 && r == 0) begin
          if (h_hat[0][1] != coef_t'(16'sh7fff)) begin
            failures++;
            $display("FAIL: -(-2^15) not saturated: %0d", h_hat[0][1]);
          end
        end else if (rre != cre || rim != cim) begin
          failures++;
          if (failures < 10) $display("FAIL: row %0d real %0d/%0d imag %0d/%0d", r, rre, cre, rim, cim);
        end
        checks++;
        if (y_hat[2*r] != y_re[r] || y_hat[2*r+1] != y_im[r]) begin
          failures++;
          $display("FAIL: y order row %0d", r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * N + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
