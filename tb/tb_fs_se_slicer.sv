// tb_fs_se_slicer: checks the Schnorr-Euchner slicer against a brute-force
// search for the closest odd value in [-q, q] (ties to the larger value),
// for random inputs, exact ties and large values, one input per cycle,
// and checks the 5-cycle latency.
module tb_fs_se_slicer;
  import fs_pkg::*;
  import fs_ref_pkg::*;

  localparam int LAT = 5;
  localparam int N = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  acc_t  b;
  qmax_t q;
  sym_t  s;
  fs_se_slicer dut (.clk, .rst_n, .b, .q, .s);

  int checks = 0, failures = 0;
  longint hb [N];
  int     hq [N];

  initial begin
    b = '0; q = qmax_t'(1);
    for (int n = 0; n < N; n++) begin
      int qv;
      case ($urandom_range(0, 2)) 0: qv = 1; 1: qv = 3; default: qv = 7; endcase
      hq[n] = qv;
      case ($urandom_range(0, 3))
        0: hb[n] = longint'(int'($urandom_range(0, 16)) - 8) <<< FRAC;        // exact integers, ties
        1: hb[n] = longint'(int'($urandom_range(0, 1 << 20)) - (1 << 19));    // far outside
        default: hb[n] = longint'(int'($urandom_range(0, 5120)) - 2560);     // -10..10
      endcase
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < N + LAT; n++) begin
      @(negedge clk);
      if (n < N) begin
        b = acc_t'(hb[n]);
        q = qmax_t'(hq[n]);
      end
      if (n >= LAT) begin
        int e;
        e = ref_slice(hb[n-LAT], hq[n-LAT]);
        checks++;
        if (int'(s) != e) begin
          failures++;
          if (failures < 10)
            $display("FAIL: b=%0d q=%0d got %0d expected %0d", hb[n-LAT], hq[n-LAT], s, e);
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
