// fs_ped2: PED block of the second level (PED_2), level i = M-1, one row.
//
// Fully expands one parent node of level M: with
//   b_M = y'_{M-1} - R_{M-1,M} s_M
// it computes, for each of the WQ = 8 candidates s_{M-1} = 2c-7,
//   T_{M-1} = T_M + |b_M - R_{M-1,M-1} s_{M-1}|
// and marks candidates outside the level's modulation with PED_MAX.
//
// Folding: the 8 children are computed in parallel but leave one per cycle
// (child c in cycle c), so every downstream PED_g row handles the FOLD = 8
// nodes of a job in 8 consecutive cycles. The first child is flagged
// `first`, the eighth `last`. Child 0 leaves LAT = 17 cycles after the
// parent (the PED_2 latency of the reference design), child c at LAT + c.
// A new parent may arrive at most once every 8 cycles; an assertion checks
// this. Arithmetic: 4 registers, a 1-stage output shifter, then padding.
// The 1/R_ii field of coef_in is not used (no slicing on this level).
module fs_ped2
  import fs_pkg::*;
#(
  parameter int unsigned LEVEL = M - 1,
  parameter int unsigned LAT   = 17
) (
  input  logic      clk,
  input  logic      rst_n,
  input  node_t     node_in,
  input  lvl_coef_t coef_in,
  output node_t     node_out
);
  localparam int unsigned CORE = 5;
  localparam int unsigned DI   = LEVEL - 1;

  node_t     n0;
  lvl_coef_t c0;
  node_t     n1;
  acc_t      b1;
  coef_t     rii1;
  qmax_t     q1;
  node_t     n2;
  acc_t      e2 [WQ];
  qmax_t     q2;
  node_t     ch3 [WQ];
  node_t     sh [WQ];

  // b_{i+1}: the diagonal and the lower part of the row do not count
  acc_t b0_d;
  always_comb begin
    b0_d = acc_t'(c0.y);
    for (int j = int'(DI) + 1; j < int'(M); j++)
      b0_d -= acc_t'(c0.r[j]) * acc_t'(n0.s[j]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n0 <= '0; c0 <= '0;
      n1 <= '0; b1 <= '0; rii1 <= '0; q1 <= '0;
      n2 <= '0; q2 <= '0;
      for (int c = 0; c < int'(WQ); c++) begin
        e2[c] <= '0; ch3[c] <= '0; sh[c] <= '0;
      end
    end else begin
      n0 <= node_in;
      c0 <= coef_in;
      b1 <= b0_d;
      n1 <= n0; rii1 <= c0.r[DI]; q1 <= c0.q;
      for (int c = 0; c < int'(WQ); c++)
        e2[c] <= b1 - acc_t'(rii1) * acc_t'(cand(c));
      n2 <= n1; q2 <= q1;
      for (int c = 0; c < int'(WQ); c++) begin
        ch3[c]       <= n2;
        ch3[c].first <= (c == 0);
        ch3[c].last  <= (c == int'(WQ) - 1);
        ch3[c].s[DI] <= cand(c);
        ch3[c].ped   <= out_of_range(cand(c), q2) ? PED_MAX : ped_add(n2.ped, abs_ped(e2[c]));
      end
      // parallel-in, serial-out shifter
      if (ch3[0].valid) begin
        for (int c = 0; c < int'(WQ); c++) sh[c] <= ch3[c];
      end else begin
        for (int c = 0; c < int'(WQ) - 1; c++) sh[c] <= sh[c+1];
        sh[WQ-1] <= '0;
      end
    end
  end

  logic [$bits(node_t)-1:0] pad_q;
  fs_delay #(.W($bits(node_t)), .DEPTH(LAT - CORE)) u_pad (
    .clk, .rst_n, .d(sh[0]), .q(pad_q)
  );
  assign node_out = node_t'(pad_q);

  initial assert (LAT >= CORE) else $error("fs_ped2: LAT below pipeline depth");

  // a new set of children may only be loaded once the previous set is out
  assert property (@(posedge clk) disable iff (!rst_n)
                   ch3[0].valid |-> !sh[1].valid)
    else $error("fs_ped2: parent nodes closer than FOLD cycles");
endmodule
