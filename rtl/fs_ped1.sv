// fs_ped1: PED block of the root level (PED_1), level i = M.
//
// Fully expands the first real-valued level: for each of the WQ = 8
// candidates s_M in {-7,...,7} it computes T_M = |y'_M - R_MM s_M| (the
// partial distance above the root is zero). Candidates outside the level's
// modulation (|s_M| > q(M)) get the PED PED_MAX so the Min_Finder discards
// them later. Output c (0..7) is the child with s_M = 2c-7; it feeds row c
// of the detector.
//
// Timing: pipelined, a new root node every cycle if wanted; all 8 children
// appear together LAT = 7 cycles after the root (the PED_1 latency of the
// reference design). The arithmetic uses 3 registers, a delay line pads
// the rest. node_in carries the job tag and M_T; coef_in holds row M of R,
// y'_M and q(M) for the same job; its 1/R_ii field is not used, as a fully
// expanded level needs no slicing.
module fs_ped1
  import fs_pkg::*;
#(
  parameter int unsigned LAT = 7
) (
  input  logic      clk,
  input  logic      rst_n,
  input  node_t     node_in,
  input  lvl_coef_t coef_in,
  output node_t     node_out [WQ]
);
  localparam int unsigned CORE = 3;
  localparam int unsigned DI   = M - 1;

  node_t n0;
  coef_t y0, rii0;
  qmax_t q0;
  node_t n1;
  acc_t  e1 [WQ];
  qmax_t q1;
  node_t c2 [WQ];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n0 <= '0; y0 <= '0; rii0 <= '0; q0 <= '0;
      n1 <= '0; q1 <= '0;
      for (int c = 0; c < int'(WQ); c++) begin
        e1[c] <= '0;
        c2[c] <= '0;
      end
    end else begin
      n0 <= node_in; y0 <= coef_in.y; rii0 <= coef_in.r[DI]; q0 <= coef_in.q;
      n1 <= n0; q1 <= q0;
      for (int c = 0; c < int'(WQ); c++) begin
        e1[c] <= acc_t'(y0) - acc_t'(rii0) * acc_t'(cand(c));
        c2[c]       <= n1;
        c2[c].first <= 1'b0;
        c2[c].last  <= 1'b0;
        c2[c].s[DI] <= cand(c);
        c2[c].ped   <= out_of_range(cand(c), q1) ? PED_MAX : abs_ped(e1[c]);
      end
    end
  end

  for (genvar c = 0; c < int'(WQ); c++) begin : g_pad
    logic [$bits(node_t)-1:0] pad_q;
    fs_delay #(.W($bits(node_t)), .DEPTH(LAT - CORE)) u_pad (
      .clk, .rst_n, .d(c2[c]), .q(pad_q)
    );
    assign node_out[c] = node_t'(pad_q);
  end

  initial assert (LAT >= CORE) else $error("fs_ped1: LAT below pipeline depth");
endmodule
