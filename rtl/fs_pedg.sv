// fs_pedg: general PED block (PED_g) of one detector row.
//
// For one parent node at tree level i+1 it expands only the Schnorr-Euchner
// (closest) child at level i = LEVEL, instead of sorting all children:
//   b_{i+1} = y'_i - sum_{j>i} R_{i,j} s_j          (undecided s_j are 0)
//   b       = (1/R_ii) * b_{i+1}                      (fixed point, truncated)
//   s_i     = g(2*round((b+1)/2) - 1)                 (fs_se_slicer)
//   T_i     = T_{i+1} + |b_{i+1} - R_ii s_i|          (l1 norm, saturating)
// The reciprocal 1/R_ii arrives with the level's coefficients from the
// channel pre-processing. b is saturated to +-(2^(IW-2)-1) before it is
// sliced, so a large value still clamps to the right constellation edge.
//
// Timing: fully pipelined, one node per cycle (a row takes the FOLD = 8
// nodes of a job in 8 consecutive cycles). The arithmetic takes 10
// registers (input, products, sum, scaling, 5 slicer stages, PED update);
// a delay line pads the block to LAT = 22 cycles, the PED_g latency of the
// reference design. node_in and coef_in must belong together in the same
// cycle; node_out is the same node with s_i filled in and T_i updated.
module fs_pedg
  import fs_pkg::*;
#(
  parameter int unsigned LEVEL = M - 2,  // tree level i this block computes
  parameter int unsigned LAT   = 22      // cycles from node_in to node_out
) (
  input  logic      clk,
  input  logic      rst_n,
  input  node_t     node_in,
  input  lvl_coef_t coef_in,
  output node_t     node_out
);
  localparam int unsigned CORE = 10;
  localparam int unsigned DI   = LEVEL - 1;   // index of level i in s / r
  localparam int unsigned SLAT = 5;           // fs_se_slicer latency

  // stage 0: input register
  node_t     n0;
  lvl_coef_t c0;
  // stage 1: products R_ij * s_j
  node_t     n1;
  acc_t      p1 [M];
  coef_t     y1, rinv1, rii1;
  qmax_t     q1;
  // stage 2: b_{i+1}
  node_t     n2;
  acc_t      b2;
  coef_t     rinv2, rii2;
  qmax_t     q2;
  // stage 3: scaled b
  node_t     n3;
  acc_t      b3, bs3;
  coef_t     rii3;
  qmax_t     q3;

  logic signed [IW+DW-1:0] prod2;
  logic signed [IW+DW-1:0] prod_sh;
  acc_t                    bs_sat;
  // limit keeps the slicer's "+1" and "x2" steps inside the word
  localparam logic signed [IW+DW-1:0] ACC_MAX = (IW+DW)'(2**(IW-2) - 1);
  localparam logic signed [IW+DW-1:0] ACC_MIN = -ACC_MAX;

  always_comb begin
    prod2   = $signed({{DW{b2[IW-1]}}, b2}) * $signed({{IW{rinv2[DW-1]}}, rinv2});
    prod_sh = prod2 >>> FRAC;
    if (prod_sh > ACC_MAX)      bs_sat = acc_t'(ACC_MAX);
    else if (prod_sh < ACC_MIN) bs_sat = acc_t'(ACC_MIN);
    else                        bs_sat = acc_t'(prod_sh);
  end

  acc_t b1_d;
  always_comb begin
    b1_d = acc_t'(y1);
    for (int j = 0; j < int'(M); j++) b1_d -= p1[j];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n0 <= '0; n1 <= '0; n2 <= '0; n3 <= '0;
      c0 <= '0;
      for (int j = 0; j < int'(M); j++) p1[j] <= '0;
      y1 <= '0; rinv1 <= '0; rii1 <= '0; q1 <= '0;
      b2 <= '0; rinv2 <= '0; rii2 <= '0; q2 <= '0;
      b3 <= '0; bs3 <= '0; rii3 <= '0; q3 <= '0;
    end else begin
      n0 <= node_in;
      c0 <= coef_in;
      n1 <= n0;
      for (int j = 0; j < int'(M); j++) begin
        // only the decided levels above i contribute
        p1[j] <= (j > int'(DI)) ? acc_t'(c0.r[j]) * acc_t'(n0.s[j]) : '0;
      end
      y1 <= c0.y; rinv1 <= c0.rinv; rii1 <= c0.r[DI]; q1 <= c0.q;
      n2 <= n1;
      b2 <= b1_d;
      rinv2 <= rinv1; rii2 <= rii1; q2 <= q1;
      n3 <= n2; b3 <= b2; bs3 <= bs_sat; rii3 <= rii2; q3 <= q2;
    end
  end

  // slicer, stages 4..8
  sym_t s_hat;
  fs_se_slicer u_slicer (
    .clk, .rst_n, .b(bs3), .q(q3), .s(s_hat)
  );

  // node, b_{i+1} and R_ii travel alongside the slicer
  localparam int unsigned SBW = $bits(node_t) + IW + DW;
  logic [SBW-1:0] side_d, side_q;
  node_t n8;
  acc_t  b8;
  coef_t rii8;
  assign side_d = {n3, b3, rii3};
  fs_delay #(.W(SBW), .DEPTH(SLAT)) u_side (.clk, .rst_n, .d(side_d), .q(side_q));
  assign {n8, b8, rii8} = side_q;

  // stage 9: residual and PED update
  acc_t  e8;
  node_t n9_d, n9;
  always_comb begin
    e8         = b8 - acc_t'(rii8) * acc_t'(s_hat);
    n9_d       = n8;
    n9_d.s[DI] = s_hat;
    n9_d.ped   = ped_add(n8.ped, abs_ped(e8));
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) n9 <= '0;
    else        n9 <= n9_d;
  end

  // pad to the block latency
  logic [$bits(node_t)-1:0] pad_q;
  fs_delay #(.W($bits(node_t)), .DEPTH(LAT - CORE)) u_pad (
    .clk, .rst_n, .d(n9), .q(pad_q)
  );
  assign node_out = node_t'(pad_q);

  initial begin
    assert (LAT >= CORE) else $error("fs_pedg: LAT below pipeline depth");
    assert (LEVEL >= 1 && LEVEL <= M) else $error("fs_pedg: LEVEL out of range");
  end
endmodule
