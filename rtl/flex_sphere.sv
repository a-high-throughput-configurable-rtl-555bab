// flex_sphere: configurable sort-free sphere detector (Flex-Sphere).
//
// Detects the transmitted vector of an up to 4-stream (multi-user) MIMO
// system from the QR-decomposed, real-valued model y' = R s + n, with
// M = 2*M_T levels in the modified real-valued decomposition order (the
// in-phase and quadrature parts of one complex symbol on two neighbouring
// levels). Instead of the sorting of a K-best search it
//   * fully expands the first two levels (PED_1: 8 nodes, 8 x PED_2: 64
//     nodes), then
//   * follows each of the 64 nodes down by its Schnorr-Euchner (closest)
//     child only (PED_g), and
//   * takes the node with the smallest partial Euclidean distance at the
//     last level (Min_Finder).
//
// Structure: the M-RVD front end (fs_mrvd) maps a complex channel and
// received vector to the real model for the external QR pre-processing,
// whose outputs R, 1/R_ii and y' = Q^H y are the detector's job inputs.
// Detector: input register and job context store -> fs_ped1 -> 8 rows of
// fs_ped2 -> M-2 stages of 8 fs_pedg -> fs_min_finder. Each row handles 8
// nodes per job (folding factor F = 8), one per cycle, so a job is taken
// every 8 cycles at most. Per job, two real-time configuration inputs
// apply: M_T (2, 3 or 4 streams; the Min_Finder then reads level 5, 3 or
// 1) and q(i) per level (1, 3, 7 for 4-, 16-, 64-QAM), so every stream may
// use its own modulation.
//
// Latency from the input cycle to out_valid:
//   8 + LAT_PED1 + LAT_PED2 + 2*(M_T-1)*LAT_PEDG + LAT_MF = 84 / 128 / 172
// for M_T = 2 / 3 / 4 (8 = one input register plus 7 cycles for the 8
// folded nodes of a row). These block latencies are those of the reference
// FPGA design; the arithmetic here is shallower and padded to match.
//
// Design choices of this implementation (not given by the reference):
//   * the job context (R, 1/R_ii, y', q, M_T, id) is kept in a store of
//     NCTX entries addressed by a tag that travels with each node; each
//     stage reads the row of R for its level from there;
//   * valid/ready input handshake; fs_issue_ctrl stalls a job whose
//     Min_Finder slots are taken (possible after an M_T switch from more to
//     fewer streams), and results may then leave out of order, so they
//     carry the job id given at the input;
//   * 1/R_ii comes from the channel pre-processing together with R.
//
// Interface: in_r[i-1][j-1] = R_ij (only j >= i is used), in_y[i-1] = y'_i,
// in_rinv[i-1] = 1/R_ii, in_q[i-1] = q(i), all fs_pkg fixed point. For M_T
// < 4 the system occupies levels M-2*M_T+1 .. M (the lower right corner of
// R). The M-RVD ports carry a 4 x 4 complex system and are independent of
// the job handshake (one register stage). out_s[i-1] is the detected real symbol of level i (0 for levels the
// job does not use) and out_ped its l1 distance.
module flex_sphere
  import fs_pkg::*;
#(
  parameter int unsigned LAT_PED1 = 7,
  parameter int unsigned LAT_PED2 = 17,
  parameter int unsigned LAT_PEDG = 22,
  parameter int unsigned LAT_MF   = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // job input
  input  logic                   in_valid,
  output logic                   in_ready,
  input  coef_t [M-1:0][M-1:0]   in_r,
  input  coef_t [M-1:0]          in_rinv,
  input  coef_t [M-1:0]          in_y,
  input  qmax_t [M-1:0]          in_q,
  input  mt_t                    in_mt,
  input  logic [UIDW-1:0]        in_uid,
  // detected vector
  output logic                   out_valid,
  output logic [UIDW-1:0]        out_uid,
  output mt_t                    out_mt,
  output sym_t [M-1:0]           out_s,
  output ped_t                   out_ped,
  // M-RVD front end: complex channel and received vector in, real model out
  // to the channel pre-processing (QR decomposition), which is external
  input  coef_t [MT_MAX-1:0][MT_MAX-1:0]   in_hc_re,
  input  coef_t [MT_MAX-1:0][MT_MAX-1:0]   in_hc_im,
  input  coef_t [MT_MAX-1:0]               in_yc_re,
  input  coef_t [MT_MAX-1:0]               in_yc_im,
  output coef_t [M-1:0][M-1:0]             out_h_mrvd,
  output coef_t [M-1:0]                    out_y_mrvd
);
  localparam int unsigned NG = M - 2;   // PED_g stages

  // ---------------------------------------------------------------- M-RVD
  fs_mrvd #(.MT(MT_MAX), .MR(MT_MAX)) u_mrvd (
    .clk, .rst_n, .h_re(in_hc_re), .h_im(in_hc_im), .y_re(in_yc_re), .y_im(in_yc_im),
    .h_hat(out_h_mrvd), .y_hat(out_y_mrvd)
  );

  // ---------------------------------------------------------------- issue
  logic accept;
  fs_issue_ctrl #(.LAT_PED1(LAT_PED1), .LAT_PED2(LAT_PED2), .LAT_PEDG(LAT_PEDG)) u_issue (
    .clk, .rst_n, .in_valid, .in_mt, .in_ready, .accept
  );

  // ---------------------------------------------------------- job contexts
  coef_t [M-1:0][M-1:0] ctx_r    [NCTX];
  coef_t [M-1:0]        ctx_rinv [NCTX];
  coef_t [M-1:0]        ctx_y    [NCTX];
  qmax_t [M-1:0]        ctx_q    [NCTX];
  logic [UIDW-1:0]      ctx_uid  [NCTX];
  logic [TAGW-1:0]      wr_tag;
  node_t                root;

  always_ff @(posedge clk) begin
    if (accept) begin
      ctx_r[wr_tag]    <= in_r;
      ctx_rinv[wr_tag] <= in_rinv;
      ctx_y[wr_tag]    <= in_y;
      ctx_q[wr_tag]    <= in_q;
      ctx_uid[wr_tag]  <= in_uid;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_tag <= '0;
      root   <= '0;
    end else begin
      root       <= '0;
      root.valid <= accept;
      root.tag   <= wr_tag;
      root.mt    <= in_mt;
      if (accept) wr_tag <= wr_tag + 1'b1;
    end
  end

  // coefficients of one level for the job with the given tag
  function automatic lvl_coef_t level_coef(input logic [TAGW-1:0] tag, input int unsigned lvl);
    lvl_coef_t c;
    for (int j = 0; j < int'(M); j++)
      c.r[j] = (j >= int'(lvl) - 1) ? ctx_r[tag][lvl-1][j] : '0;
    c.y    = ctx_y[tag][lvl-1];
    c.rinv = ctx_rinv[tag][lvl-1];
    c.q    = ctx_q[tag][lvl-1];
    return c;
  endfunction

  // a node continues below `lvl` only if its job has more levels
  function automatic node_t pass_on(input node_t n, input int unsigned lvl);
    node_t o;
    o       = n;
    o.valid = n.valid && (int'(lvl) > int'(M) - 2 * int'(n.mt) + 1);
    return o;
  endfunction

  // ---------------------------------------------------------------- PED_1
  node_t     ped1_out [WQ];
  lvl_coef_t coef_l1;
  assign coef_l1 = level_coef(root.tag, M);

  fs_ped1 #(.LAT(LAT_PED1)) u_ped1 (
    .clk, .rst_n, .node_in(root), .coef_in(coef_l1), .node_out(ped1_out)
  );

  // ---------------------------------------------------------------- PED_2
  node_t     ped2_out [WQ];
  lvl_coef_t coef_l2;
  assign coef_l2 = level_coef(ped1_out[0].tag, M - 1);

  for (genvar r = 0; r < int'(WQ); r++) begin : g_ped2
    fs_ped2 #(.LEVEL(M - 1), .LAT(LAT_PED2)) u_ped2 (
      .clk, .rst_n, .node_in(ped1_out[r]), .coef_in(coef_l2), .node_out(ped2_out[r])
    );
  end

  // ---------------------------------------------------------------- PED_g
  node_t     g_in  [NG][WQ];
  node_t     g_out [NG][WQ];
  lvl_coef_t coef_g [NG];

  for (genvar k = 0; k < int'(NG); k++) begin : g_stage
    localparam int unsigned LVL = M - 2 - k;
    for (genvar r = 0; r < int'(WQ); r++) begin : g_row
      if (k == 0) begin : g_first
        assign g_in[k][r] = pass_on(ped2_out[r], M - 1);
      end else begin : g_next
        assign g_in[k][r] = pass_on(g_out[k-1][r], LVL + 1);
      end
      fs_pedg #(.LEVEL(LVL), .LAT(LAT_PEDG)) u_pedg (
        .clk, .rst_n, .node_in(g_in[k][r]), .coef_in(coef_g[k]), .node_out(g_out[k][r])
      );
    end
    assign coef_g[k] = level_coef(g_in[k][0].tag, LVL);
  end

  // ----------------------------------------------------------- Min_Finder
  node_t tap [NTAP][WQ];
  node_t result;
  for (genvar t = 0; t < int'(NTAP); t++) begin : g_tap
    for (genvar r = 0; r < int'(WQ); r++) begin : g_row
      assign tap[t][r] = g_out[2*t+1][r];
    end
  end

  fs_min_finder #(.LAT(LAT_MF)) u_mf (
    .clk, .rst_n, .tap, .result
  );

  assign out_valid = result.valid;
  assign out_uid   = ctx_uid[result.tag];
  assign out_mt    = result.mt;
  assign out_s     = result.s;
  assign out_ped   = result.ped;
endmodule
