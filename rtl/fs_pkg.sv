// fs_pkg: types and constants shared by the Flex-Sphere detector.
//
// The detector works on the real-valued (M-RVD ordered) model y' = R s + n
// with M = 2*MT_MAX tree levels. A tree level i (1..M) holds one real
// coordinate; level M is the root expansion. Every real coordinate takes one
// of WQ = sqrt(64) = 8 odd values -7..7, the largest modulation (64-QAM) the
// detector is built for; smaller modulations are obtained by clamping to
// q(i) in {1,3,7}.
//
// Fixed point: coefficients (R, 1/R_ii, y') are DW = 16 bit two's complement
// with FRAC fractional bits. The 16-bit word length follows the design's
// reported precision; the binary point position is this design's choice.
// Internal sums use IW bits, partial Euclidean distances (PEDs) are
// unsigned PW-bit values with saturating accumulation (PED_MAX marks a
// discarded candidate). Distances use the l1 norm |e| per level.
package fs_pkg;

  parameter int unsigned MT_MAX = 4;          // largest number of streams
  parameter int unsigned M      = 2 * MT_MAX; // real-valued tree levels
  parameter int unsigned WQ     = 8;          // children per node (64-QAM)
  parameter int unsigned FOLD   = WQ;         // folding factor F
  parameter int unsigned NTAP   = MT_MAX - 1; // M_T = 2,3,4 -> Min_Finder taps
  parameter int unsigned DW     = 16;         // coefficient word length
  parameter int unsigned FRAC   = 8;          // fractional bits
  parameter int unsigned IW     = 26;         // internal word length
  parameter int unsigned PW     = 24;         // PED word length
  parameter int unsigned SW     = 4;          // symbol word length (-7..7)
  parameter int unsigned TAGW   = 5;          // job context tag
  parameter int unsigned NCTX   = 1 << TAGW;  // job contexts in flight
  parameter int unsigned UIDW   = 8;          // user-visible job id

  typedef logic signed [DW-1:0] coef_t;
  typedef logic signed [IW-1:0] acc_t;
  typedef logic signed [SW-1:0] sym_t;
  typedef logic [PW-1:0]        ped_t;
  typedef logic [2:0]           qmax_t;       // q(i): 1, 3 or 7
  typedef logic [2:0]           mt_t;         // M_T: 2, 3 or 4

  localparam ped_t PED_MAX = '1;

  // One tree node travelling through the PED pipeline.
  typedef struct packed {
    logic            valid;
    logic            first;   // first of the FOLD nodes of a job in this row
    logic            last;    // last of them
    logic [TAGW-1:0] tag;     // job context
    mt_t             mt;      // number of streams of the job
    sym_t [M-1:0]    s;       // s[i-1] = symbol of level i, 0 while undecided
    ped_t            ped;     // T_i
  } node_t;

  // Coefficients one tree level needs: row i of R, y'_i, 1/R_ii and q(i).
  typedef struct packed {
    coef_t [M-1:0] r;         // r[j-1] = R_{i,j}
    coef_t         y;
    coef_t         rinv;
    qmax_t         q;
  } lvl_coef_t;

  // Candidate c (0..WQ-1) of a level: the odd value 2c-(WQ-1).
  function automatic sym_t cand(input int unsigned c);
    return sym_t'(2 * int'(c) - int'(WQ) + 1);
  endfunction

  // l1 distance of one level.
  function automatic ped_t abs_ped(input acc_t e);
    acc_t a;
    a = (e < 0) ? -e : e;
    return (a > acc_t'(PED_MAX)) ? PED_MAX : ped_t'(a);
  endfunction

  // Saturating PED accumulation, T_i = T_{i+1} + |e_i|.
  function automatic ped_t ped_add(input ped_t a, input ped_t b);
    logic [PW:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[PW] ? PED_MAX : s[PW-1:0];
  endfunction

  // R_{i,j} * s_j summed over the whole row (undecided symbols are 0).
  function automatic acc_t row_dot(input coef_t [M-1:0] r, input sym_t [M-1:0] s);
    acc_t sum;
    sum = '0;
    for (int j = 0; j < M; j++) sum += acc_t'(r[j]) * acc_t'(s[j]);
    return sum;
  endfunction

  // True when |x| exceeds the modulation's largest real value q.
  function automatic logic out_of_range(input sym_t x, input qmax_t q);
    return (x > $signed({1'b0, q})) || (x < -$signed({1'b0, q}));
  endfunction

endpackage
