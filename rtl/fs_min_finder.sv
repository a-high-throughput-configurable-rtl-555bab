// fs_min_finder: Min_Finder with its input multiplexers.
//
// The number of streams M_T sets how many tree levels a job needs, so the
// last level differs: level 5, 3 or 1 for M_T = 2, 3 or 4. Each of the WQ
// row inputs therefore has a multiplexer over NTAP taps (tap t is the output
// of the PED_g stage computing level M - 2*(t+1) - 1 and serves M_T = t+2);
// a tap is taken when its node is valid and belongs to a job with that M_T.
// The issue control upstream guarantees that at most one tap carries final
// nodes in a cycle (an assertion checks it).
//
// Each cycle a 3-level compare-select tree picks the smallest PED of the 8
// rows; over the FOLD = 8 cycles of a job (flags first/last) a running
// minimum keeps the best, so the minimum of all 64 final PEDs is found.
// Ties keep the lower row and the earlier cycle. The winning node (symbols
// of all levels, its PED, the job tag and M_T) leaves LAT = 8 cycles after
// the job's last node entered (the Min_Finder latency of the reference
// design); the tree and the accumulator take 4 registers, a delay line the
// rest.
module fs_min_finder
  import fs_pkg::*;
#(
  parameter int unsigned LAT = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  node_t tap [NTAP][WQ],
  output node_t result
);
  localparam int unsigned CORE = 4;

  // input multiplexers
  node_t sel [WQ];
  always_comb begin
    for (int r = 0; r < int'(WQ); r++) begin
      sel[r] = '0;
      for (int t = 0; t < int'(NTAP); t++)
        if (tap[t][r].valid && tap[t][r].mt == mt_t'(t + 2)) sel[r] = tap[t][r];
    end
  end

  function automatic node_t pick(input node_t a, input node_t b);
    if (!b.valid)       return a;
    if (!a.valid)       return b;
    return (b.ped < a.ped) ? b : a;
  endfunction

  node_t l1 [WQ/2];
  node_t l2 [WQ/4];
  node_t l3;
  node_t acc, res;

  node_t best;
  assign best = l3.first ? l3 : pick(acc, l3);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(WQ/2); k++) l1[k] <= '0;
      for (int k = 0; k < int'(WQ/4); k++) l2[k] <= '0;
      l3 <= '0; acc <= '0; res <= '0;
    end else begin
      for (int k = 0; k < int'(WQ/2); k++) l1[k] <= pick(sel[2*k], sel[2*k+1]);
      for (int k = 0; k < int'(WQ/4); k++) l2[k] <= pick(l1[2*k], l1[2*k+1]);
      l3 <= pick(l2[0], l2[1]);
      res <= '0;
      if (l3.valid) begin
        acc  <= best;
        if (l3.last) begin
          res       <= best;
          res.first <= 1'b0;
          res.last  <= 1'b0;
        end
      end
    end
  end

  logic [$bits(node_t)-1:0] pad_q;
  fs_delay #(.W($bits(node_t)), .DEPTH(LAT - CORE)) u_pad (
    .clk, .rst_n, .d(res), .q(pad_q)
  );
  assign result = node_t'(pad_q);

  initial assert (LAT >= CORE && WQ == 8) else $error("fs_min_finder: bad parameters");

  // only one tap may deliver final nodes in a cycle
  for (genvar r = 0; r < int'(WQ); r++) begin : g_chk
    logic [NTAP-1:0] hit;
    for (genvar t = 0; t < int'(NTAP); t++) begin : g_t
      assign hit[t] = tap[t][r].valid && tap[t][r].mt == mt_t'(t + 2);
    end
    assert property (@(posedge clk) disable iff (!rst_n) $onehot0(hit))
      else $error("fs_min_finder: taps collide in row %0d", r);
  end
endmodule
