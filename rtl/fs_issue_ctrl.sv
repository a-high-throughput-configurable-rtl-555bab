// fs_issue_ctrl: admission control of new detection jobs.
//
// Two rules decide in_ready:
//  * folding: each detector row handles the FOLD = 8 nodes of a job in 8
//    consecutive cycles, so jobs are accepted at most once every FOLD cycles;
//  * Min_Finder slots: a job with M_T streams delivers its final nodes to the
//    Min_Finder during FOLD cycles starting OFF(M_T) cycles after it is
//    accepted. Because OFF grows with M_T, a job with fewer streams accepted
//    after one with more can reach the Min_Finder at the same time. A
//    reservation vector (bit d = Min_Finder input busy d cycles from now)
//    records the slots of the jobs in flight; a job whose slots are taken
//    waits (a stall). Jobs with fewer streams may thus finish before older
//    ones, which is why results carry a job id.
// OFF(M_T) = 1 + LAT_PED1 + LAT_PED2 + 2*(M_T-1)*LAT_PEDG (input register,
// PED_1, PED_2 and the PED_g stages the job passes).
// The handshake is valid/ready: a job is taken in a cycle with
// in_valid && in_ready, signalled by `accept`.
module fs_issue_ctrl
  import fs_pkg::*;
#(
  parameter int unsigned LAT_PED1 = 7,
  parameter int unsigned LAT_PED2 = 17,
  parameter int unsigned LAT_PEDG = 22
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  mt_t  in_mt,
  output logic in_ready,
  output logic accept
);
  localparam int unsigned OFF_MIN = 1 + LAT_PED1 + LAT_PED2 + 2 * LAT_PEDG;
  localparam int unsigned OFF_MAX = 1 + LAT_PED1 + LAT_PED2 + 2 * (MT_MAX - 1) * LAT_PEDG;
  localparam int unsigned RLEN    = OFF_MAX + FOLD;
  localparam int unsigned GW      = $clog2(FOLD + 1);

  logic [RLEN-1:0] busy;
  logic [GW-1:0]   gap;      // cycles since the last accept, saturating at FOLD
  logic [RLEN-1:0] want;     // slots the offered job needs
  int unsigned     off;

  always_comb begin
    off  = 1 + LAT_PED1 + LAT_PED2 + 2 * (int'(in_mt) - 1) * LAT_PEDG;
    want = '0;
    for (int d = 0; d < int'(RLEN); d++)
      want[d] = (d >= int'(off)) && (d < int'(off + FOLD));
  end

  assign in_ready = (gap == GW'(FOLD)) && ((busy & want) == '0);
  assign accept   = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= '0;
      gap  <= GW'(FOLD);
    end else begin
      busy <= (busy | (accept ? want : '0)) >> 1;
      if (accept)               gap <= GW'(1);
      else if (gap != GW'(FOLD)) gap <= gap + GW'(1);
    end
  end

  initial assert (OFF_MIN > FOLD) else $error("fs_issue_ctrl: pipeline too short");

  assert property (@(posedge clk) disable iff (!rst_n)
                   in_valid |-> (in_mt >= mt_t'(2) && in_mt <= mt_t'(MT_MAX)))
    else $error("fs_issue_ctrl: M_T must be 2..%0d", MT_MAX);
endmodule
