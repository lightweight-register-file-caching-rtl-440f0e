// Cache-aware issue scheduler.
//
// Each cycle it picks one warp to issue an instruction from. warp_rdy says
// which warps have an instruction ready (decoded, scoreboard clear); that
// logic sits outside this block. Warps are split into two classes: warps
// that own a CCU, so their registers may be cached, and all others. The
// first class always wins; within a class the oldest warp wins. Warp age is
// the launch order, taken here as the warp number (warp 0 oldest). A warp
// whose CCU still holds an undispatched instruction cannot issue (its next
// instruction must go to that same CCU), so it is left out of the choice.
// Purely combinational; sel_cached tells which class the pick came from.
//
// Follows the design description: two classes, no limit on the number of
// candidate warps, oldest first in each class. This design's choices: age
// by warp number and leaving out warps whose CCU is busy.
module issue_scheduler
  import malekeh_pkg::*;
#(
  parameter int unsigned N_WARPS = malekeh_pkg::NUM_WARPS,
  parameter int unsigned N_CCU   = malekeh_pkg::NUM_CCU
) (
  input  logic [N_WARPS-1:0]    warp_rdy,
  input  rport_t [N_CCU-1:0]    rport,
  output logic                  sel_valid,
  output warp_t                 sel_warp,
  output logic                  sel_cached
);

  logic [N_WARPS-1:0] owns, blocked, elig;

  always_comb begin
    owns = '0;
    blocked = '0;
    for (int c = 0; c < N_CCU; c++)
      if (rport[c].owned) begin
        owns[rport[c].warp] = 1'b1;
        if (rport[c].busy) blocked[rport[c].warp] = 1'b1;
      end
    elig = warp_rdy & ~blocked;

    sel_valid = 1'b0;
    sel_warp = '0;
    sel_cached = 1'b0;
    for (int w = N_WARPS - 1; w >= 0; w--)
      if (elig[w] && !owns[w]) begin
        sel_valid = 1'b1; sel_warp = warp_t'(w);
      end
    for (int w = N_WARPS - 1; w >= 0; w--)
      if (elig[w] && owns[w]) begin
        sel_valid = 1'b1; sel_warp = warp_t'(w); sel_cached = 1'b1;
      end
  end

endmodule
