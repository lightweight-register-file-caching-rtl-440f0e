// CCU allocator with STHLD-limited waiting.
//
// For the warp chosen by the issue scheduler it finds the target CCU:
//   1. the CCU the warp already owns, if that CCU is free (dispatched);
//      if it is busy the issue stalls;
//   2. otherwise a free CCU that holds no near value (empty, or only far
//      reuse hints): it is taken and its cache table is flushed;
//   3. otherwise, if free CCUs exist but all hold near values, a per-core
//      stall counter is compared with STHLD: only when the counter is above
//      STHLD is a free CCU replaced; until then the issue stalls and the
//      counter counts up;
//   4. with no free CCU at all the issue stalls.
// Among several candidates the lowest-numbered CCU is taken. The counter
// is cleared by every successful allocation, so it counts consecutive
// waiting cycles. Port R of every CCU (owner, busy, near) is the input.
// Combinational decision, the counter is the only state.
//
// Follows the design description: same-warp CCU first, far-only CCU next,
// waiting bounded by STHLD with "counter higher than STHLD", a stalled
// issue otherwise. This design's choices: lowest index among candidates,
// clearing the counter on every allocation, the counter width.
module ccu_allocator
  import malekeh_pkg::*;
#(
  parameter int unsigned N_CCU = malekeh_pkg::NUM_CCU,
  parameter int unsigned CNT_W = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 req_valid,
  input  warp_t                req_warp,
  input  rport_t [N_CCU-1:0]   rport,
  input  logic [STHLD_W-1:0]   sthld,
  output logic                 gnt,          // the instruction issues
  output logic [$clog2(N_CCU)-1:0] gnt_ccu,
  output logic                 gnt_flush,    // target CCU changes owner
  // events, for statistics
  output logic                 ev_wait,      // stalled waiting on near values
  output logic                 ev_replace_near,
  output logic                 ev_stall_busy // own CCU busy or no free CCU
);

  localparam int unsigned IW = $clog2(N_CCU);

  logic [CNT_W-1:0] cnt_q;

  always_comb begin
    logic own_found, far_found, free_found;
    logic [IW-1:0] own_i, far_i, free_i;
    own_found = 1'b0; far_found = 1'b0; free_found = 1'b0;
    own_i = '0; far_i = '0; free_i = '0;
    for (int c = N_CCU - 1; c >= 0; c--) begin
      if (rport[c].owned && rport[c].warp == req_warp) begin
        own_found = 1'b1; own_i = IW'(c);
      end
      if (!rport[c].busy) begin
        free_found = 1'b1; free_i = IW'(c);
        if (!rport[c].owned || !rport[c].has_near) begin
          far_found = 1'b1; far_i = IW'(c);
        end
      end
    end

    gnt = 1'b0; gnt_ccu = '0; gnt_flush = 1'b0;
    ev_wait = 1'b0; ev_replace_near = 1'b0; ev_stall_busy = 1'b0;
    if (req_valid) begin
      if (own_found) begin
        if (!rport[own_i].busy) begin gnt = 1'b1; gnt_ccu = own_i; end
        else ev_stall_busy = 1'b1;
      end else if (far_found) begin
        gnt = 1'b1; gnt_ccu = far_i; gnt_flush = 1'b1;
      end else if (free_found) begin
        if (cnt_q > CNT_W'(sthld)) begin
          gnt = 1'b1; gnt_ccu = free_i; gnt_flush = 1'b1; ev_replace_near = 1'b1;
        end else ev_wait = 1'b1;
      end else ev_stall_busy = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt_q <= '0;
    else if (gnt) cnt_q <= '0;
    else if (ev_wait && cnt_q != '1) cnt_q <= cnt_q + 1'b1;
  end

endmodule
