// Caching collector unit (CCU).
//
// An operand collector unit that also works as a small cache of the warp
// registers of the one warp that currently owns it. It holds:
//   * metadata: owning warp, the instruction waiting for dispatch, busy flag;
//   * the cache table (CT): CT_SIZE entries of {tag, lock, near, LRU age,
//     data}, plus a pending bit (value requested but not yet arrived) and a
//     requested bit;
//   * the operand collector table (OCT): NSRC slots of {valid, ready, index},
//     the index pointing at the CT entry that holds the operand, so two
//     operands naming the same register share one entry;
//   * the operand muxes that deliver the CT data of every OCT slot.
//
// Allocation (alloc_valid, one cycle): if the warp differs from the owning
// warp the CT is flushed; the metadata is updated; every source is looked up;
// a miss takes a victim entry; all sources are locked, get the instruction's
// near/far hint and are made most recently used; the OCT slots are set,
// ready for hits whose data is present. Misses become read requests (one
// outstanding request per cycle on rdreq, taken when rdgnt is high).
// Port S fills the CT entry and sets the ready bit of every OCT slot that
// points at it. Port D (a near destination value of the owning warp) updates
// a hit entry or takes a victim. inval lists destination registers of the
// owning warp that were written only to the banks; a cached copy of such a
// register is dropped so the CT never holds a stale value. disp_gnt releases
// the CCU: locks and OCT slots are cleared, the CT keeps its contents.
//
// Victim choice: locked entries are never chosen; an invalid entry is taken
// first; otherwise a random far entry (from a 16-bit LFSR); otherwise the
// unlocked entry with the highest LRU age. In one cycle the events are
// applied in the order S fill, read grant, inval, D write, dispatch,
// allocation, each seeing the result of the ones before.
//
// Follows the design description: the fields and widths, the ten allocation
// steps, lock/far/LRU replacement, the D-port write that allocates only near
// values, and port R carrying the warp and the minimum reuse distance.
// This design's choices: taking invalid entries first, the LFSR, the pending
// and requested bits, the inval list and the single-cycle allocation.
module ccu
  import malekeh_pkg::*;
#(
  parameter int unsigned NUM_INV = malekeh_pkg::NUM_WB,
  parameter logic [15:0] LFSR_SEED = 16'hACE1
) (
  input  logic               clk,
  input  logic               rst_n,
  // allocation from the issue scheduler / CCU allocator
  input  logic               alloc_valid,
  input  warp_t              alloc_warp,
  input  instr_t             alloc_instr,
  // register-file side
  output rdreq_t             rdreq,
  input  logic               rdgnt,
  input  sport_t             sport,
  input  dport_t             dport,
  input  inval_t [NUM_INV-1:0] inval,
  // port R
  output rport_t             rport,
  // dispatch
  output logic               disp_rdy,
  input  logic               disp_gnt,
  output warp_t              disp_warp,
  output instr_t             disp_instr,
  output data_t [NSRC-1:0]   disp_opnd,
  // per-allocation statistics
  output logic [3:0]         alloc_hits,
  output logic [3:0]         alloc_misses
);

  localparam int unsigned CT = CT_SIZE;
  typedef logic [CT-1:0][LRU_W-1:0] lru_vec_t;

  // ---------------- state ----------------
  logic              owned_q, busy_q;
  warp_t             warp_q;
  instr_t            instr_q;
  regnum_t [CT-1:0]  tag_q;
  logic    [CT-1:0]  ev_q, pend_q, reqd_q, lock_q, near_q;
  lru_vec_t          lru_q;
  data_t             data_q [CT];
  logic  [NSRC-1:0]  ov_q, ordy_q;
  ctidx_t [NSRC-1:0] oidx_q;
  logic  [15:0]      lfsr_q;

  // ---------------- next state ----------------
  logic              owned_d, busy_d;
  warp_t             warp_d;
  instr_t            instr_d;
  regnum_t [CT-1:0]  tag_d;
  logic    [CT-1:0]  ev_d, pend_d, reqd_d, lock_d, near_d;
  lru_vec_t          lru_d;
  data_t             data_d [CT];
  logic  [NSRC-1:0]  ov_d, ordy_d;
  ctidx_t [NSRC-1:0] oidx_d;

  // make entry e most recently used (age 0), ageing the younger ones
  function automatic lru_vec_t touch(lru_vec_t l, ctidx_t e);
    lru_vec_t r = l;
    for (int i = 0; i < CT; i++)
      if (l[i] < l[e]) r[i] = l[i] + 1'b1;
    r[e] = '0;
    return r;
  endfunction

  // replacement: never locked; invalid first; random far; else LRU
  function automatic ctidx_t victim(logic [CT-1:0] ev, logic [CT-1:0] lock,
                                    logic [CT-1:0] near, lru_vec_t l,
                                    ctidx_t rnd);
    ctidx_t v = '0;
    logic   found = 1'b0;
    logic [LRU_W-1:0] best = '0;
    for (int i = 0; i < CT; i++)
      if (!found && !ev[i]) begin v = ctidx_t'(i); found = 1'b1; end
    for (int j = 0; j < CT; j++) begin
      ctidx_t i = rnd + ctidx_t'(j);
      if (!found && ev[i] && !lock[i] && !near[i]) begin v = i; found = 1'b1; end
    end
    if (!found) begin
      for (int i = 0; i < CT; i++)
        if (!lock[i] && (!found || l[i] > best)) begin
          v = ctidx_t'(i); best = l[i]; found = 1'b1;
        end
    end
    return v;
  endfunction

  always_comb begin
    logic   hit;
    ctidx_t h, v;
    owned_d = owned_q; busy_d = busy_q; warp_d = warp_q; instr_d = instr_q;
    tag_d = tag_q; ev_d = ev_q; pend_d = pend_q; reqd_d = reqd_q;
    lock_d = lock_q; near_d = near_q; lru_d = lru_q;
    for (int e = 0; e < CT; e++) data_d[e] = data_q[e];
    ov_d = ov_q; ordy_d = ordy_q; oidx_d = oidx_q;
    alloc_hits = '0; alloc_misses = '0;
    hit = 1'b0; h = '0; v = '0;

    // source operand value arrives on port S
    if (sport.valid) begin
      data_d[sport.idx] = sport.data;
      pend_d[sport.idx] = 1'b0;
      reqd_d[sport.idx] = 1'b0;
      for (int k = 0; k < NSRC; k++)
        if (ov_q[k] && oidx_q[k] == sport.idx) ordy_d[k] = 1'b1;
    end

    // outstanding read request granted by the arbiter
    if (rdgnt && rdreq.valid) reqd_d[rdreq.idx] = 1'b1;

    // writes that went to the banks only: drop stale cached copies
    for (int w = 0; w < NUM_INV; w++)
      if (inval[w].valid)
        for (int e = 0; e < CT; e++)
          if (ev_d[e] && tag_d[e] == inval[w].num && !lock_d[e]) ev_d[e] = 1'b0;

    // destination value on port D
    if (dport.valid) begin
      hit = 1'b0; h = '0;
      for (int e = 0; e < CT; e++)
        if (ev_d[e] && tag_d[e] == dport.num) begin hit = 1'b1; h = ctidx_t'(e); end
      if (!hit) begin
        h = victim(ev_d, lock_d, near_d, lru_d, lfsr_q[2:0]);
        ev_d[h] = 1'b1; tag_d[h] = dport.num; lock_d[h] = 1'b0;
      end
      data_d[h] = dport.data;
      pend_d[h] = 1'b0; reqd_d[h] = 1'b0;
      near_d[h] = 1'b1;
      lru_d = touch(lru_d, h);
    end

    // instruction dispatched: release the CCU
    if (disp_gnt) begin
      busy_d = 1'b0;
      lock_d = '0;
      ov_d = '0; ordy_d = '0;
    end

    // allocation of a newly issued instruction
    if (alloc_valid) begin
      if (!owned_q || warp_q != alloc_warp) begin
        ev_d = '0; pend_d = '0; reqd_d = '0; lock_d = '0;
      end
      owned_d = 1'b1; warp_d = alloc_warp; instr_d = alloc_instr; busy_d = 1'b1;
      for (int k = 0; k < NSRC; k++) begin
        ov_d[k] = alloc_instr.src[k].valid;
        ordy_d[k] = 1'b0;
        oidx_d[k] = '0;
        if (alloc_instr.src[k].valid) begin
          hit = 1'b0; h = '0;
          for (int e = 0; e < CT; e++)
            if (ev_d[e] && tag_d[e] == alloc_instr.src[k].num) begin
              hit = 1'b1; h = ctidx_t'(e);
            end
          if (hit) begin
            ordy_d[k] = !pend_d[h];
            alloc_hits = alloc_hits + 1'b1;
          end else begin
            v = victim(ev_d, lock_d, near_d, lru_d, lfsr_q[k+3 +: 3]);
            h = v;
            ev_d[h] = 1'b1; tag_d[h] = alloc_instr.src[k].num;
            pend_d[h] = 1'b1; reqd_d[h] = 1'b0;
            alloc_misses = alloc_misses + 1'b1;
          end
          lock_d[h] = 1'b1;
          near_d[h] = alloc_instr.src[k].near;
          lru_d = touch(lru_d, h);
          oidx_d[k] = h;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      owned_q <= 1'b0; busy_q <= 1'b0; warp_q <= '0; instr_q <= '0;
      tag_q <= '0; ev_q <= '0; pend_q <= '0; reqd_q <= '0;
      lock_q <= '0; near_q <= '0;
      for (int e = 0; e < CT; e++) lru_q[e] <= LRU_W'(e);
      ov_q <= '0; ordy_q <= '0; oidx_q <= '0;
      lfsr_q <= LFSR_SEED;
    end else begin
      owned_q <= owned_d; busy_q <= busy_d; warp_q <= warp_d; instr_q <= instr_d;
      tag_q <= tag_d; ev_q <= ev_d; pend_q <= pend_d; reqd_q <= reqd_d;
      lock_q <= lock_d; near_q <= near_d; lru_q <= lru_d;
      ov_q <= ov_d; ordy_q <= ordy_d; oidx_q <= oidx_d;
      // x^16 + x^14 + x^13 + x^11 + 1
      lfsr_q <= {lfsr_q[14:0], lfsr_q[15] ^ lfsr_q[13] ^ lfsr_q[12] ^ lfsr_q[10]};
    end
  end

  // the data array has no reset; an entry is read only while it is valid
  always_ff @(posedge clk)
    for (int e = 0; e < CT; e++) data_q[e] <= data_d[e];

  // one outstanding read request: lowest pending, not yet requested entry
  always_comb begin
    rdreq = '0;
    rdreq.warp = warp_q;
    for (int e = CT - 1; e >= 0; e--)
      if (ev_q[e] && pend_q[e] && !reqd_q[e]) begin
        rdreq.valid = 1'b1;
        rdreq.num   = tag_q[e];
        rdreq.idx   = ctidx_t'(e);
      end
  end

  assign rport.owned    = owned_q;
  assign rport.warp     = warp_q;
  assign rport.busy     = busy_q;
  assign rport.has_near = |(ev_q & near_q);

  assign disp_rdy   = busy_q && ((ov_q & ~ordy_q) == '0);
  assign disp_warp  = warp_q;
  assign disp_instr = instr_q;
  always_comb
    for (int k = 0; k < NSRC; k++) disp_opnd[k] = data_q[oidx_q[k]];

  // a CCU is never allocated while it still holds an instruction
  assert property (@(posedge clk) disable iff (!rst_n) alloc_valid |-> !busy_q);
  // dispatch only when all source operands have arrived
  assert property (@(posedge clk) disable iff (!rst_n) disp_gnt |-> disp_rdy);

endmodule
