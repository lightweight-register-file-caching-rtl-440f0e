// Register file of one GPU core with caching collector units.
//
// Ties the blocks together the way the register file is organised:
//
//   warp_rdy/warp_instr -> issue_scheduler -> ccu_allocator -> CCU[c]
//   CCU[c] read request -> rf_arbiter -> rf_bank[b] -> operand_crossbar
//       -> CCU[c] port S
//   writeback wb[] -> rf_arbiter (bank write, D-port filter)
//       -> rf_bank[b] and operand_crossbar -> CCU[c] port D
//   CCU[c] ready -> dispatch_scheduler -> execution units (eu_*)
//   issued instructions -> sthld_adapt -> STHLD -> ccu_allocator
//
// Interface. Instruction supply: for every warp, warp_rdy says its next
// instruction (warp_instr) may issue (fetch, decode and the scoreboard are
// outside). When issue_valid is high the instruction of issue_warp was
// taken this cycle. Dispatch: eu_valid/eu_ready handshake carrying the
// warp, the instruction and the NSRC operand values. Writeback: NUM_WB
// slots per cycle, each with its own wb_ready; a slot must hold its write
// until wb_ready is high. Each write carries the destination's reuse hint
// (near). Destination values always go to the banks; only near values of
// a warp that owns a CCU are also written into that CCU.
//
// Timing: issue to read request 1 cycle, bank read 1 cycle, value in the
// CCU the cycle after, so an instruction whose operands all miss and meet
// no bank conflict is offered for dispatch 3 cycles after it issues; one
// whose operands all hit is offered in the cycle after it issues.
//
// The stat_* outputs count events since reset: source operands served from
// the CCUs (hits) and from the banks (misses), bank reads, D-port writes,
// CCU flushes, cycles stalled waiting on STHLD and CCUs replaced after it,
// cycles stalled for a busy or missing CCU, instructions issued from the
// class of warps that own a CCU, and completed STHLD intervals.
//
// Structure and policies follow the design description (8 banks, 8 CCUs,
// ports S, D and R, cache-aware issue, STHLD-limited CCU replacement,
// adaptive STHLD). Handshakes, latencies and the statistics are this
// design's choices.
module malekeh_rf
  import malekeh_pkg::*;
#(
  parameter int unsigned N_CCU        = malekeh_pkg::NUM_CCU,
  parameter int unsigned INTERVAL_CYC = malekeh_pkg::INTERVAL,
  parameter int unsigned LARGE_SHIFT  = 4
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // instruction supply
  input  logic   [NUM_WARPS-1:0]       warp_rdy,
  input  instr_t [NUM_WARPS-1:0]       warp_instr,
  output logic                         issue_valid,
  output warp_t                        issue_warp,
  // dispatch to the execution units
  input  logic                         eu_ready,
  output logic                         eu_valid,
  output warp_t                        eu_warp,
  output instr_t                       eu_instr,
  output data_t  [NSRC-1:0]            eu_opnd,
  // writeback from the execution units
  input  wb_t    [NUM_WB-1:0]          wb,
  output logic   [NUM_WB-1:0]          wb_ready,
  // adaptive threshold
  output logic   [STHLD_W-1:0]         sthld,
  output logic   [2:0]                 sthld_state,
  // statistics
  output logic   [31:0]                stat_src_hits,
  output logic   [31:0]                stat_src_misses,
  output logic   [31:0]                stat_bank_reads,
  output logic   [31:0]                stat_d_writes,
  output logic   [31:0]                stat_flushes,
  output logic   [31:0]                stat_wait_cycles,
  output logic   [31:0]                stat_near_replacements,
  output logic   [31:0]                stat_busy_stalls,
  output logic   [31:0]                stat_cached_issues,
  output logic   [31:0]                stat_intervals
);

  localparam int unsigned IW = $clog2(N_CCU);

  logic sthld_tick;  // last cycle of an STHLD interval

  // ---------------- issue and allocation ----------------
  rport_t [N_CCU-1:0] rport;
  logic               sel_valid, sel_cached;
  warp_t              sel_warp;
  logic               a_gnt, a_flush, ev_wait, ev_repl, ev_busy;
  logic [IW-1:0]      a_ccu;

  issue_scheduler #(.N_CCU(N_CCU)) u_issue (
    .warp_rdy, .rport, .sel_valid, .sel_warp, .sel_cached
  );

  ccu_allocator #(.N_CCU(N_CCU)) u_alloc (
    .clk, .rst_n, .req_valid(sel_valid), .req_warp(sel_warp), .rport, .sthld,
    .gnt(a_gnt), .gnt_ccu(a_ccu), .gnt_flush(a_flush),
    .ev_wait, .ev_replace_near(ev_repl), .ev_stall_busy(ev_busy)
  );

  assign issue_valid = a_gnt;
  assign issue_warp  = sel_warp;

  sthld_adapt #(.INTERVAL_CYC(INTERVAL_CYC), .LARGE_SHIFT(LARGE_SHIFT)) u_sthld (
    .clk, .rst_n, .inst(a_gnt), .sthld, .state(sthld_state), .interval_end(sthld_tick)
  );

  // ---------------- CCUs ----------------
  rdreq_t  [N_CCU-1:0]           rdreq;
  logic    [N_CCU-1:0]           rdgnt, disp_rdy, disp_gnt;
  sport_t  [N_CCU-1:0]           sport;
  dport_t  [N_CCU-1:0]           dport;
  inval_t  [N_CCU-1:0][NUM_WB-1:0] inval;
  warp_t   [N_CCU-1:0]           c_warp;
  instr_t  [N_CCU-1:0]           c_instr;
  data_t   [N_CCU-1:0][NSRC-1:0] c_opnd;
  logic    [N_CCU-1:0][3:0]      c_hits, c_misses;

  for (genvar c = 0; c < N_CCU; c++) begin : g_ccu
    ccu #(.LFSR_SEED(16'hACE1 ^ 16'(c * 16'h1F35))) u_ccu (
      .clk, .rst_n,
      .alloc_valid(a_gnt && a_ccu == IW'(c)),
      .alloc_warp(sel_warp),
      .alloc_instr(warp_instr[sel_warp]),
      .rdreq(rdreq[c]), .rdgnt(rdgnt[c]),
      .sport(sport[c]), .dport(dport[c]), .inval(inval[c]),
      .rport(rport[c]),
      .disp_rdy(disp_rdy[c]), .disp_gnt(disp_gnt[c]),
      .disp_warp(c_warp[c]), .disp_instr(c_instr[c]), .disp_opnd(c_opnd[c]),
      .alloc_hits(c_hits[c]), .alloc_misses(c_misses[c])
    );
  end

  // ---------------- banks, arbiter, crossbar ----------------
  logic    [NUM_BANKS-1:0] bank_re, bank_we;
  row_t    [NUM_BANKS-1:0] bank_raddr, bank_waddr;
  data_t   [NUM_BANKS-1:0] bank_rdata, bank_wdata;
  wsel_t   [NUM_BANKS-1:0] bank_wsel;
  sroute_t [N_CCU-1:0]     sroute;
  wsel_t   [N_CCU-1:0]     dsel;
  logic    [$clog2(NUM_BANKS+1)-1:0] n_reads;

  rf_arbiter #(.N_CCU(N_CCU)) u_arb (
    .clk, .rst_n, .rdreq, .rdgnt, .bank_re, .bank_raddr, .sroute,
    .wb, .wb_ready, .bank_we, .bank_waddr, .bank_wsel,
    .rport, .dsel, .inval, .n_reads
  );

  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
    rf_bank u_bank (
      .clk, .re(bank_re[b]), .raddr(bank_raddr[b]), .rdata(bank_rdata[b]),
      .we(bank_we[b]), .waddr(bank_waddr[b]), .wdata(bank_wdata[b])
    );
  end

  operand_crossbar #(.N_CCU(N_CCU)) u_xbar (
    .bank_rdata, .sroute, .sport, .wb, .dsel, .dport, .bank_wsel, .bank_wdata
  );

  // ---------------- dispatch ----------------
  dispatch_scheduler #(.N_CCU(N_CCU)) u_disp (
    .clk, .rst_n, .disp_rdy, .disp_gnt,
    .ccu_warp(c_warp), .ccu_instr(c_instr), .ccu_opnd(c_opnd),
    .eu_ready, .eu_valid, .eu_warp, .eu_instr, .eu_opnd
  );

  // ---------------- statistics ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stat_src_hits <= '0; stat_src_misses <= '0; stat_bank_reads <= '0;
      stat_d_writes <= '0; stat_flushes <= '0; stat_wait_cycles <= '0;
      stat_near_replacements <= '0;
      stat_busy_stalls <= '0; stat_cached_issues <= '0; stat_intervals <= '0;
    end else begin
      logic [31:0] h, m, d;
      h = '0; m = '0; d = '0;
      for (int c = 0; c < N_CCU; c++) begin
        h = h + 32'(c_hits[c]);
        m = m + 32'(c_misses[c]);
        d = d + 32'(dport[c].valid);
      end
      stat_src_hits   <= stat_src_hits + h;
      stat_src_misses <= stat_src_misses + m;
      stat_bank_reads <= stat_bank_reads + 32'(n_reads);
      stat_d_writes   <= stat_d_writes + d;
      stat_flushes    <= stat_flushes + 32'(a_gnt && a_flush);
      stat_wait_cycles <= stat_wait_cycles + 32'(ev_wait);
      stat_near_replacements <= stat_near_replacements + 32'(ev_repl);
      stat_busy_stalls <= stat_busy_stalls + 32'(ev_busy);
      stat_cached_issues <= stat_cached_issues + 32'(a_gnt && sel_cached);
      stat_intervals <= stat_intervals + 32'(sthld_tick);
    end
  end

  // an issued instruction always finds its CCU free
  assert property (@(posedge clk) disable iff (!rst_n) a_gnt |-> !rport[a_ccu].busy);

endmodule
