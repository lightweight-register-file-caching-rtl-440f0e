// End-to-end test harness for malekeh_rf, shared by the reduced-size and
// the full-size testbench (each instantiates the register file and this
// harness and wires them together).
//
// It plays everything around the register file:
//   * a compiler: random per-warp programs (1 to 7 sources, 1 destination)
//     whose 1-bit reuse hints are computed from the real reuse distance in
//     the program: a value read again within RTHLD instructions of its warp,
//     before being overwritten, is "near";
//   * fetch and a scoreboard: a warp is ready when none of the sources or
//     the destination of its next instruction waits for a writeback;
//   * the execution units: every dispatched instruction is checked operand
//     by operand against a golden register file, then produces a result
//     after 1 to 6 cycles, written back over the two slots with the
//     wb_ready handshake; eu_ready drops now and then.
// At the start every register in use is written with a known value through
// the writeback port. The run ends when every warp has finished its program
// and every result is written back. The mechanisms of the design must all
// have happened: cache hits and misses, D-port writes, CCU flushes, waits
// on STHLD and replacements after it, busy stalls, issues from the cached
// class, writeback back-pressure, completed STHLD intervals and a change
// of STHLD. Each is counted and a count of zero is a failure.
module malekeh_harness
  import malekeh_pkg::*;
#(
  parameter int unsigned N_ACTIVE      = 32,    // warps with a program
  parameter int unsigned N_INSTR       = 300,   // instructions per warp
  parameter int unsigned NREGS         = 20,    // registers used per warp
  parameter int unsigned RTHLD         = 6,     // reuse-distance threshold
  parameter int unsigned MAX_CYC       = 200000,
  parameter int unsigned MIN_INTERVALS = 1
) (
  output logic                   clk,
  output logic                   rst_n,
  output logic   [NUM_WARPS-1:0] warp_rdy,
  output instr_t [NUM_WARPS-1:0] warp_instr,
  input  logic                   issue_valid,
  input  warp_t                  issue_warp,
  output logic                   eu_ready,
  input  logic                   eu_valid,
  input  warp_t                  eu_warp,
  input  instr_t                 eu_instr,
  input  data_t  [NSRC-1:0]      eu_opnd,
  output wb_t    [NUM_WB-1:0]    wb,
  input  logic   [NUM_WB-1:0]    wb_ready,
  input  logic   [STHLD_W-1:0]   sthld,
  input  logic   [2:0]           sthld_state,
  input  logic   [31:0]          stat_src_hits,
  input  logic   [31:0]          stat_src_misses,
  input  logic   [31:0]          stat_bank_reads,
  input  logic   [31:0]          stat_d_writes,
  input  logic   [31:0]          stat_flushes,
  input  logic   [31:0]          stat_wait_cycles,
  input  logic   [31:0]          stat_near_replacements,
  input  logic   [31:0]          stat_busy_stalls,
  input  logic   [31:0]          stat_cached_issues,
  input  logic   [31:0]          stat_intervals
);

  typedef struct {
    int     due;
    warp_t  warp;
    regnum_t num;
    logic   near;
    data_t  data;
  } res_t;

  int checks = 0, failures = 0;
  int cyc = 0;
  instr_t prog [N_ACTIVE][N_INSTR];
  int     pc [N_ACTIVE];
  int     pend [N_ACTIVE][NREGS];     // writebacks outstanding per register
  data_t  golden [N_ACTIVE][NREGS];
  res_t   q[$];
  int     n_issued = 0, n_disp = 0, n_wb = 0, n_backpressure = 0, n_srcs = 0;
  bit     sthld_moved = 0;
  bit     wb_taken [NUM_WB];          // slot accepted at the last edge
  int     states_seen [8];

  initial clk = 0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @cycle %0d: %s", cyc, what);
    end
  endtask

  function automatic data_t initval(int w, int r);
    data_t d;
    for (int k = 0; k < DATA_W / 32; k++) d[k*32 +: 32] = 32'(w * 65536 + r * 256 + k);
    return d;
  endfunction

  // programs and reuse hints
  task automatic compile();
    for (int w = 0; w < N_ACTIVE; w++) begin
      for (int i = 0; i < N_INSTR; i++) begin
        instr_t ins;
        int n;
        ins = '0;
        ins.opcode = 8'($urandom);
        n = (($urandom % 10) == 0) ? 7 : 1 + ($urandom % 3);
        for (int k = 0; k < n; k++) begin
          ins.src[k].valid = 1'b1;
          // a small hot set gives temporal reuse
          ins.src[k].num = regnum_t'((($urandom % 3) != 0) ? ($urandom % 6) : ($urandom % NREGS));
        end
        ins.dst_valid = 1'b1;
        ins.dst = regnum_t'($urandom % NREGS);
        prog[w][i] = ins;
      end
      for (int i = 0; i < N_INSTR; i++) begin
        for (int k = 0; k < NSRC; k++)
          if (prog[w][i].src[k].valid)
            prog[w][i].src[k].near = next_read_near(w, i, prog[w][i].src[k].num, 0);
        prog[w][i].dst_near = next_read_near(w, i, prog[w][i].dst, 1);
      end
    end
  endtask

  // is register r read again within RTHLD instructions after i, before it
  // is overwritten? (a destination of i itself is written by i)
  function automatic logic next_read_near(int w, int i, regnum_t r, bit is_dst);
    if (!is_dst && prog[w][i].dst_valid && prog[w][i].dst == r) return 1'b0;
    for (int j = i + 1; j < N_INSTR && j <= i + int'(RTHLD); j++) begin
      for (int k = 0; k < NSRC; k++)
        if (prog[w][j].src[k].valid && prog[w][j].src[k].num == r) return 1'b1;
      if (prog[w][j].dst_valid && prog[w][j].dst == r) return 1'b0;
    end
    return 1'b0;
  endfunction

  function automatic bit can_issue(int w);
    instr_t ins;
    if (pc[w] >= int'(N_INSTR)) return 0;
    ins = prog[w][pc[w]];
    if (ins.dst_valid && pend[w][ins.dst] != 0) return 0;
    for (int k = 0; k < NSRC; k++)
      if (ins.src[k].valid && pend[w][ins.src[k].num] != 0) return 0;
    return 1;
  endfunction

  initial begin
    repeat (MAX_CYC) @(posedge clk);
    failures++;
    $display("watchdog: no end after %0d cycles", MAX_CYC);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit done;
    rst_n = 0;
    warp_rdy = '0; warp_instr = '0; eu_ready = 0; wb = '0;
    for (int w = 0; w < N_ACTIVE; w++) begin
      pc[w] = 0;
      for (int r = 0; r < int'(NREGS); r++) begin pend[w][r] = 0; golden[w][r] = initval(w, r); end
    end
    foreach (states_seen[i]) states_seen[i] = 0;
    foreach (wb_taken[s]) wb_taken[s] = 0;
    compile();
    repeat (3) @(negedge clk);
    rst_n = 1;

    // load the register file through the writeback port
    for (int w = 0; w < N_ACTIVE; w++)
      for (int r = 0; r < int'(NREGS); r++) begin
        wb[0] = '{valid: 1'b1, warp: warp_t'(w), num: regnum_t'(r), near: 1'b0, data: golden[w][r]};
        #1;
        check(wb_ready[0], "load write accepted");
        @(negedge clk);
      end
    wb = '0;
    @(negedge clk);

    done = 0;
    while (!done) begin
      // ---- drive inputs for this cycle ----
      for (int w = 0; w < NUM_WARPS; w++) begin
        warp_rdy[w] = (w < int'(N_ACTIVE)) ? can_issue(w) : 1'b0;
        warp_instr[w] = (w < int'(N_ACTIVE) && pc[w] < int'(N_INSTR)) ? prog[w][pc[w]] : '0;
      end
      eu_ready = ($urandom % 8) != 0;
      for (int s = 0; s < NUM_WB; s++)
        if (wb_taken[s]) begin wb[s] = '0; wb_taken[s] = 0; end
      for (int s = 0; s < NUM_WB; s++)
        if (!wb[s].valid) begin
          int best;
          best = -1;
          foreach (q[i]) if (q[i].due <= cyc && (best < 0 || q[i].due < q[best].due)) best = i;
          if (best >= 0) begin
            wb[s] = '{valid: 1'b1, warp: q[best].warp, num: q[best].num,
                      near: q[best].near, data: q[best].data};
            q.delete(best);
          end
        end
      #1;
      // ---- what happens at the coming clock edge ----
      if (issue_valid) begin
        int w;
        w = int'(issue_warp);
        check(w < int'(N_ACTIVE) && warp_rdy[w], $sformatf("issue of warp %0d that was not ready", w));
        if (w < int'(N_ACTIVE)) begin
          instr_t ins;
          ins = prog[w][pc[w]];
          if (ins.dst_valid) pend[w][ins.dst]++;
          pc[w]++;
          n_issued++;
        end
      end
      if (eu_valid && eu_ready) begin
        int w;
        res_t r;
        data_t acc;
        w = int'(eu_warp);
        acc = {32{32'(n_disp)}};
        for (int k = 0; k < NSRC; k++)
          if (eu_instr.src[k].valid) begin
            n_srcs++;
            check(eu_opnd[k] == golden[w][eu_instr.src[k].num],
                  $sformatf("warp %0d operand %0d (r%0d) wrong", w, k, eu_instr.src[k].num));
            acc = acc ^ {eu_opnd[k][DATA_W-2:0], eu_opnd[k][DATA_W-1]};
          end
        r.due = cyc + 1 + int'($urandom % 6);
        r.warp = eu_warp; r.num = eu_instr.dst; r.near = eu_instr.dst_near; r.data = acc;
        q.push_back(r);
        n_disp++;
      end
      for (int s = 0; s < NUM_WB; s++)
        if (wb[s].valid) begin
          if (wb_ready[s]) begin
            golden[wb[s].warp][wb[s].num] = wb[s].data;
            pend[wb[s].warp][wb[s].num]--;
            n_wb++;
            wb_taken[s] = 1;
          end else n_backpressure++;
        end
      if (sthld != '0) sthld_moved = 1;
      states_seen[sthld_state]++;
      @(negedge clk);
      cyc++;
      done = (n_issued == int'(N_ACTIVE * N_INSTR)) && (n_wb == n_issued) &&
             (int'(stat_intervals) >= int'(MIN_INTERVALS));
    end

    check(n_disp == n_issued, "every issued instruction dispatched");
    check(stat_src_hits + stat_src_misses == 32'(n_srcs), "hits + misses = source operands");
    check(stat_bank_reads == stat_src_misses, "one bank read per miss");
    check(stat_src_hits > 0, "cache hits");
    check(stat_src_misses > 0, "cache misses");
    check(stat_d_writes > 0, "destination values cached through port D");
    check(stat_flushes > 0, "CCU flushes on a warp change");
    check(stat_wait_cycles > 0, "issue waited on STHLD");
    check(stat_near_replacements > 0, "CCU with near values replaced after waiting");
    check(stat_busy_stalls > 0, "stall for a busy CCU");
    check(stat_cached_issues > 0, "issue from warps owning a CCU");
    check(n_backpressure > 0, "writeback back-pressure");
    check(stat_intervals >= 32'(MIN_INTERVALS), "STHLD intervals completed");
    check(sthld_moved, "STHLD changed");
    $display("cycles %0d  instructions %0d  IPC x1000 %0d", cyc, n_issued, n_issued * 1000 / cyc);
    $display("source operands %0d  hits %0d  misses %0d  hit ratio %0d%%  bank reads %0d",
             n_srcs, stat_src_hits, stat_src_misses, stat_src_hits * 100 / n_srcs, stat_bank_reads);
    $display("D writes %0d  flushes %0d  STHLD waits %0d  near replacements %0d  busy stalls %0d",
             stat_d_writes, stat_flushes, stat_wait_cycles, stat_near_replacements, stat_busy_stalls);
    $display("intervals %0d  final STHLD %0d  state %0d  backpressure %0d",
             stat_intervals, sthld, sthld_state, n_backpressure);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
