// Register-file arbiter.
//
// Read side: every CCU presents at most one read request (warp, register,
// CT entry). The register maps to a bank (malekeh_pkg::bank_of); each bank
// serves one request per cycle. Among the CCUs that want the same bank the
// one first in a round-robin order wins; the order moves on by one CCU every
// cycle. A granted request starts the bank read in the same cycle; the
// route (bank, CT entry) is registered, so the crossbar steers the bank's
// data to the CCU's port S in the next cycle, when the bank delivers it.
//
// Write side: NUM_WB writeback slots per cycle. Each bank takes one write
// per cycle (lowest slot first); a slot that loses gets wb_ready low and
// must hold its request. Every accepted write goes to its bank (buffer 1 of
// the register file). Buffer 2, the path to the CCUs' port D, is enabled by
// this arbiter only for writes that are worth caching: the write must
// belong to the warp that owns a CCU (learned over port R) and carry the
// near reuse hint; of several such writes to one CCU in a cycle the first
// slot wins and the rest are dropped. Accepted writes of a CCU's warp that
// do not reach port D are listed on that CCU's inval port, so a cached
// copy is dropped.
//
// Follows the design description: bank/crossbar/arbiter structure, writes
// always to the banks, one D port per CCU, first near write wins, writes of
// a warp without a CCU only to the banks. This design's choices: the
// round-robin order, one write per bank per cycle with back-pressure, and
// the invalidation list.
module rf_arbiter
  import malekeh_pkg::*;
#(
  parameter int unsigned N_CCU = malekeh_pkg::NUM_CCU
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // read requests
  input  rdreq_t  [N_CCU-1:0]        rdreq,
  output logic    [N_CCU-1:0]        rdgnt,
  output logic    [NUM_BANKS-1:0]    bank_re,
  output row_t    [NUM_BANKS-1:0]    bank_raddr,
  output sroute_t [N_CCU-1:0]        sroute,     // registered, for the crossbar
  // writebacks
  input  wb_t     [NUM_WB-1:0]       wb,
  output logic    [NUM_WB-1:0]       wb_ready,
  output logic    [NUM_BANKS-1:0]    bank_we,
  output row_t    [NUM_BANKS-1:0]    bank_waddr,
  output wsel_t   [NUM_BANKS-1:0]    bank_wsel,
  // port R of each CCU and the D-port filter
  input  rport_t  [N_CCU-1:0]        rport,
  output wsel_t   [N_CCU-1:0]        dsel,
  output inval_t  [N_CCU-1:0][NUM_WB-1:0] inval,
  // one pulse per bank read, for energy statistics
  output logic    [$clog2(NUM_BANKS+1)-1:0] n_reads
);

  localparam int unsigned CW = (N_CCU > 1) ? $clog2(N_CCU) : 1;

  logic [CW-1:0] rr_q;
  logic [N_CCU-1:0] gnt;
  sroute_t [N_CCU-1:0] sroute_d;

  // ---------------- reads ----------------
  always_comb begin
    gnt = '0;
    bank_re = '0;
    bank_raddr = '0;
    sroute_d = '0;
    n_reads = '0;
    for (int b = 0; b < NUM_BANKS; b++) begin
      for (int j = 0; j < N_CCU; j++) begin
        int c;
        c = (int'(rr_q) + j) % N_CCU;
        if (!bank_re[b] && rdreq[c].valid &&
            bank_of(rdreq[c].warp, rdreq[c].num) == bank_t'(b)) begin
          bank_re[b] = 1'b1;
          bank_raddr[b] = row_of(rdreq[c].warp, rdreq[c].num);
          gnt[c] = 1'b1;
          sroute_d[c].valid = 1'b1;
          sroute_d[c].bank = bank_t'(b);
          sroute_d[c].idx = rdreq[c].idx;
        end
      end
      if (bank_re[b]) n_reads = n_reads + 1'b1;
    end
  end
  assign rdgnt = gnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr_q <= '0;
      sroute <= '0;
    end else begin
      rr_q <= (int'(rr_q) == N_CCU - 1) ? '0 : rr_q + 1'b1;
      sroute <= sroute_d;
    end
  end

  // ---------------- writes ----------------
  logic [NUM_WB-1:0] acc;
  always_comb begin
    acc = '0;
    bank_we = '0;
    bank_waddr = '0;
    bank_wsel = '0;
    for (int s = 0; s < NUM_WB; s++) begin
      bank_t b;
      b = bank_of(wb[s].warp, wb[s].num);
      if (wb[s].valid && !bank_we[b]) begin
        bank_we[b] = 1'b1;
        bank_waddr[b] = row_of(wb[s].warp, wb[s].num);
        bank_wsel[b].valid = 1'b1;
        bank_wsel[b].slot = wbidx_t'(s);
        acc[s] = 1'b1;
      end
    end
  end
  assign wb_ready = acc;

  // ---------------- D-port filter (buffer 2) ----------------
  always_comb begin
    dsel = '0;
    inval = '0;
    for (int c = 0; c < N_CCU; c++)
      for (int s = 0; s < NUM_WB; s++)
        if (acc[s] && rport[c].owned && wb[s].warp == rport[c].warp) begin
          if (wb[s].near && !dsel[c].valid) begin
            dsel[c].valid = 1'b1;
            dsel[c].slot = wbidx_t'(s);
          end else begin
            inval[c][s].valid = 1'b1;
            inval[c][s].num = wb[s].num;
          end
        end
  end

  // a granted request was valid
  for (genvar c = 0; c < N_CCU; c++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n) gnt[c] |-> rdreq[c].valid);
  end

endmodule
